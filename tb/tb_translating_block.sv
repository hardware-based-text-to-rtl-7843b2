// tb_translating_block: hands whole groups to the translating block (with
// the rule table attached) and compares the Braille ASCII it sends with
// translations worked out by hand from the rule table.  Also checks that
// every group is translated in fewer cycles than one bit period of the
// 57600-baud output at 100 MHz (1736 cycles), and that each of the
// mechanisms (pass-through, rule rejected and retried, left- and
// right-context rules applied) occurs.
module tb_translating_block;
  import braille_pkg::*;
  localparam int unsigned BUF_LEN = 64;
  localparam int unsigned BIT_CYCLES = 1736;
  logic clk = 0, rst_n = 1;
  logic grp_valid = 0, grp_take, lut_en, out_valid, out_ready = 0, busy, out_overflow;
  char_t [BUF_LEN-1:0] grp_text = '0;
  logic [6:0] grp_len = 0;
  rule_addr_t lut_addr;
  rule_t lut_rule;
  char_t out_data;
  int checks = 0, failures = 0;
  int worst = 0;
  int cyc = 0, t_take = 0, n_pt = 0, n_retry = 0, n_left = 0, n_right = 0, n_multi = 0;
  char_t got[$];

  translating_block #(.BUF_LEN(BUF_LEN)) dut (.*);
  look_up_table u_lut (.clk, .rd_en(lut_en), .rd_addr(lut_addr), .rd_rule(lut_rule));

  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    cyc++;
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) got.push_back(out_data);
    if (grp_take) t_take = cyc;
    if (dut.u_tc.group_done) begin
      if (cyc - t_take > worst) worst = cyc - t_take;
      checks++;
      if (cyc - t_take >= BIT_CYCLES) begin
        failures++; $display("group took %0d cycles", cyc - t_take);
      end
    end
    if (dut.u_ltc.pt_valid) n_pt++;
    if (dut.u_ltc.rule_next) n_retry++;
    if (dut.rule_valid && dut.focus_ok && dut.left_ok && dut.right_ok) begin
      if (dut.rule.left_len != 0) n_left++;
      if (dut.rule.right_len != 0) n_right++;
      if (dut.rule.focus_len > 1) n_multi++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic group(input string s, input string exp);
    string r;
    @(negedge clk);
    grp_text = '0;
    for (int i = 0; i < s.len(); i++) grp_text[i] = s[i];
    grp_len = 7'(s.len());
    grp_valid = 1;
    @(negedge clk);
    while (busy == 0 && grp_valid) @(negedge clk);   // taken once busy rises
    grp_valid = 0;
    while (busy) @(negedge clk);
    r = "";
    foreach (got[i]) r = {r, string'(got[i])};
    got.delete();
    checks++;
    if (r != exp) begin failures++; $display("'%s' -> '%s', expected '%s'", s, r, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    group("THE CAT AND THE DOG ", "! CAT & ! DOG ");
    group("BUT IT IS SO\n", "B X IS S\n");
    group("SINGING WITH THEM\n", "S++ ) !M\n");
    group("EVERY CHILD SHOULD READ\n", "E *ILD %\\LD R1D\n");
    group("X 42, ZOO.\n", "X 42, ZOO.\n");
    group("RABBIT COFFEE EGG\n", "RA2IT C(FEE EGG\n");
    group("ANDREW WHO\n", "&REW :O\n");
    // worst case for this table: every character walks the five-rule E group
    begin
      string e63;
      e63 = "";
      for (int i = 0; i < 63; i++) e63 = {e63, "E"};
      group({e63, "\n"}, {e63, "\n"});
    end
    checks++;
    if (n_pt == 0 || n_retry == 0 || n_left == 0 || n_right == 0 || n_multi == 0) begin
      failures++;
      $display("mechanism missing: pt %0d retry %0d left %0d right %0d multi %0d", n_pt, n_retry, n_left, n_right, n_multi);
    end
    $display("slowest group %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
