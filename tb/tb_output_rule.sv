// tb_output_rule: runs output_rule against a small rule memory of its own
// and a model of load_translated_codes that accepts the n-th rule presented.
// Checks the order of the rules presented, four cycles per rule, the
// pass-through on a find-entry fail, at the end of a character's group,
// on an empty slot and at the end of the table.
module tb_output_rule;
  import braille_pkg::*;
  logic clk = 0, rst_n = 1;
  logic entry_valid = 0, entry_fail = 0;
  rule_addr_t entry_addr = 0;
  char_t entry_char = 0;
  logic lut_en;
  rule_addr_t lut_addr;
  rule_t lut_rule;
  logic rule_valid, pt_valid;
  rule_t rule;
  char_t pt_char;
  logic rule_next = 0, rule_done = 0;
  int checks = 0, failures = 0;

  rule_t mem [NUM_RULES];
  int accept_at;                 // accept the n-th rule presented (0: never)
  int presented, last_valid_cycle, cycle, bad_gap, npt;
  char_t seen[$];
  char_t last_pt;

  output_rule dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    cycle++;
    if (lut_en) lut_rule <= mem[lut_addr];
    rule_next <= 0; rule_done <= 0;
    if (rule_valid) begin
      presented++;
      if (presented > 1 && cycle - last_valid_cycle != 4) bad_gap++;
      last_valid_cycle = cycle;
      seen.push_back(rule.focus[rule.focus_len - 1]);
      if (presented == accept_at) rule_done <= 1; else rule_next <= 1;
    end
    if (pt_valid) begin npt++; last_pt = pt_char; end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input char_t c, input logic fail, input int addr, input int acc,
                     input string exp_seen, input logic exp_pt);
    string s;
    presented = 0; npt = 0; bad_gap = 0; accept_at = acc; seen.delete();
    @(negedge clk); entry_valid = 1; entry_fail = fail; entry_addr = rule_addr_t'(addr); entry_char = c;
    @(negedge clk); entry_valid = 0;
    repeat (40) @(negedge clk);
    s = "";
    foreach (seen[i]) s = {s, string'(seen[i])};
    checks++;
    if (s != exp_seen) begin failures++; $display("'%c': rules ending in '%s', expected '%s'", c, s, exp_seen); end
    checks++;
    if (npt != int'(exp_pt) || (exp_pt && last_pt != c)) begin failures++; $display("'%c': %0d pass-throughs", c, npt); end
    checks++;
    if (bad_gap != 0) begin failures++; $display("'%c': rules not four cycles apart", c); end
  endtask

  initial begin
    foreach (mem[i]) mem[i] = '0;
    mem[0] = mk("", "CAN", "", "C");
    mem[1] = mk("", "CH", "", "*");
    mem[2] = mk("", "C", "", "C");
    mem[3] = mk("", "DO", "", "D");
    mem[NUM_RULES-1] = mk("", "Q", "", "Q");
    repeat (2) @(posedge clk); rst_n = 1;
    run("C", 0, 0, 3, "NHC", 0);   // third rule applies
    run("C", 0, 0, 1, "N", 0);     // first rule applies
    run("C", 0, 0, 0, "NHC", 1);   // none applies: next rule is D's
    run("C", 0, 1, 0, "HC", 1);
    run("X", 1, 0, 0, "", 1);      // find-entry fail
    run("E", 0, 4, 0, "", 1);      // empty slot
    run("Q", 0, NUM_RULES-1, 0, "Q", 1); // end of table
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
