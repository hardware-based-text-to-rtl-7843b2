// tb_braille_fpga_top: end-to-end test of the FPGA setup at its default
// sizes (100 MHz, text in at 4800 baud, Braille out at 57600 baud, 64-byte
// buffer, five-word groups).  A host model sends text as 8N1 frames and
// decodes the returned frames with its own bit sampler; the decoded stream is
// compared with translations worked out by hand from the rule table.
// Counted and required at least once: groups closed by the fifth word, by a
// line end and by a full buffer; characters passed through untranslated;
// rules rejected and the next one tried; rules applied whose left context,
// right context or multi-character focus mattered.  Each group must be
// translated within one bit period of the output line.
module tb_braille_fpga_top;
  localparam int unsigned RX_CPB = (100_000_000 + 2400) / 4800;
  localparam int unsigned TX_CPB = (100_000_000 + 28800) / 57600;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic txd, busy, in_overflow, out_overflow, frame_err;
  int checks = 0, failures = 0;
  int cyc = 0, t_take = 0, worst = 0;
  int n_words = 0, n_line = 0, n_full = 0, n_pt = 0, n_retry = 0, n_left = 0, n_right = 0, n_multi = 0;
  int n_err = 0;
  byte got[$];

  braille_fpga_top dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    cyc++;
    if (dut.u_tr.grp_take) begin
      t_take = cyc;
      if (dut.u_tr.grp_len == 64) n_full++;
      else if (dut.u_tr.grp_text[dut.u_tr.grp_len - 1] == " ") n_words++;
      else n_line++;
    end
    if (dut.u_tr.u_tb.u_tc.group_done && cyc - t_take > worst) worst = cyc - t_take;
    if (dut.u_tr.u_tb.u_ltc.pt_valid) n_pt++;
    if (dut.u_tr.u_tb.u_ltc.rule_next) n_retry++;
    if (dut.u_tr.u_tb.rule_valid && dut.u_tr.u_tb.focus_ok && dut.u_tr.u_tb.left_ok && dut.u_tr.u_tb.right_ok) begin
      if (dut.u_tr.u_tb.rule.left_len != 0) n_left++;
      if (dut.u_tr.u_tb.rule.right_len != 0) n_right++;
      if (dut.u_tr.u_tb.rule.focus_len > 1) n_multi++;
    end
    if (in_overflow || out_overflow || frame_err) n_err++;
  end

  // host receiver: decode 8N1 frames on txd
  initial begin
    forever begin
      byte b;
      @(negedge txd);
      repeat (TX_CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (TX_CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (TX_CPB) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("output stop bit low"); end
      got.push_back(b);
    end
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog: %0d bytes received", got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input string s);
    for (int k = 0; k < s.len(); k++) begin
      rxd = 0; repeat (RX_CPB) @(posedge clk);
      for (int i = 0; i < 8; i++) begin rxd = s[k][i]; repeat (RX_CPB) @(posedge clk); end
      rxd = 1; repeat (RX_CPB) @(posedge clk);
    end
  endtask

  task automatic expect_out(input string exp);
    string r;
    int w;
    w = 0;
    while (got.size() < exp.len() && w < 4_000_000) begin @(posedge clk); w++; end
    r = "";
    foreach (got[i]) r = {r, string'(got[i])};
    got.delete();
    checks++;
    if (r != exp) begin failures++; $display("got '%s'\nexpected '%s'", r, exp); end
  endtask

  initial begin
    string a64, e64;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (100) @(posedge clk);
    send("The cat and the dog ");
    expect_out("! CAT & ! DOG ");
    send("sat.\nBut it is so\n");
    expect_out("SAT.\nB X IS S\n");
    send("Singing with them\n");
    expect_out("S++ ) !M\n");
    a64 = ""; e64 = "";
    for (int i = 0; i < 8; i++) begin a64 = {a64, "abcdefgh"}; e64 = {e64, "ABCDEF<"}; end
    send({a64, "\n"});
    expect_out({e64, "\n"});
    checks++;
    if (worst >= int'(TX_CPB)) begin failures++; $display("slowest group %0d cycles, one output bit is %0d", worst, TX_CPB); end
    checks++;
    if (n_err != 0) begin failures++; $display("%0d overflow or frame errors", n_err); end
    checks++;
    if (n_words == 0 || n_line == 0 || n_full == 0 || n_pt == 0 || n_retry == 0 ||
        n_left == 0 || n_right == 0 || n_multi == 0) begin
      failures++;
    end
    $display("groups: five words %0d, line end %0d, full buffer %0d; pass-through %0d, retried %0d, left %0d, right %0d, multi-char %0d; slowest group %0d cycles",
             n_words, n_line, n_full, n_pt, n_retry, n_left, n_right, n_multi, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
