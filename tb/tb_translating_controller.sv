// tb_translating_controller: plays the data controller and the
// find-entry/rule/load chain around the controller.  Checks that a group is
// only taken while the output is idle, the sequence of entry characters for
// scripted advance counts, the two left-context characters at every step
// (including the carry-over from the previous group), group_done once per
// group and the step-to-step timing.
module tb_translating_controller;
  import braille_pkg::*;
  localparam int unsigned BUF_LEN = 16;
  logic clk = 0, rst_n = 1;
  logic grp_valid = 0, out_busy = 0, adv_valid = 0;
  char_t [BUF_LEN-1:0] grp_text = '0;
  logic [4:0] grp_len = 0;
  logic grp_take, step_req, group_done, busy;
  char_t step_char;
  char_t [BUF_LEN-1:0] text;
  logic [4:0] len, pos;
  char_t [LEFT_MAX-1:0] left_text;
  logic [2:0] adv_cnt = 0;
  int checks = 0, failures = 0, ndone = 0, ntake = 0;

  translating_controller #(.BUF_LEN(BUF_LEN)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires
  always @(posedge clk) begin
    if (group_done) ndone++;
    if (grp_take) ntake++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input string s);
    int n0;
    @(negedge clk);
    grp_text = '0;
    for (int i = 0; i < s.len(); i++) grp_text[i] = s[i];
    grp_len = 5'(s.len());
    n0 = ntake;
    grp_valid = 1;
    while (ntake == n0) @(negedge clk);
    grp_valid = 0;
  endtask

  // wait for a step, check its character and left context, answer with n
  task automatic step(input char_t c, input char_t l1, input char_t l2, input int n);
    int w;
    w = 0;
    while (!step_req && w < 20) begin @(negedge clk); w++; end
    checks++;
    if (!step_req || step_char != c || left_text[0] != l1 || left_text[1] != l2) begin
      failures++;
      $display("step '%c' left '%c%c', expected '%c' left '%c%c'", step_char, left_text[1], left_text[0], c, l2, l1);
    end
    checks++;
    if (w > 1) begin failures++; $display("step came %0d cycles late", w); end
    @(negedge clk); @(negedge clk);
    adv_valid = 1; adv_cnt = 3'(n);
    @(negedge clk); adv_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // output still busy: the group must wait
    out_busy = 1;
    @(negedge clk);
    grp_text = '0; grp_text[0] = "Q"; grp_len = 1; grp_valid = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (ntake != 0) begin failures++; $display("group taken while output busy"); end
    grp_valid = 0; out_busy = 0;
    @(negedge clk);
    offer({"THE CAT", 8'h0A});
    step("T", " ", " ", 3);
    step(" ", "E", "H", 1);
    step("C", " ", "E", 1);
    step("A", "C", " ", 1);
    step("T", "A", "C", 1);
    step(8'h0A, "T", "A", 1);
    @(negedge clk);
    checks++;
    if (ndone != 1) begin failures++; $display("group_done count %0d", ndone); end
    offer({"AB", 8'h0A});
    step("A", 8'h0A, "T", 1);
    step("B", "A", 8'h0A, 2);   // advance past the end finishes the group
    @(negedge clk);
    checks++;
    if (ndone != 2 || busy) begin failures++; $display("second group not finished"); end
    offer("Z");
    step("Z", 8'h0A, "B", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
