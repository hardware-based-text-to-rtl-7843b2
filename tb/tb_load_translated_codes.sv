// tb_load_translated_codes: drives rule decisions and pass-through requests
// and checks the answer to output_rule, the codes loaded and the advance
// reported, all one cycle later.
module tb_load_translated_codes;
  import braille_pkg::*;
  logic clk = 0, rst_n = 1;
  logic rule_valid = 0, focus_ok = 0, right_ok = 0, left_ok = 0, pt_valid = 0;
  rule_t rule = '0;
  char_t pt_char = 0;
  logic rule_next, rule_done, wr_en, adv_valid;
  char_t [OUT_MAX-1:0] wr_codes;
  logic [1:0] wr_cnt;
  logic [2:0] adv_cnt;
  int checks = 0, failures = 0;

  load_translated_codes dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dec(input rule_t r, input logic f, input logic rt, input logic l,
                     input logic exp_done, input char_t exp_code, input int exp_adv);
    @(negedge clk); rule_valid = 1; rule = r; focus_ok = f; right_ok = rt; left_ok = l;
    @(negedge clk); rule_valid = 0;
    checks++;
    if (exp_done) begin
      if (!rule_done || rule_next || !wr_en || wr_cnt != 1 || wr_codes[0] != exp_code ||
          !adv_valid || adv_cnt != 3'(exp_adv)) begin
        failures++;
        $display("accept: done %b next %b wr %b cnt %0d code %c adv %b/%0d", rule_done, rule_next, wr_en, wr_cnt, wr_codes[0], adv_valid, adv_cnt);
      end
    end else begin
      if (rule_done || !rule_next || wr_en || adv_valid) begin
        failures++;
        $display("reject: done %b next %b wr %b adv %b", rule_done, rule_next, wr_en, adv_valid);
      end
    end
    @(negedge clk);
    checks++;
    if (rule_done || rule_next || wr_en || adv_valid) begin failures++; $display("pulse too long"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    dec(mk("", "THE", "", "!"), 1, 1, 1, 1, "!", 3);
    dec(mk("~", "BUT", "~", "B"), 1, 1, 0, 0, 0, 0);
    dec(mk("~", "BUT", "~", "B"), 1, 0, 1, 0, 0, 0);
    dec(mk("~", "BUT", "~", "B"), 0, 1, 1, 0, 0, 0);
    dec(mk("~", "PEOPLE", "~", "P"), 1, 1, 1, 1, "P", 6);
    dec(mk("", "C", "", "C"), 1, 1, 1, 1, "C", 1);
    // pass-through
    @(negedge clk); pt_valid = 1; pt_char = "7";
    @(negedge clk); pt_valid = 0;
    checks++;
    if (!wr_en || wr_cnt != 1 || wr_codes[0] != "7" || !adv_valid || adv_cnt != 1 || rule_done || rule_next) begin
      failures++; $display("pass-through wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
