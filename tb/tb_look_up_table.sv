// tb_look_up_table: reads rules back from the table and compares their
// fields with the rules as written out by hand (positions in the table,
// focus, contexts, outputs), checks empty slots and the one-cycle read.
module tb_look_up_table;
  import braille_pkg::*;
  logic clk = 0, rd_en = 0;
  rule_addr_t rd_addr = 0;
  rule_t rd_rule;
  int checks = 0, failures = 0;

  look_up_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a);
    @(negedge clk); rd_en = 1; rd_addr = rule_addr_t'(a);
    @(negedge clk); rd_en = 0;
  endtask

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    // ~[BUT]~ = B at address 5
    rd(5);
    chk("BUT left_len", rd_rule.left_len, 1);   chk("BUT left", rd_rule.left[0], "~");
    chk("BUT focus_len", rd_rule.focus_len, 3);
    chk("BUT f0", rd_rule.focus[0], "B"); chk("BUT f1", rd_rule.focus[1], "U"); chk("BUT f2", rd_rule.focus[2], "T");
    chk("BUT right_len", rd_rule.right_len, 1); chk("BUT right", rd_rule.right[0], "~");
    chk("BUT out_len", rd_rule.out_len, 1);     chk("BUT out", rd_rule.out[0], "B");
    // the read value holds while rd_en is low
    rd_addr = 0; @(negedge clk);
    chk("hold", rd_rule.focus[0], "B");
    // [AND] = & at address 0
    rd(0);
    chk("AND left_len", rd_rule.left_len, 0); chk("AND focus_len", rd_rule.focus_len, 3);
    chk("AND f2", rd_rule.focus[2], "D"); chk("AND out", rd_rule.out[0], "&"); chk("AND right_len", rd_rule.right_len, 0);
    // ![ING] = + at address 28
    rd(28);
    chk("ING left", rd_rule.left[0], "!"); chk("ING f0", rd_rule.focus[0], "I"); chk("ING out", rd_rule.out[0], "+");
    // ~[PEOPLE]~ = P at 44
    rd(44);
    chk("PEOPLE len", rd_rule.focus_len, 6); chk("PEOPLE f5", rd_rule.focus[5], "E");
    // [OU] = backslash at 41
    rd(41);
    chk("OU out", rd_rule.out[0], 8'h5C); chk("OU f1", rd_rule.focus[1], "U");
    // !B[B]! -> BB rule at 4
    rd(4);
    chk("BB right", rd_rule.right[0], "!"); chk("BB out", rd_rule.out[0], "2");
    // [Y] = Y is the last rule (67); 68 and 127 are empty
    rd(67); chk("Y", rd_rule.focus[0], "Y"); chk("Y len", rd_rule.focus_len, 1);
    rd(68); chk("empty 68", rd_rule.focus_len, 0);
    rd(127); chk("empty 127", rd_rule.focus_len, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
