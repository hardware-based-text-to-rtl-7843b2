// look_up_table: the translation rule table.
//
// A read-only memory of NUM_RULES rules (braille_pkg::rule_t), one rule per
// word, with a synchronous read port: the rule at rd_addr appears on rd_rule
// one clock after rd_en.  The contents are computed at elaboration by
// braille_pkg::build_rules; the rule format and ordering follow the
// translator's description, the rules themselves are this design's subset of
// English grade-2 contractions.
module look_up_table
  import braille_pkg::*;
(
  input  logic       clk,
  input  logic       rd_en,
  input  rule_addr_t rd_addr,
  output rule_t      rd_rule
);
  localparam rule_table_t ROM = build_rules();

  always_ff @(posedge clk) begin
    if (rd_en) rd_rule <= ROM[rd_addr];
  end
endmodule
