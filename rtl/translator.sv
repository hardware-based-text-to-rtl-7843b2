// translator: the text-to-Braille translator: data controller, rule
// look-up table and translating block.
//
// Text bytes (ASCII) enter on in_valid/in_data, one per cycle at most, and
// are gathered by the data controller into groups of WORDS_PER_GROUP words.
// Each group is translated by the translating block against the rule table
// and the resulting Braille ASCII codes leave on out_valid/out_data with an
// out_ready handshake.  in_overflow pulses when a byte is lost because the
// previous group is still waiting; out_overflow when a code does not fit the
// output buffer.  The partitioning follows the translator's block diagram.
module translator
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN         = 64,
  parameter int unsigned WORDS_PER_GROUP = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  char_t in_data,
  output logic  out_valid,
  output char_t out_data,
  input  logic  out_ready,
  output logic  busy,
  output logic  in_overflow,
  output logic  out_overflow
);
  localparam int unsigned LW = $clog2(BUF_LEN + 1);

  logic                grp_valid, grp_take, lut_en;
  char_t [BUF_LEN-1:0] grp_text;
  logic [LW-1:0]       grp_len;
  rule_addr_t          lut_addr;
  rule_t               lut_rule;

  data_controller #(.BUF_LEN(BUF_LEN), .WORDS_PER_GROUP(WORDS_PER_GROUP)) u_dc (
    .clk, .rst_n, .in_valid, .in_data, .grp_valid, .grp_text, .grp_len, .grp_take,
    .overflow(in_overflow));

  look_up_table u_lut (.clk, .rd_en(lut_en), .rd_addr(lut_addr), .rd_rule(lut_rule));

  translating_block #(.BUF_LEN(BUF_LEN)) u_tb (
    .clk, .rst_n, .grp_valid, .grp_text, .grp_len, .grp_take,
    .lut_en, .lut_addr, .lut_rule,
    .out_valid, .out_data, .out_ready, .busy, .out_overflow);
endmodule
