// translating_block: the eight sub-blocks that translate one group of text.
//
// translating_controller steps through the group; find_entry turns the
// first untranslated character into a rule address; output_rule fetches the
// rules of that character from the (external) look-up table one at a time;
// focus_check, right_context_check and left_context_check test each rule
// concurrently; load_translated_codes applies the first rule that passes all
// three, or asks for the next one; output_translated_codes collects the
// codes and sends them out when the group is done.  The block structure and
// connections follow the translator's block diagram.
//
// Timing: a character costs 2 cycles (step, entry lookup) plus 4 cycles per
// rule tried, plus one cycle per pass-through; a group adds one flush cycle.
module translating_block
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // group from the data controller
  input  logic                         grp_valid,
  input  char_t [BUF_LEN-1:0]          grp_text,
  input  logic [$clog2(BUF_LEN+1)-1:0] grp_len,
  output logic                         grp_take,
  // look-up table read port
  output logic                         lut_en,
  output rule_addr_t                   lut_addr,
  input  rule_t                        lut_rule,
  // Braille ASCII output
  output logic                         out_valid,
  output char_t                        out_data,
  input  logic                         out_ready,
  output logic                         busy,
  output logic                         out_overflow
);
  localparam int unsigned LW = $clog2(BUF_LEN + 1);
  localparam int unsigned EW = $clog2(BUF_LEN + FOCUS_MAX + 1);

  logic                 step_req, entry_valid, entry_fail;
  char_t                step_char, entry_char, pt_char;
  rule_addr_t           entry_addr;
  char_t [BUF_LEN-1:0]  text;
  logic [LW-1:0]        len, pos;
  char_t [LEFT_MAX-1:0] left_text;
  logic                 rule_valid, pt_valid, rule_next, rule_done;
  rule_t                rule;
  logic                 focus_ok, right_ok, left_ok;
  logic [EW-1:0]        focus_end;
  logic                 wr_en, adv_valid, group_done, tc_busy, out_busy;
  char_t [OUT_MAX-1:0]  wr_codes;
  logic [1:0]           wr_cnt;
  logic [2:0]           adv_cnt;

  assign busy = tc_busy || out_busy;

  translating_controller #(.BUF_LEN(BUF_LEN)) u_tc (
    .clk, .rst_n, .grp_valid, .grp_text, .grp_len, .grp_take, .out_busy,
    .step_req, .step_char, .text, .len, .pos, .left_text,
    .adv_valid, .adv_cnt, .group_done, .busy(tc_busy));

  find_entry u_fe (
    .clk, .rst_n, .step_req, .step_char,
    .entry_valid, .entry_fail, .entry_addr, .entry_char);

  output_rule u_or (
    .clk, .rst_n, .entry_valid, .entry_fail, .entry_addr, .entry_char,
    .lut_en, .lut_addr, .lut_rule, .rule_valid, .rule, .pt_valid, .pt_char,
    .rule_next, .rule_done);

  focus_check #(.BUF_LEN(BUF_LEN)) u_fc (
    .rule, .text, .len, .pos, .focus_ok, .focus_end);

  right_context_check #(.BUF_LEN(BUF_LEN)) u_rc (
    .rule, .text, .len, .focus_end, .right_ok);

  left_context_check u_lc (.rule, .left_text, .left_ok);

  load_translated_codes u_ltc (
    .clk, .rst_n, .rule_valid, .rule, .focus_ok, .right_ok, .left_ok,
    .pt_valid, .pt_char, .rule_next, .rule_done,
    .wr_en, .wr_codes, .wr_cnt, .adv_valid, .adv_cnt);

  output_translated_codes #(.DEPTH(BUF_LEN)) u_otc (
    .clk, .rst_n, .wr_en, .wr_codes, .wr_cnt, .group_done, .busy(out_busy),
    .out_valid, .out_data, .out_ready, .overflow(out_overflow));
endmodule
