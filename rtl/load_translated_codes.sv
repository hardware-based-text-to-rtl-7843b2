// load_translated_codes: decides on the rule under test and loads the
// translation.
//
// One cycle after rule_valid it answers output_rule: if the focus, left
// context and right context checks all passed, it pulses rule_done, writes
// the rule's output codes (wr_en, wr_codes, wr_cnt) to
// output_translated_codes and tells the translating controller how many text
// characters were translated (adv_valid, adv_cnt = focus length).  If any
// check failed it pulses rule_next instead.  A pass-through request (pt_valid)
// writes the character itself and advances by one.  All outputs are
// registered single-cycle pulses.
module load_translated_codes
  import braille_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rule_valid,
  input  rule_t               rule,
  input  logic                focus_ok,
  input  logic                right_ok,
  input  logic                left_ok,
  input  logic                pt_valid,
  input  char_t               pt_char,
  output logic                rule_next,
  output logic                rule_done,
  output logic                wr_en,
  output char_t [OUT_MAX-1:0] wr_codes,
  output logic [1:0]          wr_cnt,
  output logic                adv_valid,
  output logic [2:0]          adv_cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rule_next <= 1'b0;
      rule_done <= 1'b0;
      wr_en     <= 1'b0;
      wr_codes  <= '0;
      wr_cnt    <= '0;
      adv_valid <= 1'b0;
      adv_cnt   <= '0;
    end else begin
      rule_next <= 1'b0;
      rule_done <= 1'b0;
      wr_en     <= 1'b0;
      adv_valid <= 1'b0;
      if (rule_valid) begin
        if (focus_ok && right_ok && left_ok) begin
          rule_done <= 1'b1;
          wr_en     <= (rule.out_len != 0);
          wr_codes  <= rule.out;
          wr_cnt    <= rule.out_len;
          adv_valid <= 1'b1;
          adv_cnt   <= rule.focus_len;
        end else begin
          rule_next <= 1'b1;
        end
      end else if (pt_valid) begin
        wr_en     <= 1'b1;
        wr_codes  <= '0;
        wr_codes[0] <= pt_char;
        wr_cnt    <= 2'd1;
        adv_valid <= 1'b1;
        adv_cnt   <= 3'd1;
      end
    end
  end
endmodule
