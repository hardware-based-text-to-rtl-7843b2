// output_rule: walks the rule table for one entry character and presents
// the rules one at a time to the three check blocks.
//
// Started by find_entry.  On a fail it asks load_translated_codes to copy the
// character untranslated (pt_valid).  Otherwise it reads the rule at the
// entry address (FETCH: address to the look-up table, LATCH: rule arrives
// and is registered), presents it with rule_valid for one cycle (CHECK) and
// waits (WAIT) for load_translated_codes to answer rule_done (the rule was
// applied) or rule_next (a check failed), in which case it fetches the next
// rule.  A rule costs four cycles.  When the next rule belongs to another
// character (its focus does not start with the entry character) or the
// table ends, no rule matched and the character is passed through; this end
// test is this design's choice, the description only states that rules are
// tried in order until one matches.
module output_rule
  import braille_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from find_entry
  input  logic       entry_valid,
  input  logic       entry_fail,
  input  rule_addr_t entry_addr,
  input  char_t      entry_char,
  // to / from the look-up table
  output logic       lut_en,
  output rule_addr_t lut_addr,
  input  rule_t      lut_rule,
  // to the check blocks and load_translated_codes
  output logic       rule_valid,
  output rule_t      rule,
  output logic       pt_valid,
  output char_t      pt_char,
  // from load_translated_codes
  input  logic       rule_next,
  input  logic       rule_done
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LATCH, S_CHECK, S_WAIT} state_t;

  state_t     state;
  rule_addr_t addr;
  char_t      ch;

  assign lut_en     = (state == S_FETCH);
  assign lut_addr   = addr;
  assign rule_valid = (state == S_CHECK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr     <= '0;
      ch       <= '0;
      rule     <= '0;
      pt_valid <= 1'b0;
      pt_char  <= '0;
    end else begin
      pt_valid <= 1'b0;
      case (state)
        S_IDLE: if (entry_valid) begin
          if (entry_fail) begin
            pt_valid <= 1'b1;
            pt_char  <= entry_char;
          end else begin
            addr  <= entry_addr;
            ch    <= entry_char;
            state <= S_FETCH;
          end
        end
        S_FETCH: state <= S_LATCH;
        S_LATCH: begin
          if (lut_rule.focus_len == 0 || lut_rule.focus[0] != ch) begin
            pt_valid <= 1'b1;
            pt_char  <= ch;
            state    <= S_IDLE;
          end else begin
            rule  <= lut_rule;
            state <= S_CHECK;
          end
        end
        S_CHECK: state <= S_WAIT;
        S_WAIT: begin
          if (rule_done) begin
            state <= S_IDLE;
          end else if (rule_next) begin
            if (addr == rule_addr_t'(NUM_RULES - 1)) begin
              pt_valid <= 1'b1;
              pt_char  <= ch;
              state    <= S_IDLE;
            end else begin
              addr  <= addr + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
