// find_entry: maps the entry character (the first untranslated character of
// the text) to the address of the first rule of its group.
//
// A 256-entry table, computed at elaboration from the rule table, holds for
// every character whether any rule starts with it and the address of the
// first such rule.  One cycle after step_req, entry_valid pulses with
// entry_addr, or with entry_fail set when the character has no rules, in
// which case it is copied to the output untranslated.  entry_char repeats
// the looked-up character alongside the result.
module find_entry
  import braille_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step_req,
  input  char_t      step_char,
  output logic       entry_valid,
  output logic       entry_fail,
  output rule_addr_t entry_addr,
  output char_t      entry_char
);
  localparam entry_table_t ENTRIES = build_entries(build_rules());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entry_valid <= 1'b0;
      entry_fail  <= 1'b0;
      entry_addr  <= '0;
      entry_char  <= '0;
    end else begin
      entry_valid <= step_req;
      if (step_req) begin
        entry_fail <= !ENTRIES[step_char].present;
        entry_addr <= ENTRIES[step_char].addr;
        entry_char <= step_char;
      end
    end
  end
endmodule
