// focus_check: does the rule's focus match the text at the current position?
//
// Combinational.  Compares focus character i with text character pos+i for
// every i below the focus length; a focus that runs past the end of the
// group does not match.  focus_end (pos + focus length) tells the right
// context check where the right context starts.  The block receives the
// whole group because a focus can span several characters, as described for
// the translator; the comparison network is this design's own.
module focus_check
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN = 64
) (
  input  rule_t                          rule,
  input  char_t [BUF_LEN-1:0]            text,
  input  logic [$clog2(BUF_LEN+1)-1:0]   len,
  input  logic [$clog2(BUF_LEN+1)-1:0]   pos,
  output logic                           focus_ok,
  output logic [$clog2(BUF_LEN+FOCUS_MAX+1)-1:0] focus_end
);
  localparam int unsigned EW = $clog2(BUF_LEN + FOCUS_MAX + 1);

  always_comb begin
    focus_ok  = (rule.focus_len != 0);
    focus_end = EW'(pos) + EW'(rule.focus_len);
    for (int i = 0; i < FOCUS_MAX; i++) begin
      if (i < int'(rule.focus_len)) begin
        if ((EW'(pos) + EW'(i)) >= EW'(len)) focus_ok = 1'b0;
        else if (text[EW'(pos) + EW'(i)] != rule.focus[i]) focus_ok = 1'b0;
      end
    end
  end
endmodule
