// data_controller: collects incoming text characters into a group of words
// and hands the group to the translating block.
//
// Every received byte is folded to upper case and appended to the collect
// buffer.  The translator works on a group of WORDS_PER_GROUP words: the
// group is closed when the WORDS_PER_GROUP-th space arrives.  It is also
// closed early by a line end (CR or LF) or when the buffer is full, so that
// a short last line or an overlong word is still translated; those two
// triggers are this design's choice.  The closing character is part of the
// group.
//
// Interface: grp_valid stays high with grp_text/grp_len until the
// translating controller pulses grp_take, which copies the group into its own
// registers; the buffer is then free for the next group at once (a byte
// arriving in the same cycle as grp_take starts the new group).  A byte that
// arrives while a closed group is still waiting is dropped and overflow
// pulses for one cycle.
module data_controller
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN         = 64,
  parameter int unsigned WORDS_PER_GROUP = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  char_t                      in_data,
  output logic                       grp_valid,
  output char_t [BUF_LEN-1:0]        grp_text,
  output logic [$clog2(BUF_LEN+1)-1:0] grp_len,
  input  logic                       grp_take,
  output logic                       overflow
);
  localparam int unsigned LW = $clog2(BUF_LEN + 1);
  localparam int unsigned WW = $clog2(WORDS_PER_GROUP + 1);

  logic [WW-1:0] words;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_valid <= 1'b0;
      grp_text  <= '0;
      grp_len   <= '0;
      words     <= '0;
      overflow  <= 1'b0;
    end else begin
      logic [LW-1:0] len_v;
      logic [WW-1:0] words_v;
      logic          pend_v;
      char_t         c;
      len_v    = grp_len;
      words_v  = words;
      pend_v   = grp_valid;
      overflow <= 1'b0;
      if (grp_take) begin
        len_v   = '0;
        words_v = '0;
        pend_v  = 1'b0;
      end
      if (in_valid) begin
        if (pend_v) begin
          overflow <= 1'b1;
        end else begin
          c = to_upper(in_data);
          grp_text[len_v] <= c;
          len_v = len_v + 1'b1;
          if (c == CH_SPACE) words_v = words_v + 1'b1;
          if ((words_v == WW'(WORDS_PER_GROUP)) || (c == CH_CR) || (c == CH_LF) ||
              (len_v == LW'(BUF_LEN)))
            pend_v = 1'b1;
        end
      end
      grp_len   <= len_v;
      words     <= words_v;
      grp_valid <= pend_v;
    end
  end
endmodule
