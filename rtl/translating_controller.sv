// translating_controller: holds the group being translated and steps through
// it.
//
// When idle, and once the previous group's output has been sent (out_busy
// low), it takes a closed group from the data controller (grp_take) into its
// own registers.  For each step it sends the first untranslated character to
// find_entry (step_req, one cycle), then waits for load_translated_codes to
// report how many characters the applied rule consumed (adv_valid,
// adv_cnt) and moves the position on.  When the whole group is consumed it
// pulses group_done so the codes are sent out.  The check blocks see the
// whole group (text, len), the position (pos) and the two characters before
// the position (left_text); at the start of a group those come from the end
// of the previous group, and after reset they read as spaces.
module translating_controller
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // from the data controller
  input  logic                            grp_valid,
  input  char_t [BUF_LEN-1:0]             grp_text,
  input  logic [$clog2(BUF_LEN+1)-1:0]    grp_len,
  output logic                            grp_take,
  // from output_translated_codes
  input  logic                            out_busy,
  // to find_entry
  output logic                            step_req,
  output char_t                           step_char,
  // to the check blocks
  output char_t [BUF_LEN-1:0]             text,
  output logic [$clog2(BUF_LEN+1)-1:0]    len,
  output logic [$clog2(BUF_LEN+1)-1:0]    pos,
  output char_t [LEFT_MAX-1:0]            left_text,
  // from load_translated_codes
  input  logic                            adv_valid,
  input  logic [2:0]                      adv_cnt,
  // to output_translated_codes
  output logic                            group_done,
  output logic                            busy
);
  localparam int unsigned LW = $clog2(BUF_LEN + 1);
  localparam int unsigned PW = $clog2(BUF_LEN + 8);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_WAIT, S_FLUSH} state_t;

  state_t               state;
  char_t [LEFT_MAX-1:0] hist;   // hist[0]: last character of the previous group

  assign grp_take   = (state == S_IDLE) && grp_valid && !out_busy;
  assign step_req   = (state == S_STEP);
  assign step_char  = text[pos];
  assign group_done = (state == S_FLUSH);
  assign busy       = (state != S_IDLE);

  // Characters before the position, reaching back into the previous group.
  always_comb begin
    for (int i = 0; i < LEFT_MAX; i++) begin
      if (int'(pos) > i) left_text[i] = text[int'(pos) - 1 - i];
      else               left_text[i] = hist[i - int'(pos)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      text  <= '0;
      len   <= '0;
      pos   <= '0;
      hist  <= {LEFT_MAX{CH_SPACE}};
    end else begin
      case (state)
        S_IDLE: if (grp_take) begin
          text  <= grp_text;
          len   <= grp_len;
          pos   <= '0;
          state <= (grp_len == 0) ? S_IDLE : S_STEP;
        end
        S_STEP: state <= S_WAIT;
        S_WAIT: if (adv_valid) begin
          logic [PW-1:0] np;
          np = PW'(pos) + PW'(adv_cnt);
          if (np >= PW'(len)) begin
            pos   <= len;
            state <= S_FLUSH;
            for (int i = 0; i < LEFT_MAX; i++)
              if (int'(len) > i) hist[i] <= text[int'(len) - 1 - i];
              else               hist[i] <= hist[i - int'(len)];
          end else begin
            pos   <= LW'(np);
            state <= S_STEP;
          end
        end
        S_FLUSH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
