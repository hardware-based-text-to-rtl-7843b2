// output_translated_codes: collects the Braille codes of one group and, once
// the group is translated, sends them one by one.
//
// While collecting, each write appends wr_cnt codes (wr_codes[0] first) to a
// DEPTH-entry buffer.  group_done switches to sending: the codes leave in
// order on out_data, one per out_valid/out_ready handshake, and busy stays
// high until the last one is taken, so the next group is not started before
// its predecessor's output is gone, as the translator's description orders.
// Codes that would not fit are dropped and overflow pulses; with the rule
// table's outputs never longer than their focus, DEPTH = BUF_LEN suffices.
// The assertion below samples rst_n in its disable clause, so lint reports
// rst_n as used both asynchronously and synchronously; that is intended.
module output_translated_codes
  import braille_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  char_t [OUT_MAX-1:0] wr_codes,
  input  logic [1:0]          wr_cnt,
  input  logic                group_done,
  output logic                busy,
  output logic                out_valid,
  output char_t               out_data,
  input  logic                out_ready,
  output logic                overflow
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  char_t         mem [DEPTH];
  logic [CW-1:0] count;
  logic [CW-1:0] rptr;

  assign out_valid = busy && (rptr < count);
  assign out_data  = mem[rptr[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      count    <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (!busy) begin
        if (wr_en) begin
          logic [CW-1:0] c;
          c = count;
          for (int i = 0; i < OUT_MAX; i++) begin
            if (i < int'(wr_cnt)) begin
              if (c < CW'(DEPTH)) begin
                mem[c[$clog2(DEPTH)-1:0]] <= wr_codes[i];
                c = c + 1'b1;
              end else begin
                overflow <= 1'b1;
              end
            end
          end
          count <= c;
        end
        if (group_done) begin
          busy <= 1'b1;
          rptr <= '0;
        end
      end else if (out_valid && out_ready) begin
        if (rptr + 1'b1 == count) begin
          busy  <= 1'b0;
          count <= '0;
          rptr  <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end else if (count == 0) begin
        busy <= 1'b0;
      end
    end
  end

  // Nothing is written while a group is being sent.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !wr_en);
endmodule
