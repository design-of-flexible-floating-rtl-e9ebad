// crc_divider: check-bit generator by modulo-2 (CRC) long division.
//
// Divides a 23-bit dividend by the Golay generator P(x) = AE3h and returns
// the 11-bit remainder. For encoding, the dividend is the 12-bit message
// followed by 11 zeros and the remainder is the check-bit field; for
// decoding, the dividend is the received 23-bit word and the remainder is
// its syndrome.
//
// Each cycle a priority encoder looks at the 12 upper dividend bits, finds
// the leading one and a 12:1 mux picks P(x) shifted to line up with it; the
// XOR (the modulo-2 subtraction) clears that bit. Runs of leading zeros are
// skipped in one step, so the number of cycles equals the number of
// subtractions (at most 12) plus one final cycle that sees the upper bits
// all zero and signals done.
//
// Interface: pulse start with dividend valid; busy is high while dividing;
// done pulses for one cycle with remainder valid (it holds until the next
// start). done is high after the (subtractions + 1)-th edge following the
// edge that samples start. A start while busy restarts the division.
module crc_divider
  import fam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cw23_t       dividend,
  output logic        busy,
  output logic        done,
  output chk_t        remainder
);
  localparam int unsigned N = MSG_W;   // leading-one positions W1..W12

  cw23_t      d_q;
  cw23_t      shifted [N];
  cw23_t      sub;
  logic [3:0] lead;

  // S(i) = P(x) aligned so that its x^11 term sits on dividend bit 11+i
  for (genvar i = 0; i < N; i++) begin : g_shift
    assign shifted[i] = cw23_t'(GOLAY_POLY) << i;
  end

  prio_enc_mux #(.N(N), .W(CW23_W)) u_pbe (
    .w (d_q[CW23_W-1 -: N]),
    .s (shifted),
    .o (lead),
    .y (sub)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d_q  <= dividend;
        busy <= 1'b1;
      end else if (busy) begin
        if (lead != 4'd0) begin
          d_q <= d_q ^ sub;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign remainder = d_q[CHK_W-1:0];

  logic start_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= start;

  // done is the last cycle of a division: the unit is idle again
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  // once no leading one is left, done follows on the next edge
  a_done_follows: assert property (@(posedge clk) disable iff (!rst_n)
                                        (busy && lead == 4'd0) |=> (done || start_q));
endmodule
