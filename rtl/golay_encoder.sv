// golay_encoder: extended binary Golay (24,12) encoder.
//
// A 12-bit message is first made into the 23-bit Golay word: the message
// followed by the 11 check bits from the CRC division by P(x) = AE3h
// (crc_divider). This word is held in Rgt1. Its two parts, the 11 check
// bits (L, padded with a zero to 12 bits) and the 12 message bits (M), go
// through the weight units Wei1 and Wei2 and their sum is held in Rgt2. The
// LSB of that weight, i.e. the parity of the 23-bit word, selects between
// Rgt1' = {Rgt1, 1} and Rgt1'' = {Rgt1, 0}, so the final 24-bit word in Rgt3
// always has even weight.
//
// Output layout: codeword[23:12] message, [11:1] check bits, [0] parity.
//
// Timing: the edge that samples start (with msg) loads the divider, which
// then needs one cycle per modulo-2 subtraction plus one; Rgt1, Rgt2 and
// Rgt3 are loaded on the three following edges and valid pulses with Rgt3.
// valid is therefore high after the (subtractions + 4)-th edge following
// the start edge, at most 16. busy is high from start until valid. A
// start while busy is ignored.
module golay_encoder
  import fam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  msg_t  msg,
  output logic  busy,
  output logic  valid,
  output cw24_t codeword
);
  msg_t       msg_q;
  logic       div_start, div_done;
  chk_t       chk;
  cw23_t      rgt1, rgt1_d;
  logic [4:0] rgt2;
  logic       v1, v2;
  logic [3:0] wei1, wei2;

  assign div_start = start && !busy;

  crc_divider u_cbg (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (div_start),
    .dividend  ({msg, {CHK_W{1'b0}}}),
    .busy      (),
    .done      (div_done),
    .remainder (chk)
  );

  weight12 u_wei1 (.din({1'b0, rgt1[CHK_W-1:0]}), .weight(wei1));   // L
  weight12 u_wei2 (.din(rgt1[CW23_W-1:CHK_W]),    .weight(wei2));   // M

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_q    <= '0;
      busy     <= 1'b0;
      rgt1     <= '0;
      rgt1_d   <= '0;
      rgt2     <= '0;
      v1       <= 1'b0;
      v2       <= 1'b0;
      valid    <= 1'b0;
      codeword <= '0;
    end else begin
      if (div_start) begin
        msg_q <= msg;
        busy  <= 1'b1;
      end
      // Rgt1: 23-bit Golay word
      v1 <= div_done;
      if (div_done) rgt1 <= {msg_q, chk};
      // Rgt2: weight of L plus weight of M
      v2 <= v1;
      if (v1) begin
        rgt2   <= {1'b0, wei1} + {1'b0, wei2};
        rgt1_d <= rgt1;
      end
      // Rgt3: LSB of the weight picks Rgt1' (parity 1) or Rgt1'' (parity 0)
      valid <= v2;
      if (v2) begin
        codeword <= rgt2[0] ? {rgt1_d, 1'b1} : {rgt1_d, 1'b0};
        busy     <= 1'b0;
      end
    end
  end

  // every codeword leaves with even weight
  a_even: assert property (@(posedge clk) disable iff (!rst_n) valid |-> !(^codeword));
endmodule
