// error_correction: the EC1 stage of the authentication model.
//
// Protects one fingerprint data byte over a noisy link with the extended
// Golay (24,12) code.
//  - Transmit side: start (normally the time stamp's valid pulse) latches
//    the byte in_data, the random number num and the time stamp. A key byte
//    key = num[7:0] ^ timestamp[7:0] is formed and the keyed byte
//    in_data ^ key, with four zero bits above it, is the 12-bit message
//    given to golay_encoder. The 24-bit codeword leaves on tx_codeword with
//    a one-cycle tx_valid.
//  - Receive side: rx_valid with rx_codeword starts golay_decoder. When it
//    finishes, the key is removed again and the byte appears on
//    decoded_bits with a one-cycle dec_valid. out reports the verdict:
//    out[2:0] number of corrected errors, out[3] message pad bits nonzero
//    after decoding, out[5:4] decoder status (fam_pkg::dec_status_e),
//    out[7:6] zero.
// The block's ports follow the EC1 symbol (In, num, timestamp, clk,
// decoded_bits, out); the keying, the message layout and the meaning of out
// are this design's choices. The key is held until the next start, so one
// byte is in flight at a time.
module error_correction
  import fam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  in_data,
  input  logic [39:0] num,
  input  logic [39:0] timestamp,
  output logic        tx_valid,
  output cw24_t       tx_codeword,
  input  logic        rx_valid,
  input  cw24_t       rx_codeword,
  output logic        dec_valid,
  output logic [7:0]  decoded_bits,
  output logic [7:0]  out
);
  logic [7:0]  key_q;
  logic [7:0]  key;
  logic        enc_busy, dec_done;
  msg_t        dec_msg;
  logic [2:0]  n_err;
  dec_status_e status;

  assign key = num[7:0] ^ timestamp[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     key_q <= '0;
    else if (start) key_q <= key;
  end

  golay_encoder u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .msg      ({4'b0000, in_data ^ key}),
    .busy     (enc_busy),
    .valid    (tx_valid),
    .codeword (tx_codeword)
  );

  golay_decoder u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (rx_valid),
    .rx        (rx_codeword),
    .busy      (),
    .done      (dec_done),
    .msg       (dec_msg),
    .corrected (),
    .n_err     (n_err),
    .status    (status)
  );

  assign dec_valid    = dec_done;
  assign decoded_bits = dec_msg[7:0] ^ key_q;
  assign out          = {2'b00, status, (dec_msg[11:8] != 4'd0), n_err};

  // one byte in flight: a new start must not arrive while encoding
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) start |-> !enc_busy);
endmodule
