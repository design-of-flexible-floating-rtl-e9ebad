// fam_top: integrated FFPPE and fingerprint authentication model.
//
// Two parts stand side by side:
//  - The authentication chain. A data byte arrives with in_valid, which is
//    also the hit of the time stamp generator (A2); the delay-line taps
//    sampled by that hit come in on tdl_taps. When the time stamp is ready
//    the error-correction stage (EC1) keys the byte with the random number
//    (rng_lfsr) and the time stamp and sends its extended Golay codeword
//    out on tx_codeword. The word that comes back over the link on
//    rx_codeword is decoded and un-keyed to decoded_bits, which the
//    verification stage (A5) matches against the enrolled templates.
//  - The FFPPE arithmetic unit (fp_addsub) with its own ports.
// The tapped delay line is a physical carry-chain structure and is not
// part of this RTL: its sampled outputs are the tdl_taps port.
//
// Timing of one authentication: in_valid -> ts (2 cycles) -> tx_valid
// (at most 17 more) ; rx_valid -> dec_valid (at most 38) -> auth_valid
// (2 more). The random number generator runs every cycle and can be
// seeded through rng_load / rng_seed.
module fam_top
  import fam_pkg::*;
#(
  parameter int unsigned CELLS     = 192,
  parameter int unsigned COARSE_W  = 16,
  parameter int unsigned THRESHOLD = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  // fingerprint data in
  input  logic             in_valid,
  input  logic [7:0]       in_data,
  input  logic [CELLS-1:0] tdl_taps,
  input  logic             rng_load,
  input  logic [39:0]      rng_seed,
  output logic [39:0]      timestamp,
  // link
  output logic             tx_valid,
  output cw24_t            tx_codeword,
  input  logic             rx_valid,
  input  cw24_t            rx_codeword,
  // decoded data and error report
  output logic             dec_valid,
  output logic [7:0]       decoded_bits,
  output logic [7:0]       ec_out,
  // enrolment
  input  logic             enroll_we,
  input  logic [2:0]       enroll_idx,
  input  logic [7:0]       enroll_data,
  input  logic [7:0]       enroll_user,
  // verdict
  output logic             auth_valid,
  output logic [7:0]       authenticated_user,
  output logic [7:0]       index,
  output logic [7:0]       out,
  output logic             authentication_status,
  // FFPPE arithmetic unit
  input  logic             fp_ld,
  input  fp_op_e           fp_op,
  input  logic [23:0]      fp_din,
  output logic             fp_valid,
  output logic [11:0]      fp_dout
);
  logic                ts_valid;
  logic [39:0]         num;
  logic [7:0]          data_q;

  // the byte waits here while its time stamp is formed
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        data_q <= '0;
    else if (in_valid) data_q <= in_data;
  end

  time_stamp_generator #(.CELLS(CELLS), .COARSE_W(COARSE_W), .TS_W(40)) u_a2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .hit       (in_valid),
    .taps      (tdl_taps),
    .ts_valid  (ts_valid),
    .timestamp (timestamp),
    .coarse    ()
  );

  rng_lfsr u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .load  (rng_load),
    .seed  (rng_seed),
    .num   (num)
  );

  error_correction u_ec1 (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (ts_valid),
    .in_data      (data_q),
    .num          (num),
    .timestamp    (timestamp),
    .tx_valid     (tx_valid),
    .tx_codeword  (tx_codeword),
    .rx_valid     (rx_valid),
    .rx_codeword  (rx_codeword),
    .dec_valid    (dec_valid),
    .decoded_bits (decoded_bits),
    .out          (ec_out)
  );

  verification #(.SLOTS(6), .THRESHOLD(THRESHOLD)) u_a5 (
    .clk                   (clk),
    .rst_n                 (rst_n),
    .enroll_we             (enroll_we),
    .enroll_idx            (enroll_idx),
    .enroll_data           (enroll_data),
    .enroll_user           (enroll_user),
    .check                 (dec_valid),
    .decoded_bits          (decoded_bits),
    .auth_valid            (auth_valid),
    .authenticated_user    (authenticated_user),
    .index                 (index),
    .out                   (out),
    .authentication_status (authentication_status)
  );

  fp_addsub u_ffppe (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (fp_ld),
    .op    (fp_op),
    .din   (fp_din),
    .valid (fp_valid),
    .dout  (fp_dout)
  );
endmodule
