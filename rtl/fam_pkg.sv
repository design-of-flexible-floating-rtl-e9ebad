// fam_pkg: constants and types shared by the fingerprint authentication
// model and its Golay error-correction path.
//
// The (23,12) Golay code uses the generator polynomial
// P(x) = x^11 + x^9 + x^7 + x^6 + x^5 + x + 1 (AE3h), and the codeword is
// extended to 24 bits with an even-parity bit. Codeword bit layout used
// everywhere: [23:12] message, [11:1] check bits, [0] parity bit.
package fam_pkg;
  localparam int unsigned  MSG_W    = 12;             // message bits
  localparam int unsigned  CHK_W    = 11;             // CRC check bits
  localparam int unsigned  CW23_W   = MSG_W + CHK_W;  // perfect Golay word
  localparam int unsigned  CW24_W   = CW23_W + 1;     // extended Golay word
  localparam logic [11:0]  GOLAY_POLY = 12'hAE3;

  typedef logic [MSG_W-1:0]  msg_t;
  typedef logic [CHK_W-1:0]  chk_t;
  typedef logic [CW23_W-1:0] cw23_t;
  typedef logic [CW24_W-1:0] cw24_t;

  // Decoder verdict.
  typedef enum logic [1:0] {
    DEC_CLEAN       = 2'd0,  // no error found
    DEC_CORRECTED   = 2'd1,  // 1..3 errors corrected
    DEC_UNCORRECTED = 2'd2   // 4 errors detected, word not trusted
  } dec_status_e;

  // FFPPE arithmetic operations.
  typedef enum logic [1:0] {
    FP_ADD = 2'd0,
    FP_SUB = 2'd1,
    FP_MUL = 2'd2
  } fp_op_e;
endpackage
