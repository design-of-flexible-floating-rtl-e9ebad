// golay_decoder: extended binary Golay (24,12) decoder.
//
// Corrects every pattern of up to three bit errors in a 24-bit word and
// flags every pattern of four errors as uncorrectable.
//
// How it works:
//  1. Syndrome. The 23-bit Golay part rx[23:1] is divided by P(x) = AE3h
//     with the same leading-one division unit the encoder uses
//     (crc_divider); the 11-bit remainder is the syndrome s.
//  2. Search over cyclic shifts. The Golay code is cyclic, so the syndrome
//     of the word rotated left by i is obtained by stepping s <- x*s mod
//     P(x), one step per cycle (i = 0..22). At each step two tests are
//     made in parallel:
//       a) weight(s) <= 3: every error lies in the 11 check positions of
//          the rotated word and the error pattern is s itself;
//       b) for each of the 12 message positions j, weight(s ^ syn_j) <= 2,
//          where syn_j is the syndrome of a single error at position 11+j:
//          one error in the message part and at most two in the check part.
//     The twelve test-(b) results are the request lines of a 12-input
//     priority encoder whose code drives a 12:1 mux over the matching error
//     patterns. Any three positions on a cycle of 23 have two within
//     distance 7, so some shift puts at least two of three errors in the
//     11-bit check window and the search always ends within 23 steps.
//  3. Correction and the extended parity bit. The pattern found is rotated
//     back and XORed into the word. If its weight w disagrees with the
//     overall parity of the 24 received bits, the parity bit was also in
//     error; w+1 errors are then reported. A total of four is flagged
//     DEC_UNCORRECTED.
//
// The decoding method (syndrome division plus shift search) is this
// design's own choice; the error-correcting power is that of the extended
// Golay code.
//
// Interface: pulse start with rx valid. done pulses for one cycle; msg,
// corrected, n_err and status then hold until the next start. Latency from
// the start edge to done: (syndrome subtractions + 1) + (search steps) + 2
// cycles, at most 12 + 1 + 23 + 2.
module golay_decoder
  import fam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cw24_t       rx,
  output logic        busy,
  output logic        done,
  output msg_t        msg,
  output cw24_t       corrected,
  output logic [2:0]  n_err,
  output dec_status_e status
);
  typedef enum logic [1:0] {S_IDLE, S_SYN, S_SEARCH, S_FIX} state_e;

  // Syndrome of a single error at bit position k of the 23-bit word.
  function automatic chk_t syn_of_bit(int k);
    logic [CW23_W-1:0] d;
    d = cw23_t'(1) << k;
    for (int b = CW23_W - 1; b >= CHK_W; b--)
      if (d[b]) d = d ^ (cw23_t'(GOLAY_POLY) << (b - CHK_W));
    return d[CHK_W-1:0];
  endfunction

  state_e     state;
  cw24_t      rx_q;
  chk_t       s_q;
  logic [4:0] step;
  cw23_t      err_q;
  logic       div_start, div_done;
  chk_t       syn;

  assign div_start = start;

  crc_divider u_syn (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (div_start),
    .dividend  (rx[CW24_W-1:1]),
    .busy      (),
    .done      (div_done),
    .remainder (syn)
  );

  // ---- tests at the current shift ----
  logic        hit_a;
  logic [11:0] hit_b;
  cw23_t       pat_b [MSG_W];
  cw23_t       pat_b_sel;
  logic [3:0]  b_code;
  cw23_t       pat_shift;
  logic        found;

  assign hit_a = ($countones(s_q) <= 3);

  for (genvar j = 0; j < MSG_W; j++) begin : g_msgpos
    localparam chk_t SYN_J = syn_of_bit(CHK_W + j);
    chk_t t;
    assign t        = s_q ^ SYN_J;
    assign hit_b[j] = ($countones(t) <= 2);
    assign pat_b[j] = (cw23_t'(1) << (CHK_W + j)) | cw23_t'(t);
  end

  prio_enc_mux #(.N(MSG_W), .W(CW23_W)) u_pick (
    .w (hit_b),
    .s (pat_b),
    .o (b_code),
    .y (pat_b_sel)
  );

  assign found     = hit_a || (b_code != 4'd0);
  assign pat_shift = hit_a ? cw23_t'(s_q) : pat_b_sel;

  // rotate a 23-bit pattern right by r (undo a left rotation by r)
  function automatic cw23_t rotr23(cw23_t v, logic [4:0] r);
    logic [2*CW23_W-1:0] w2;
    w2 = {v, v} >> r;
    return w2[CW23_W-1:0];
  endfunction

  // x * s mod P(x)
  function automatic chk_t mulx(chk_t s);
    return s[CHK_W-1] ? ((s << 1) ^ GOLAY_POLY[CHK_W-1:0]) : (s << 1);
  endfunction

  // ---- correction ----
  logic [1:0] w23;
  logic       par_rx, par_flip;
  logic [2:0] total;

  assign w23      = 2'($countones(err_q));
  assign par_rx   = ^rx_q;
  assign par_flip = (w23[0] != par_rx);
  assign total    = {1'b0, w23} + {2'b0, par_flip};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rx_q      <= '0;
      s_q       <= '0;
      step      <= '0;
      err_q     <= '0;
      done      <= 1'b0;
      corrected <= '0;
      n_err     <= '0;
      status    <= DEC_CLEAN;
    end else begin
      done <= 1'b0;
      if (start) begin
        rx_q  <= rx;
        state <= S_SYN;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_SYN:
            if (div_done) begin
              s_q   <= syn;
              step  <= '0;
              state <= S_SEARCH;
            end
          S_SEARCH:
            if (found || step == 5'(CW23_W - 1)) begin
              err_q <= found ? rotr23(pat_shift, step) : '0;
              state <= S_FIX;
            end else begin
              s_q  <= mulx(s_q);
              step <= step + 5'd1;
            end
          S_FIX: begin
            corrected <= rx_q ^ {err_q, par_flip};
            n_err     <= total;
            status    <= (total == 3'd0) ? DEC_CLEAN :
                         (total >  3'd3) ? DEC_UNCORRECTED : DEC_CORRECTED;
            done      <= 1'b1;
            state     <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != S_IDLE);
  assign msg  = corrected[CW24_W-1 -: MSG_W];

  // the search ends within one pass over the 23 cyclic shifts
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_SEARCH) |-> (step < 5'(CW23_W)));
  // a word within three errors always decodes to a codeword
  a_codeword: assert property (@(posedge clk) disable iff (!rst_n)
                               (done && status != DEC_UNCORRECTED) |-> !(^corrected));
endmodule
