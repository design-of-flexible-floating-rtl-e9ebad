// verification: the A5 fingerprint matching stage.
//
// Holds up to six enrolled templates (an 8-bit feature byte and an 8-bit
// user number per slot), written through the enroll port. When check is
// high, the decoded byte is scored against every valid slot: score =
// 8 - Hamming distance (0 for an empty slot). The six scores go to
// max_select, which returns the best score and its slot. The user is
// authenticated when the best score reaches THRESHOLD; a lower threshold
// accepts more (higher false acceptance, lower false rejection).
// Outputs: authenticated_user is the slot's user number (0 when rejected),
// index the winning slot, out the best score, authentication_status the
// verdict; auth_valid pulses with them.
// The ports follow the A5 symbol; the template store, the score and the
// threshold are this design's choices.
//
// Timing: check on one edge, results two edges later.
module verification #(
  parameter int unsigned SLOTS     = 6,
  parameter int unsigned THRESHOLD = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enroll_we,
  input  logic [2:0] enroll_idx,
  input  logic [7:0] enroll_data,
  input  logic [7:0] enroll_user,
  input  logic       check,
  input  logic [7:0] decoded_bits,
  output logic       auth_valid,
  output logic [7:0] authenticated_user,
  output logic [7:0] index,
  output logic [7:0] out,
  output logic       authentication_status
);
  typedef struct packed {
    logic       used;
    logic [7:0] feat;
    logic [7:0] user;
  } slot_t;

  slot_t       slot_q [SLOTS];
  logic [11:0] score [6];
  logic [11:0] best;
  logic [2:0]  best_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) slot_q[i] <= '0;
    end else if (enroll_we && 32'(enroll_idx) < SLOTS) begin
      slot_q[enroll_idx] <= '{used: 1'b1, feat: enroll_data, user: enroll_user};
    end
  end

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      score[i] = '0;
      if (i < int'(SLOTS) && slot_q[i].used)
        score[i] = 12'(8 - $countones(decoded_bits ^ slot_q[i].feat));
    end
  end

  max_select #(.W(12)) u_max (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld     (check),
    .p      (1'b0),
    .r1     (score[0]),
    .r2     (score[1]),
    .r3     (score[2]),
    .r4     (score[3]),
    .r6     (score[4]),
    .r8     (score[5]),
    .valid  (auth_valid),
    .r3_out (best),
    .o      (best_idx),
    .pe     ()
  );

  assign authentication_status = (best >= 12'(THRESHOLD)) && (best != 12'd0);
  assign authenticated_user    = authentication_status ? slot_q[best_idx].user : 8'd0;
  assign index                 = {5'd0, best_idx};
  assign out                   = best[7:0];
endmodule
