// max_select: picks the largest of six registered 12-bit values.
//
// The six inputs R1, R2, R3, R4, R6 and R8 are captured when ld is high.
// Multiplexers pair them as (R1,R2), (R6,R8) and (R3,R4); a comparator on
// each pair keeps the larger, and two more comparator stages reduce the
// three winners to the overall largest. The value goes to the output
// register R3_out and its position (0 = R1, 1 = R2, 2 = R3, 3 = R4, 4 = R6,
// 5 = R8) to the 3-bit output O. A priority encoder also codes the 12-bit
// R3_out into 4 bits, pe = position of its most significant one (1..12, 0
// when R3_out is zero). On equal values the control input p decides: p = 0
// keeps the earlier input of a pair, p = 1 the later one.
// The input names, widths, pairing and the 3-bit O follow the schematic;
// the tie rule for p and the position encoding are this design's choices.
//
// Timing: ld on one edge, R3_out / O / pe / valid on the next (valid
// pulses); pe is decoded from the R3_out register.
module max_select #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic         p,
  input  logic [W-1:0] r1, r2, r3, r4, r6, r8,
  output logic         valid,
  output logic [W-1:0] r3_out,
  output logic [2:0]   o,
  output logic [3:0]   pe
);
  typedef struct packed {
    logic [W-1:0] v;
    logic [2:0]   idx;
  } cand_t;

  cand_t in_q [6];
  logic  ld_q;

  // comparator + mux: larger of x and y, tie resolved by p
  function automatic cand_t pick(cand_t x, cand_t y, logic pri);
    if (x.v > y.v)      return x;
    else if (y.v > x.v) return y;
    else                return pri ? y : x;
  endfunction

  cand_t w12, w68, w34, w_a, w_all;
  always_comb begin
    w12   = pick(in_q[0], in_q[1], p);
    w68   = pick(in_q[4], in_q[5], p);
    w34   = pick(in_q[2], in_q[3], p);
    w_a   = pick(w12, w34, p);
    w_all = pick(w_a, w68, p);
  end

  // priority encoder on the selected value; its mux output is not needed
  logic       pe_sel [W];
  logic       pe_unused;
  for (genvar i = 0; i < W; i++) begin : g_pe
    assign pe_sel[i] = 1'b1;
  end

  prio_enc_mux #(.N(W), .W(1)) u_pe (
    .w (r3_out),
    .s (pe_sel),
    .o (pe),
    .y (pe_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) in_q[i] <= '{v: '0, idx: 3'(i)};
      ld_q   <= 1'b0;
      valid  <= 1'b0;
      r3_out <= '0;
      o      <= '0;
    end else begin
      ld_q  <= ld;
      valid <= ld_q;
      if (ld) begin
        in_q[0] <= '{v: r1, idx: 3'd0};
        in_q[1] <= '{v: r2, idx: 3'd1};
        in_q[2] <= '{v: r3, idx: 3'd2};
        in_q[3] <= '{v: r4, idx: 3'd3};
        in_q[4] <= '{v: r6, idx: 3'd4};
        in_q[5] <= '{v: r8, idx: 3'd5};
      end
      if (ld_q) begin
        r3_out <= w_all.v;
        o      <= w_all.idx;
      end
    end
  end
endmodule
