// fp_addsub: the FFPPE arithmetic unit, a small floating point adder /
// subtractor that also multiplies.
//
// The 24-bit input register holds two 12-bit operands, A in [23:12] and B
// in [11:0], each laid out {S, E[4:0], M[5:0]}: sign, exponent biased by 15
// and fraction with a hidden leading one. Exponent 0 means zero; there are
// no subnormals, infinities or NaNs.
//
// Add / subtract follows the classic flow: the exponents are compared by
// subtraction, the borrow selects the larger operand's exponent, the
// difference right-shifts (aligns) the smaller mantissa, the ADD/SUB mux
// picks the effective operation, the mantissas are added or subtracted,
// and the result is normalised with a matching shift of the exponent. The
// alignment keeps every shifted-out bit (39-bit datapath), so the result is
// the exact sum truncated toward zero to 6 fraction bits. Multiply adds the
// exponents, multiplies the 7-bit mantissas and normalises the same way.
// Results below the smallest normal flush to signed zero; results above
// the largest saturate to exponent 31, fraction 63. Number format,
// rounding and the multiply path are this design's choices.
//
// Timing: ld captures {a, b} and op into the input register; the result is
// in the output register, with valid high for one cycle, on the next edge
// (two edges from ld to result).
module fp_addsub
  import fam_pkg::*;
#(
  parameter int unsigned EXP_W = 5,
  parameter int unsigned MAN_W = 6,
  localparam int unsigned FP_W  = 1 + EXP_W + MAN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  fp_op_e              op,
  input  logic [2*FP_W-1:0]   din,     // {A, B}
  output logic                valid,
  output logic [FP_W-1:0]     dout
);
  localparam int unsigned SIG_W = MAN_W + 1;                 // with hidden bit
  localparam int unsigned EMAX  = (1 << EXP_W) - 1;
  localparam int unsigned BIAS  = (1 << (EXP_W - 1)) - 1;
  localparam int unsigned GUARD = EMAX + 1;                  // bits kept on alignment
  localparam int unsigned ACC_W = SIG_W + GUARD + 1;         // + carry
  localparam int unsigned PRD_W = 2 * SIG_W;

  logic [2*FP_W-1:0] in_reg;
  fp_op_e            op_reg;

  // operand fields
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  assign {sa, ea, ma, sb, eb, mb} = in_reg;

  logic [SIG_W-1:0] siga, sigb;
  assign siga = {1'b1, ma};
  assign sigb = {1'b1, mb};

  // ---------------- add / subtract ----------------
  logic             sb_eff;
  logic [EXP_W:0]   ediff;          // {borrow, difference}
  logic             borrow;
  logic             swap;
  logic [EXP_W-1:0] e_big;
  logic [EXP_W-1:0] shamt;
  logic             s_big;
  logic [ACC_W-1:0] big_al, small_al, acc;
  logic             eff_sub;

  always_comb begin
    sb_eff  = sb ^ (op_reg == FP_SUB);
    ediff   = {1'b0, ea} - {1'b0, eb};
    borrow  = ediff[EXP_W];
    swap    = borrow || (ea == eb && mb > ma);
    e_big   = swap ? eb : ea;
    s_big   = swap ? sb_eff : sa;
    shamt   = borrow ? EXP_W'(-ediff[EXP_W-1:0]) : ediff[EXP_W-1:0];
    big_al   = {1'b0, (swap ? sigb : siga), GUARD'(0)};
    small_al = {1'b0, (swap ? siga : sigb), GUARD'(0)} >> shamt;
    eff_sub  = sa ^ sb_eff;
    acc      = eff_sub ? big_al - small_al : big_al + small_al;
  end

  // ---------------- multiply ----------------
  logic [PRD_W-1:0] prod;
  assign prod = siga * sigb;

  // ---------------- normalise and pack ----------------
  // Leading one position of x (width ACC_W); returns -1 for zero.
  function automatic int lead_one(logic [ACC_W-1:0] x);
    int p;
    p = -1;
    for (int i = 0; i < ACC_W; i++) if (x[i]) p = i;
    return p;
  endfunction

  logic [FP_W-1:0] result;
  logic            ld_q;

  always_comb begin
    logic [ACC_W-1:0] mant;
    logic             sign;
    int               exp_i;
    int               lo;
    int               top;       // position of the hidden bit for exp_i
    logic             is_zero;
    logic [ACC_W-1:0] norm;

    if (op_reg == FP_MUL) begin
      sign    = sa ^ sb;
      mant    = ACC_W'(prod);
      top     = PRD_W - 2;                      // 1.x * 1.x lands at bit 12
      exp_i   = int'(ea) + int'(eb) - int'(BIAS);
      is_zero = (ea == 0) || (eb == 0);
    end else begin
      sign    = s_big;
      mant    = acc;
      top     = ACC_W - 2;                      // hidden bit of the larger
      exp_i   = int'(e_big);
      is_zero = (ea == 0 && eb == 0) || (acc == '0);
      // an operand equal to zero passes the other one through
      if (!is_zero && ea == 0) begin
        sign = sb_eff; mant = {1'b0, sigb, GUARD'(0)}; exp_i = int'(eb);
      end else if (!is_zero && eb == 0) begin
        sign = sa;     mant = {1'b0, siga, GUARD'(0)}; exp_i = int'(ea);
      end
    end

    norm   = '0;
    lo     = lead_one(mant);
    exp_i  = exp_i + (lo - top);                 // shift exponent
    result = '0;
    if (is_zero || lo < 0) begin
      result = '0;
    end else if (exp_i < 1) begin
      result = {sign, {(FP_W-1){1'b0}}};         // flush to zero
    end else if (exp_i > int'(EMAX)) begin
      result = {sign, EXP_W'(EMAX), {MAN_W{1'b1}}};
    end else begin
      norm   = mant << (ACC_W - 1 - lo);         // leading one to the MSB
      result = {sign, EXP_W'(exp_i), norm[ACC_W-2 -: MAN_W]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_reg <= '0;
      op_reg <= FP_ADD;
      valid  <= 1'b0;
      dout   <= '0;
    end else begin
      valid <= 1'b0;
      if (ld) begin
        in_reg <= din;
        op_reg <= op;
      end
      if (ld_q) begin
        dout  <= result;
        valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ld_q <= 1'b0;
    else        ld_q <= ld;
endmodule
