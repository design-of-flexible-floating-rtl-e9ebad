// tb_fam_top: end-to-end run of the authentication model at its default
// sizes (192-cell delay line, 16-bit coarse counter), with the FFPPE unit
// exercised alongside.
//
// Six users are enrolled. Each transaction presents a byte with a hit and
// a sampled delay-line code, checks the time stamp, checks that the
// transmitted word is a Golay codeword of the keyed byte, sends it back
// with 0..4 bit errors (some on the parity bit) and checks the decoded
// byte, the error report and the authentication verdict. Every mechanism
// is counted and a mechanism that never occurred is a failure.
module tb_fam_top;
  import tb_ref_pkg::*;
  import fam_pkg::*;
  localparam int CELLS = 192;

  logic             clk = 0, rst_n = 0;
  logic             in_valid = 0;
  logic [7:0]       in_data = '0;
  logic [CELLS-1:0] tdl_taps = '0;
  logic             rng_load = 0;
  logic [39:0]      rng_seed = '0;
  logic [39:0]      timestamp;
  logic             tx_valid;
  cw24_t            tx_codeword;
  logic             rx_valid = 0;
  cw24_t            rx_codeword = '0;
  logic             dec_valid;
  logic [7:0]       decoded_bits, ec_out;
  logic             enroll_we = 0;
  logic [2:0]       enroll_idx = '0;
  logic [7:0]       enroll_data = '0, enroll_user = '0;
  logic             auth_valid, authentication_status;
  logic [7:0]       authenticated_user, index, out;
  logic             fp_ld = 0;
  fp_op_e           fp_op = FP_ADD;
  logic [23:0]      fp_din = '0;
  logic             fp_valid;
  logic [11:0]      fp_dout;

  fam_top dut (.*);

  always #2 clk = ~clk;
  longint edges = 0;
  always @(posedge clk) if (rst_n) edges++;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_clean = 0, n_corr1 = 0, n_corr2 = 0, n_corr3 = 0, n_parity = 0, n_detect4 = 0;
  int n_accept = 0, n_reject = 0, n_keyed = 0, n_bubble = 0, n_wrap = 0;
  int n_fadd = 0, n_fsub = 0, n_fmul = 0, n_fsat = 0, n_fflush = 0;

  logic [7:0] tmpl [6];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic transaction(logic [7:0] d, int nerr, bit hit_parity, int gap);
    int n;
    longint c_at_hit;
    logic [23:0] e;
    logic [11:0] m;
    int best, bi;
    repeat (gap + 1) @(negedge clk);
    // hit with a delay-line code
    n = int'($urandom % (CELLS + 1));
    tdl_taps = '0;
    for (int i = 0; i < n; i++) tdl_taps[i] = 1'b1;
    if (n > 2 && n < CELLS && $urandom % 4 == 0) begin
      tdl_taps[n-2] = 0; tdl_taps[n] = 1; n_bubble++;
    end
    in_data  = d;
    in_valid = 1;
    c_at_hit = edges % 65536;
    if (edges >= 65536) n_wrap++;
    @(negedge clk);
    in_valid = 0;
    in_data  = '0;       // the byte is only valid with its hit
    tdl_taps = '0;
    @(negedge clk);
    check("timestamp", timestamp, c_at_hit * CELLS + n);
    // transmitted word
    while (!tx_valid) begin @(posedge clk); #1; end
    m = tx_codeword[23:12];
    check("tx is a codeword", tx_codeword, golay24_ref(m));
    check("tx pad", m[11:8], 0);
    if (m[7:0] != d) n_keyed++;
    // channel
    e = '0;
    if (hit_parity && nerr > 0) e[0] = 1'b1;
    while ($countones(e) < nerr) e[$urandom % 24] = 1'b1;
    @(negedge clk);
    rx_codeword = tx_codeword ^ e;
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    while (!dec_valid) begin @(posedge clk); #1; end
    if (nerr <= 3) begin
      check("decoded", decoded_bits, d);
      check("n_err", ec_out[2:0], nerr);
      case (nerr)
        0: n_clean++;
        1: n_corr1++;
        2: n_corr2++;
        default: n_corr3++;
      endcase
      if (e[0]) n_parity++;
    end else begin
      check("4 errors flagged", ec_out[5:4], DEC_UNCORRECTED);
      n_detect4++;
    end
    // verdict
    while (!auth_valid) begin @(posedge clk); #1; end
    if (nerr <= 3) begin
      best = 0; bi = 0;
      for (int i = 0; i < 6; i++)
        if (8 - $countones(d ^ tmpl[i]) > best) begin best = 8 - $countones(d ^ tmpl[i]); bi = i; end
      check("score", out, best);
      check("status", authentication_status, best >= 7);
      if (best >= 7) begin
        check("user", authenticated_user, 8'(100 + bi));
        n_accept++;
      end else begin
        check("user 0", authenticated_user, 0);
        n_reject++;
      end
    end
  endtask

  task automatic fp(fp_op_e o, logic [11:0] a, logic [11:0] b);
    real ra, rb, r;
    logic [11:0] exp_v;
    @(negedge clk);
    fp_din = {a, b}; fp_op = o; fp_ld = 1;
    @(negedge clk);
    fp_ld = 0;
    @(negedge clk);
    ra = fp_to_real(a); rb = fp_to_real(b);
    r = (o == FP_ADD) ? ra + rb : (o == FP_SUB) ? ra - rb : ra * rb;
    exp_v = real_to_fp(r);
    checks++;
    if (!fp_valid || fp_dout != exp_v) begin
      failures++;
      $display("FAIL fp op %0d %h %h got %h expected %h", o, a, b, fp_dout, exp_v);
    end
    case (o) FP_ADD: n_fadd++; FP_SUB: n_fsub++; default: n_fmul++; endcase
    if (exp_v[10:0] == 11'h7FF) n_fsat++;
    if (r != 0.0 && exp_v[10:0] == 0) n_fflush++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    rng_seed = 40'h12_3456_789A; rng_load = 1;
    @(negedge clk);
    rng_load = 0;
    // enrol six users with distinct templates
    for (int i = 0; i < 6; i++) begin
      tmpl[i] = 8'(8'h11 * (i + 1) + 8'h0F * i);
      enroll_we = 1; enroll_idx = 3'(i); enroll_data = tmpl[i]; enroll_user = 8'(100 + i);
      @(negedge clk);
    end
    enroll_we = 0;
    for (int t = 0; t < 600; t++) begin
      logic [7:0] d;
      d = (t % 2) ? tmpl[$urandom % 6] : 8'($urandom);
      transaction(d, t % 5, (t % 7 == 1), (t == 300) ? 66000 : int'($urandom % 20));
      if (t % 4 == 0) fp(fp_op_e'(t % 3), 12'($urandom), 12'($urandom));
    end
    fp(FP_MUL, {1'b0, 5'd31, 6'd1}, {1'b0, 5'd20, 6'd0});
    fp(FP_MUL, {1'b0, 5'd2, 6'd1},  {1'b1, 5'd3, 6'd0});
    $display("golay: clean %0d, corrected 1/2/3 %0d/%0d/%0d, parity-bit %0d, 4-error detect %0d",
             n_clean, n_corr1, n_corr2, n_corr3, n_parity, n_detect4);
    $display("auth: accept %0d reject %0d keyed %0d; tdc: bubbles %0d, after wrap %0d",
             n_accept, n_reject, n_keyed, n_bubble, n_wrap);
    $display("ffppe: add %0d sub %0d mul %0d saturate %0d flush %0d",
             n_fadd, n_fsub, n_fmul, n_fsat, n_fflush);
    checks++; if (n_clean == 0)   failures++;
    checks++; if (n_corr1 == 0)   failures++;
    checks++; if (n_corr2 == 0)   failures++;
    checks++; if (n_corr3 == 0)   failures++;
    checks++; if (n_parity == 0)  failures++;
    checks++; if (n_detect4 == 0) failures++;
    checks++; if (n_accept == 0)  failures++;
    checks++; if (n_reject == 0)  failures++;
    checks++; if (n_keyed == 0)   failures++;
    checks++; if (n_bubble == 0)  failures++;
    checks++; if (n_wrap == 0)    failures++;
    checks++; if (n_fadd == 0 || n_fsub == 0 || n_fmul == 0) failures++;
    checks++; if (n_fsat == 0 || n_fflush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
