// tb_fp_addsub: add, subtract and multiply on random and edge operands,
// against a real-number model with truncation, and the two-edge latency.
module tb_fp_addsub;
  import tb_ref_pkg::*;
  import fam_pkg::*;
  logic        clk = 0, rst_n = 0, ld = 0;
  fp_op_e      op = FP_ADD;
  logic [23:0] din = '0;
  logic        valid;
  logic [11:0] dout;
  int checks = 0, failures = 0;
  int cycle = 0;

  fp_addsub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [11:0] model(fp_op_e o, logic [11:0] a, logic [11:0] b);
    real ra, rb;
    ra = fp_to_real(a);
    rb = fp_to_real(b);
    case (o)
      FP_ADD:  return real_to_fp(ra + rb);
      FP_SUB:  return real_to_fp(ra - rb);
      default: return real_to_fp(ra * rb);
    endcase
  endfunction

  task automatic run(fp_op_e o, logic [11:0] a, logic [11:0] b);
    int t0;
    logic [11:0] exp_v;
    @(negedge clk);
    din = {a, b};
    op  = o;
    ld  = 1;
    @(posedge clk);
    #1;
    t0 = cycle;
    @(negedge clk);
    ld = 0;
    while (!valid) begin @(posedge clk); #1; end
    exp_v = model(o, a, b);
    checks++;
    if (dout != exp_v || cycle - t0 != 1) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h got %h expected %h (latency %0d)",
                 o, a, b, dout, exp_v, cycle - t0);
    end
  endtask

  function automatic logic [11:0] rnd_fp();
    logic [11:0] x;
    x = 12'($urandom);
    if ($urandom % 16 == 0) x[10:6] = 0;          // zero operand
    return x;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1.5 + 2.0 = 3.5 ; 1.0 - 1.0 = 0 ; 3.0 * 2.5 = 7.5
    run(FP_ADD, {1'b0, 5'd15, 6'd32}, {1'b0, 5'd16, 6'd0});
    checks++; if (dout != {1'b0, 5'd16, 6'd48}) failures++;
    run(FP_SUB, {1'b0, 5'd15, 6'd0}, {1'b0, 5'd15, 6'd0});
    checks++; if (dout != 12'h000) failures++;
    run(FP_MUL, {1'b0, 5'd16, 6'd32}, {1'b0, 5'd16, 6'd16});
    checks++; if (dout != {1'b0, 5'd17, 6'd56}) failures++;
    // overflow and underflow
    run(FP_MUL, {1'b0, 5'd31, 6'd10}, {1'b0, 5'd30, 6'd0});
    run(FP_MUL, {1'b1, 5'd2, 6'd10},  {1'b0, 5'd3, 6'd0});
    run(FP_ADD, {1'b0, 5'd31, 6'd63}, {1'b0, 5'd31, 6'd63});
    run(FP_SUB, {1'b0, 5'd1, 6'd1},   {1'b0, 5'd1, 6'd0});
    for (int t = 0; t < 6000; t++)
      run(fp_op_e'(t % 3), rnd_fp(), rnd_fp());
    // close exponents, many cancellations
    for (int t = 0; t < 2000; t++) begin
      logic [11:0] a, b;
      a = rnd_fp();
      b = rnd_fp();
      b[10:6] = a[10:6] + 5'($urandom % 3);
      run(fp_op_e'(t % 2), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
