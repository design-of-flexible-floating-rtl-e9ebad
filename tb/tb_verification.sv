// tb_verification: six enrolled templates; random probes, exact and
// near matches; best slot, score, threshold verdict and user number.
module tb_verification;
  logic       clk = 0, rst_n = 0, enroll_we = 0, check = 0;
  logic [2:0] enroll_idx = '0;
  logic [7:0] enroll_data = '0, enroll_user = '0, decoded_bits = '0;
  logic       auth_valid, authentication_status;
  logic [7:0] authenticated_user, index, out;
  int checks = 0, failures = 0;
  int accepts = 0, rejects = 0;
  logic [7:0] tmpl [6], user [6];
  bit         used [6];

  verification dut (.*);

  always #5 clk = ~clk;

  task automatic probe(logic [7:0] v);
    int best, bi, sc;
    bit ok;
    @(negedge clk);
    decoded_bits = v;
    check = 1;
    @(negedge clk);
    check = 0;
    @(negedge clk);
    best = 0; bi = 0;
    for (int i = 0; i < 6; i++) begin
      sc = used[i] ? 8 - $countones(v ^ tmpl[i]) : 0;
      if (sc > best) begin best = sc; bi = i; end
    end
    ok = (best >= 7);
    if (ok) accepts++; else rejects++;
    checks++;
    if (!auth_valid || out != 8'(best) || authentication_status != ok ||
        (best > 0 && index != 8'(bi)) ||
        authenticated_user != (ok ? user[bi] : 8'd0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%h got score %0d idx %0d ok %0b user %0d; expected %0d %0d %0b",
                 v, out, index, authentication_status, authenticated_user, best, bi, ok);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // before enrolment nobody is accepted
    for (int i = 0; i < 6; i++) used[i] = 0;
    probe(8'h3C);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      tmpl[i] = 8'($urandom);
      user[i] = 8'(10 + i);
      used[i] = 1;
      enroll_we = 1; enroll_idx = 3'(i); enroll_data = tmpl[i]; enroll_user = user[i];
    end
    @(negedge clk);
    enroll_we = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] v;
      case (t % 3)
        0: v = tmpl[$urandom % 6];
        1: v = tmpl[$urandom % 6] ^ (8'd1 << ($urandom % 8));
        default: v = 8'($urandom);
      endcase
      probe(v);
    end
    checks++;
    if (accepts == 0 || rejects == 0) failures++;
    $display("accepted %0d rejected %0d", accepts, rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
