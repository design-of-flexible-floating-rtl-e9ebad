// tb_prio_enc_mux: random request patterns for the 12- and 11-input forms.
module tb_prio_enc_mux;
  logic [11:0] w12;
  logic [22:0] s12 [12];
  logic [3:0]  o12;
  logic [22:0] y12;
  logic [10:0] w11;
  logic [7:0]  s11 [11];
  logic [3:0]  o11;
  logic [7:0]  y11;
  int checks = 0, failures = 0;

  prio_enc_mux #(.N(12), .W(23)) dut12 (.w(w12), .s(s12), .o(o12), .y(y12));
  prio_enc_mux #(.N(11), .W(8))  dut11 (.w(w11), .s(s11), .o(o11), .y(y11));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e12, e11;
      w12 = 12'($urandom);
      w11 = 11'($urandom);
      if (t % 7 == 0) w12 = 12'(1) << (t % 12);
      if (t % 11 == 0) w12 = '0;
      if (t % 13 == 0) w11 = '0;
      for (int i = 0; i < 12; i++) s12[i] = 23'($urandom);
      for (int i = 0; i < 11; i++) s11[i] = 8'($urandom);
      e12 = 0;
      for (int i = 11; i >= 0; i--) if (w12[i] && e12 == 0) e12 = i + 1;
      e11 = 0;
      for (int i = 10; i >= 0; i--) if (w11[i] && e11 == 0) e11 = i + 1;
      #1;
      check("o12", o12, e12);
      check("y12", y12, (e12 == 0) ? 0 : s12[e12-1]);
      check("o11", o11, e11);
      check("y11", y11, (e11 == 0) ? 0 : s11[e11-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
