// tb_weight12: exhaustive check of the 12-bit ones counter.
module tb_weight12;
  logic [11:0] din;
  logic [3:0]  weight;
  int checks = 0, failures = 0;

  weight12 dut (.din(din), .weight(weight));

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int n;
      din = 12'(v);
      n = 0;
      for (int b = 0; b < 12; b++) n += (v >> b) & 1;
      #1;
      checks++;
      if (weight != 4'(n)) begin
        failures++;
        if (failures < 5) $display("FAIL din=%h weight=%0d expected %0d", din, weight, n);
      end
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
