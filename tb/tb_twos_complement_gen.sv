// tb_twos_complement_gen: self-checking test of the two's complement generator.
//
// Sweeps every 17-bit input and checks that input + output is zero modulo 2**17.
module tb_twos_complement_gen;
  localparam int W = 17;

  logic [W-1:0] a, neg_a;
  int checks = 0, failures = 0;

  twos_complement_gen #(.W(W)) dut (.a(a), .neg_a(neg_a));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      a = W'(i);
      #1;
      checks++;
      if (W'(a + neg_a) != '0) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h neg_a=%h", a, neg_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
