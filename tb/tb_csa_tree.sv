// tb_csa_tree: self-checking test of the carry-save adder tree.
//
// Feeds random rows to trees of 6 (the multiplier's size), 3 and 9 rows and
// checks that sum + carry equals the sum of the rows modulo 2**W.
module tb_csa_tree;
  localparam int W = 32;

  logic [W-1:0] r6 [6];
  logic [W-1:0] r3 [3];
  logic [W-1:0] r9 [9];
  logic [W-1:0] s6, c6, s3, c3, s9, c9;
  int checks = 0, failures = 0;

  csa_tree #(.W(W), .ROWS(6)) dut6 (.rows(r6), .sum(s6), .carry(c6));
  csa_tree #(.W(W), .ROWS(3)) dut3 (.rows(r3), .sum(s3), .carry(c3));
  csa_tree #(.W(W), .ROWS(9)) dut9 (.rows(r9), .sum(s9), .carry(c9));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e6, e3, e9;
    for (int i = 0; i < 3000; i++) begin
      e6 = '0; e3 = '0; e9 = '0;
      for (int k = 0; k < 9; k++) begin
        r9[k] = (i < 2) ? {W{i[0]}} : $urandom;
        e9 += r9[k];
        if (k < 6) begin r6[k] = r9[k]; e6 += r9[k]; end
        if (k < 3) begin r3[k] = r9[k]; e3 += r9[k]; end
      end
      #1;
      checks += 3;
      if (W'(s6 + c6) != e6) begin failures++; $display("FAIL 6 rows: %h + %h != %h", s6, c6, e6); end
      if (W'(s3 + c3) != e3) begin failures++; $display("FAIL 3 rows: %h + %h != %h", s3, c3, e3); end
      if (W'(s9 + c9) != e9) begin failures++; $display("FAIL 9 rows: %h + %h != %h", s9, c9, e9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
