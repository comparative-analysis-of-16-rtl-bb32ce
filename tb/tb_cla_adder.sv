// tb_cla_adder: self-checking test of the carry look-ahead adder.
//
// Checks a 32-bit adder (the multiplier's final adder) and a 19-bit one (the
// width used for +-3Y, not a multiple of the group size) on random operands
// and on carry chains that run through every group.
module tb_cla_adder;
  logic [31:0] a32, b32, s32;
  logic [18:0] a19, b19, s19;
  int checks = 0, failures = 0;

  cla_adder #(.W(32)) dut32 (.a(a32), .b(b32), .sum(s32));
  cla_adder #(.W(19)) dut19 (.a(a19), .b(b19), .sum(s19));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] a, input logic [31:0] b);
    a32 = a; b32 = b; a19 = a[18:0]; b19 = b[18:0];
    #1;
    checks += 2;
    if (s32 != 32'(a + b)) begin failures++; $display("FAIL32 %h + %h = %h", a, b, s32); end
    if (s19 != 19'(a[18:0] + b[18:0])) begin failures++; $display("FAIL19 %h + %h = %h", a19, b19, s19); end
  endtask

  initial begin
    check_one(32'hFFFF_FFFF, 32'h0000_0001);
    check_one(32'h7FFF_FFFF, 32'h0000_0001);
    check_one(32'h0000_0000, 32'h0000_0000);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int k = 0; k < 32; k++) check_one(32'hFFFF_FFFF >> k, 32'd1);
    for (int i = 0; i < 5000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
