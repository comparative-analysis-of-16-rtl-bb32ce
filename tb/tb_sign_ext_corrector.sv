// tb_sign_ext_corrector: self-checking test of the sign extension corrector.
//
// Drives random and corner operands in both modes and checks that the extended
// multiplicand and multiplier, read as signed numbers, equal the operands read
// as signed (s_u = 1) or unsigned (s_u = 0) integers.
module tb_sign_ext_corrector;
  localparam int N   = 16;
  localparam int NPP = 6;

  logic [N-1:0]     md, mr;
  logic             s_u;
  logic [N:0]       md_ext;
  logic [3*NPP-1:0] mr_ext;
  int checks = 0, failures = 0;

  sign_ext_corrector #(.N(N), .NPP(NPP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] a, input logic [N-1:0] b, input logic s);
    longint exp_a, exp_b;
    md = a; mr = b; s_u = s;
    #1;
    exp_a = s ? longint'($signed(a)) : longint'(a);
    exp_b = s ? longint'($signed(b)) : longint'(b);
    checks++;
    if (longint'($signed(md_ext)) != exp_a || longint'($signed(mr_ext)) != exp_b) begin
      failures++;
      $display("FAIL md=%h mr=%h s_u=%b: md_ext=%h mr_ext=%h", a, b, s, md_ext, mr_ext);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      check_one(16'h0000, 16'h0000, s[0]);
      check_one(16'hFFFF, 16'hFFFF, s[0]);
      check_one(16'h8000, 16'h7FFF, s[0]);
      check_one(16'h7FFF, 16'h8000, s[0]);
    end
    for (int i = 0; i < 2000; i++) check_one(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
