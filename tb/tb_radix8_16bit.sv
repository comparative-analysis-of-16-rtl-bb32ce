// tb_radix8_16bit: end-to-end self-checking test of the 16 x 16 radix-8 Booth
// multiplier at its default size.
//
// Applies the four worked examples of the design's published results
// (21 x 8, -21 x -8, 21 x -8, -21 x 8, all in signed mode), operand extremes in
// both modes, and random operand pairs, and compares mul with the product
// computed as a 64-bit integer. It also recodes every multiplier itself and
// counts how often each radix-8 digit -4..+4 was used and how often each mode
// ran; a digit or mode that never occurred counts as a failure.
module tb_radix8_16bit;
  localparam int N = 16;
  localparam int NPP = (N + 3) / 3;

  logic [N-1:0]   ain, bin;
  logic           s_u;
  logic [2*N-1:0] mul;
  int checks = 0, failures = 0;
  int digit_seen [9];            // index = digit + 4
  int mode_seen  [2];            // index = s_u
  int neg_md_seen = 0;
  logic [N-1:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'hAAAA};

  radix8_16bit dut (.ain(ain), .bin(bin), .s_u(s_u), .mul(mul));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the radix-8 digits of the multiplier, recoded here independently.
  task automatic count_digits(input logic [N-1:0] b, input logic s);
    longint bv;
    logic [3*NPP:0] ext;
    int d;
    bv  = s ? longint'($signed(b)) : longint'(b);
    ext = {(3*NPP)'(bv), 1'b0};
    for (int i = 0; i < NPP; i++) begin
      d = -4 * int'(ext[3*i+3]) + 2 * int'(ext[3*i+2]) + int'(ext[3*i+1]) + int'(ext[3*i]);
      digit_seen[d+4]++;
    end
  endtask

  task automatic check_one(input logic [N-1:0] a, input logic [N-1:0] b, input logic s);
    longint av, bv, pv;
    ain = a; bin = b; s_u = s;
    #1;
    av = s ? longint'($signed(a)) : longint'(a);
    bv = s ? longint'($signed(b)) : longint'(b);
    pv = av * bv;
    count_digits(b, s);
    mode_seen[s]++;
    if (av < 0) neg_md_seen++;
    checks++;
    if (mul != (2*N)'(pv)) begin
      failures++;
      if (failures < 20)
        $display("FAIL s_u=%b ain=%h bin=%h: mul=%h expected %h", s, a, b, mul, (2*N)'(pv));
    end
  endtask

  initial begin
    foreach (digit_seen[k]) digit_seen[k] = 0;
    mode_seen = '{0, 0};

    // published examples
    check_one(16'd21, 16'd8, 1'b1);
    if (mul != 32'd168) begin failures++; $display("FAIL 21 x 8"); end
    check_one(-16'sd21, -16'sd8, 1'b1);
    if (mul != 32'd168) begin failures++; $display("FAIL -21 x -8"); end
    check_one(16'd21, -16'sd8, 1'b1);
    if (mul != -32'sd168) begin failures++; $display("FAIL 21 x -8"); end
    check_one(-16'sd21, 16'd8, 1'b1);
    if (mul != -32'sd168) begin failures++; $display("FAIL -21 x 8"); end
    check_one(16'd21, 16'd8, 1'b0);
    checks += 4;

    // extremes
    for (int s = 0; s < 2; s++) begin
      foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j], s[0]);
    end

    // random pairs in both modes
    for (int i = 0; i < 200000; i++) check_one(N'($urandom), N'($urandom), 1'($urandom));

    for (int d = -4; d <= 4; d++) begin
      $display("digit %2d used %0d times", d, digit_seen[d+4]);
      checks++;
      if (digit_seen[d+4] == 0) begin failures++; $display("FAIL digit %0d never used", d); end
    end
    $display("unsigned products %0d, signed products %0d, negative multiplicands %0d",
             mode_seen[0], mode_seen[1], neg_md_seen);
    checks += 3;
    if (mode_seen[0] == 0) begin failures++; $display("FAIL unsigned mode never used"); end
    if (mode_seen[1] == 0) begin failures++; $display("FAIL signed mode never used"); end
    if (neg_md_seen == 0) begin failures++; $display("FAIL no negative multiplicand"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
