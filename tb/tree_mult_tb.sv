// Binary-tree multiplier test.
//  * K = 4, L = 8 (the structure drawn for the example tree): every A and B,
//    with fill = 0 (A unsigned) and fill = 1 (A two's complement); includes
//    15 * 255 = 3825, the maximum of the unsigned example.
//  * K = 32, L = 32 (the filter's default widths): random signed A and
//    unsigned B, plus extreme values.
// Results are compared with products computed by the simulator.
module tree_mult_tb;
  int checks = 0, failures = 0;

  logic [3:0]  a4;
  logic [7:0]  b8;
  logic        f4;
  logic [11:0] p12;
  logic [31:0] a32, b32;
  logic [63:0] p64;

  tree_mult #(.K(4), .L(8))   dut_s (.a(a4),  .b(b8),  .fill(f4),      .p(p12));
  tree_mult #(.K(32), .L(32)) dut_l (.a(a32), .b(b32), .fill(a32[31]), .p(p64));

  task automatic check_big(logic [31:0] x, logic [31:0] y);
    logic signed [63:0] expect_p;
    a32 = x; b32 = y;
    #1;
    expect_p = 64'(signed'(x)) * signed'({32'd0, y});
    checks++;
    if (p64 !== expect_p) begin
      failures++;
      $display("FAIL 32x32 %0d * %0d = %0d, expected %0d", signed'(x), y, signed'(p64), expect_p);
    end
  endtask

  initial begin
    logic signed [11:0] expect_s;
    for (int f = 0; f < 2; f++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 256; y++) begin
          a4 = 4'(x); b8 = 8'(y); f4 = 1'(f);
          #1;
          if (f == 1) expect_s = 12'(signed'(a4)) * signed'({4'd0, b8});
          else        expect_s = 12'(x * y);
          checks++;
          if (p12 !== expect_s) begin
            failures++;
            if (failures < 10) $display("FAIL 4x8 fill=%0d %0d * %0d = %0d, expected %0d", f, x, y, p12, expect_s);
          end
        end
    a4 = 4'd15; b8 = 8'd255; f4 = 0;
    #1;
    checks++;
    if (p12 != 12'd3825) begin failures++; $display("FAIL 15*255 = %0d", p12); end

    check_big(32'h8000_0000, 32'hFFFF_FFFF);
    check_big(32'h7FFF_FFFF, 32'hFFFF_FFFF);
    check_big(32'hFFFF_FFFF, 32'h0000_0001);
    check_big(32'h0000_0000, 32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) check_big($urandom, $urandom);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
