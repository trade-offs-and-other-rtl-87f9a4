// Serial shift-and-add multiplier test at K = 8, L = 8 and at the default
// K = L = 32. Random signed coefficients (fill = sign bit), unsigned
// samples, also with fill = 0; the product is compared with the simulator's,
// and done must rise exactly L clock edges after the edge that samples start.
module serial_mult_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic        st8 = 0, f8 = 0, busy8, done8;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [15:0] p8;
  logic        st32 = 0, busy32, done32;
  logic [31:0] a32 = '0, b32 = '0;
  logic [63:0] p32;

  serial_mult #(.K(8), .L(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(st8), .a(a8), .b(b8), .fill(f8),
    .busy(busy8), .done(done8), .p(p8));
  serial_mult #(.K(32), .L(32)) dut32 (
    .clk(clk), .rst_n(rst_n), .start(st32), .a(a32), .b(b32), .fill(a32[31]),
    .busy(busy32), .done(done32), .p(p32));

  always #5 clk = ~clk;

  task automatic run8(logic [7:0] x, logic [7:0] y, logic f);
    int cyc = 0;
    logic signed [15:0] expect_p;
    @(negedge clk); a8 = x; b8 = y; f8 = f; st8 = 1;
    @(negedge clk); st8 = 0;
    while (!done8 && cyc < 100) begin @(negedge clk); cyc++; end
    // start edge, then 8 adding edges: done is seen 8 cycles after start drops
    checks++;
    if (cyc != 8) begin failures++; $display("FAIL 8-bit latency %0d", cyc); end
    expect_p = f ? 16'(signed'(x)) * signed'({8'd0, y}) : 16'(x) * 16'(y);
    checks++;
    if (p8 !== expect_p) begin failures++; $display("FAIL 8-bit %h*%h f=%0d = %h exp %h", x, y, f, p8, expect_p); end
  endtask

  task automatic run32(logic [31:0] x, logic [31:0] y);
    int cyc = 0;
    logic signed [63:0] expect_p;
    @(negedge clk); a32 = x; b32 = y; st32 = 1;
    @(negedge clk); st32 = 0;
    while (!done32 && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 32) begin failures++; $display("FAIL 32-bit latency %0d", cyc); end
    expect_p = 64'(signed'(x)) * signed'({32'd0, y});
    checks++;
    if (p32 !== expect_p) begin failures++; $display("FAIL 32-bit %h*%h = %h exp %h", x, y, p32, expect_p); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run8(8'hFF, 8'hFF, 0);
    run8(8'h80, 8'hFF, 1);
    for (int i = 0; i < 100; i++) run8(8'($urandom), 8'($urandom), 1'($urandom));
    run32(32'h8000_0000, 32'hFFFF_FFFF);
    for (int i = 0; i < 40; i++) run32($urandom, $urandom);
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
