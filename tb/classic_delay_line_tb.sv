// Classic delay line test, N = 7 (8 elements), 8-bit samples. Each sample is
// entered with a ck1 cycle followed by a ck2 cycle; after ck2, taps[i] must
// equal the sample entered i shifts earlier (zero prev the line is full).
// After ck1 alone the taps must not yet have changed.
module classic_delay_line_tb;
  localparam int N = 7, W = 8;
  logic clk = 0, rst_n = 0, ck1 = 0, ck2 = 0;
  logic [W-1:0] x = '0;
  logic [N:0][W-1:0] taps, prev;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  classic_delay_line #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .ck1(ck1), .ck2(ck2), .x_in(x), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      prev = taps;
      x = W'($urandom);
      hist.push_front(x);
      ck1 = 1;
      @(negedge clk);
      ck1 = 0;
      checks++;
      if (taps !== prev) begin failures++; $display("FAIL taps moved on ck1 at n=%0d", n); end
      ck2 = 1;
      @(negedge clk);
      ck2 = 0;
      for (int i = 0; i <= N; i++) begin
        logic [W-1:0] e;
        e = (i < hist.size()) ? hist[i] : '0;
        checks++;
        if (taps[i] !== e) begin failures++; $display("FAIL n=%0d tap %0d = %h exp %h", n, i, taps[i], e); end
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
