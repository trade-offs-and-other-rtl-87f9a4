// Rotational delay line test, N = 7, 8-bit samples. Samples are written with
// a one-hot phase that turns by one cell per sample; every cell is compared
// with a model array after each write, so a write into the wrong cell, a
// missing write or a disturbed neighbour is caught. A cycle with we = 0 must
// change nothing.
module rot_delay_line_tb;
  localparam int N = 7, W = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [N:0] sel = '0;
  logic [W-1:0] x = '0;
  logic [N:0][W-1:0] cells, model;
  int checks = 0, failures = 0;

  rot_delay_line #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .we(we), .sel(sel), .x_in(x), .cells(cells));

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      we  = (n % 5) != 4;
      sel = (N+1)'(1) << (n % (N + 1));
      x   = W'($urandom);
      @(posedge clk);
      if (we) model[n % (N + 1)] = x;
      #1;
      checks++;
      if (cells !== model) begin failures++; $display("FAIL n=%0d cells=%h model=%h", n, cells, model); end
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
