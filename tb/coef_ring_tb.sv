// Coefficient ring test, N = 7, 8-bit words. Eight loads (ck1 with load,
// then ck2) fill the ring; position j must then hold the word loaded as
// number 7 - j. Then 20 rotations (ck1 without load, then ck2): after each,
// the contents must be the previous contents turned by one position, the
// last position feeding the first. The outputs must not move on ck1 alone.
module coef_ring_tb;
  localparam int N = 7, W = 8;
  logic clk = 0, rst_n = 0, ck1 = 0, ck2 = 0, load = 0;
  logic [W-1:0] h = '0;
  logic [N:0][W-1:0] coefs, model, prev;
  int checks = 0, failures = 0;

  coef_ring #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .ck1(ck1), .ck2(ck2), .load(load), .h_in(h), .coefs(coefs));

  always #5 clk = ~clk;

  task automatic shift(logic ld, logic [W-1:0] val);
    @(negedge clk); h = val; load = ld; ck1 = 1; prev = coefs;
    @(negedge clk); ck1 = 0; load = 0;
    checks++;
    if (coefs !== prev) begin failures++; $display("FAIL outputs moved on ck1"); end
    ck2 = 1;
    @(negedge clk); ck2 = 0;
  endtask

  initial begin
    logic [W-1:0] vals [N+1];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= N; k++) begin
      vals[k] = W'($urandom);
      shift(1, vals[k]);
    end
    for (int j = 0; j <= N; j++) begin
      model[j] = vals[N - j];
      checks++;
      if (coefs[j] !== vals[N - j]) begin failures++; $display("FAIL load pos %0d = %h", j, coefs[j]); end
    end
    for (int r = 0; r < 20; r++) begin
      shift(0, W'($urandom));
      model = {model[N-1:0], model[N]};
      checks++;
      if (coefs !== model) begin failures++; $display("FAIL rotation %0d: %h exp %h", r, coefs, model); end
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
