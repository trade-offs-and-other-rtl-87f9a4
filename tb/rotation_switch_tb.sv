// Rotation switch test, N = 7, 8-bit words: for random cell contents and every
// write phase c, line i must carry cell (c - i) mod 8, i.e. the sample of
// age i when cell c holds the newest one.
module rotation_switch_tb;
  localparam int N = 7, W = 8;
  logic [N:0][W-1:0] cells, taps;
  logic [N:0] wphase;
  int checks = 0, failures = 0;

  rotation_switch #(.N(N), .W(W)) dut (.cells(cells), .wphase(wphase), .taps(taps));

  initial begin
    for (int r = 0; r < 20; r++)
      for (int c = 0; c <= N; c++) begin
        for (int j = 0; j <= N; j++) cells[j] = W'($urandom);
        wphase = (N+1)'(1) << c;
        #1;
        for (int i = 0; i <= N; i++) begin
          checks++;
          if (taps[i] !== cells[(c - i + N + 1) % (N + 1)]) begin
            failures++;
            $display("FAIL c=%0d line %0d = %h", c, i, taps[i]);
          end
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
