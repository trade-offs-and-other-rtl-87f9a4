// Accumulator test at the 8-bit prototype width: random sequences of clear,
// enable and addends, the stored word compared after every clock edge with
// a model that adds modulo 256. Also checks that a disabled ACU holds.
module acu_tb;
  localparam int W = 8;
  logic         clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] addend = '0, acc;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  acu #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .addend(addend), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      clr    = ($urandom % 16) == 0;
      en     = ($urandom % 4) != 0;
      addend = W'($urandom);
      @(posedge clk);
      if (clr)     model = '0;
      else if (en) model = model + addend;
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        $display("FAIL step %0d acc=%0d model=%0d", i, acc, model);
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
