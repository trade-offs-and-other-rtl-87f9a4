// Multi-phase generator test with 5 phases and with the default 32: after
// reset phase 0 is active, each adv moves the single active line one place
// on (wrapping from the last to the first), idx follows, a cycle without adv
// holds and clr returns to phase 0.
module multiphase_gen_tb;
  logic clk = 0, rst_n = 0, clr = 0, adv = 0;
  logic [4:0]  ph5;
  logic [2:0]  idx5;
  logic [31:0] ph32;
  logic [4:0]  idx32;
  int checks = 0, failures = 0;
  int exp_idx = 0, wraps = 0;

  multiphase_gen #(.PHASES(5))  dut5  (.clk(clk), .rst_n(rst_n), .clr(clr), .adv(adv), .phase(ph5),  .idx(idx5));
  multiphase_gen #(.PHASES(32)) dut32 (.clk(clk), .rst_n(rst_n), .clr(clr), .adv(adv), .phase(ph32), .idx(idx32));

  always #5 clk = ~clk;

  task automatic check_state();
    checks += 4;
    if (ph5 != 5'(1 << (exp_idx % 5)))   begin failures++; $display("FAIL ph5=%b exp %0d", ph5, exp_idx % 5); end
    if (int'(idx5) != exp_idx % 5)        begin failures++; $display("FAIL idx5=%0d", idx5); end
    if (ph32 != 32'(1 << (exp_idx % 32))) begin failures++; $display("FAIL ph32=%h", ph32); end
    if (int'(idx32) != exp_idx % 32)      begin failures++; $display("FAIL idx32=%0d", idx32); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_state();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      adv = ($urandom % 3) != 0;
      clr = (i == 150);
      @(posedge clk);
      if (clr) exp_idx = 0;
      else if (adv) exp_idx++;
      #1 check_state();
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
