// Summing block test: 4 and 32 two's complement inputs of 8 bits, random and
// extreme values, the sum compared with a sum of the sign-extended inputs.
module sum_tree_tb;
  logic [3:0][7:0]  in4;
  logic [9:0]       s4;
  logic [31:0][7:0] in32;
  logic [12:0]      s32;
  int checks = 0, failures = 0;

  sum_tree #(.NIN(4),  .W(8)) dut4  (.in(in4),  .sum(s4));
  sum_tree #(.NIN(32), .W(8)) dut32 (.in(in32), .sum(s32));

  task automatic check_once();
    int e4 = 0, e32 = 0;
    #1;
    for (int i = 0; i < 4; i++)  e4  += int'(signed'(in4[i]));
    for (int i = 0; i < 32; i++) e32 += int'(signed'(in32[i]));
    checks += 2;
    if (signed'(s4) != 10'(e4))   begin failures++; $display("FAIL 4-input sum %0d exp %0d", signed'(s4), e4); end
    if (signed'(s32) != 13'(e32)) begin failures++; $display("FAIL 32-input sum %0d exp %0d", signed'(s32), e32); end
  endtask

  initial begin
    in4 = {4{8'h80}}; in32 = {32{8'h80}}; check_once();
    in4 = {4{8'h7F}}; in32 = {32{8'h7F}}; check_once();
    for (int r = 0; r < 300; r++) begin
      for (int i = 0; i < 4; i++)  in4[i]  = 8'($urandom);
      for (int i = 0; i < 32; i++) in32[i] = 8'($urandom);
      check_once();
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
