// Multi-bit full adder test: an 8-bit and a 13-bit instance, corner values
// and random operands, {cout, sum} compared with a + b + cin.
module mbfa_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  mbfa #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  mbfa #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic apply(logic [12:0] x, logic [12:0] y, logic c);
    logic [13:0] ref13;
    logic [8:0]  ref8;
    a8 = x[7:0]; b8 = y[7:0]; ci8 = c;
    a13 = x; b13 = y; ci13 = c;
    #1;
    ref8  = 9'(a8) + 9'(b8) + 9'(c);
    ref13 = 14'(a13) + 14'(b13) + 14'(c);
    checks += 2;
    if ({co8, s8} != ref8)   begin failures++; $display("FAIL W=8 %h+%h+%0d=%h", a8, b8, c, {co8, s8}); end
    if ({co13, s13} != ref13) begin failures++; $display("FAIL W=13 %h+%h+%0d=%h", a13, b13, c, {co13, s13}); end
  endtask

  initial begin
    apply('0, '0, 0);
    apply('1, '0, 1);
    apply('1, '1, 1);
    apply(13'h0FF, 13'h001, 0);
    for (int i = 0; i < 500; i++) apply(13'($urandom), 13'($urandom), 1'($urandom));
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
