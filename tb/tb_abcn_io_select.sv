// Self-checking test of the redundant input selector: all input
// combinations for both values of select.
module tb_abcn_io_select;
  logic sel, clk0, clk1, com0, com1, bc0, bc1, lone0, lone1;
  logic clk, command, bc, lone;
  int checks = 0, failures = 0;

  abcn_io_select dut (.*);

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, clk0, clk1, com0, com1, bc0, bc1, lone0, lone1} = 9'(v);
      #1;
      checks++;
      if ({clk, command, bc, lone} !== (sel ? {clk1, com1, bc1, lone1} : {clk0, com0, bc0, lone0})) begin
        failures++;
        $display("FAIL v=%0d", v);
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
