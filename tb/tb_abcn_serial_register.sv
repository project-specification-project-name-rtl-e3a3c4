// Self-checking test of the serial access register: serial load MSB first,
// then read-back by rotation, which must return the word and keep it.
module tb_abcn_serial_register;
  logic clk = 0, rst_n = 0, shift = 0, rotate = 0, din = 0;
  logic [15:0] q;
  logic dout;
  int checks = 0, failures = 0;

  abcn_serial_register #(.N(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [15:0] w, rb;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 20; t++) begin
      w = 16'($urandom);
      for (int b = 15; b >= 0; b--) begin
        @(negedge clk); shift = 1; rotate = 0; din = w[b];
      end
      @(negedge clk); shift = 0;
      checks++; if (q !== w) begin failures++; $display("FAIL load %h %h", q, w); end
      rb = '0;
      for (int b = 0; b < 16; b++) begin
        @(negedge clk); rb = {rb[14:0], dout}; shift = 1; rotate = 1; din = ~din;
      end
      @(negedge clk); shift = 0; rotate = 0;
      checks++; if (rb !== w) begin failures++; $display("FAIL readback %h %h", rb, w); end
      checks++; if (q !== w) begin failures++; $display("FAIL kept %h %h", q, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
