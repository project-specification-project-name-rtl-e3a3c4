// Self-checking test of the input register block: serial mask loading,
// masking of random hits, edge detection of long pulses, test mode and the
// test pulse, against a reference model computed in the testbench.
module tb_abcn_input_register;
  logic clk = 0, rst_n = 0, bc_en = 1, load = 0, sin = 0, mode = 0, edgemode = 0, pulse = 0;
  logic [127:0] i = '0, o, mask;
  int checks = 0, failures = 0;

  abcn_input_register #(.N(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [127:0] m, prev, cur, expect_o;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++; if (mask !== '1) begin failures++; $display("FAIL mask reset"); end
    m = {$urandom, $urandom, $urandom, $urandom};
    for (int b = 127; b >= 0; b--) begin
      @(negedge clk); load = 1; sin = m[b];
    end
    @(negedge clk); load = 0;
    checks++; if (mask !== m) begin failures++; $display("FAIL mask load"); end
    prev = '0; cur = '0;
    for (int t = 0; t < 200; t++) begin
      edgemode = (t >= 100);
      mode  = (t % 37 == 5);
      pulse = (t % 41 == 7);
      // slowly varying inputs so edge mode sees multi-crossing pulses
      for (int c = 0; c < 128; c++) if ($urandom % 4 == 0) i[c] = ~i[c];
      @(posedge clk);      // latch i into the first stage
      prev = cur; cur = i;
      #1;
      @(negedge clk);
      // o now reflects the previous crossing's latched data
      expect_o = (mode || pulse) ? m : ((edgemode ? (prev & ~prev_q) : prev) & m);
      checks++;
      if (o !== expect_o) begin failures++; if (failures < 5) $display("FAIL t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // the crossing before 'prev' for the edge reference
  logic [127:0] prev_q = '0, prev_d = '0;
  always @(posedge clk) begin prev_q <= prev_d; prev_d <= dut.lat; end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
