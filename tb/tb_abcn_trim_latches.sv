// Self-checking test of the per-channel trim codes: random channel writes
// against a reference array; only the addressed channel may change.
module tb_abcn_trim_latches;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] trimreg = '0;
  logic [127:0][4:0] trim;
  logic [4:0] ref_t [128];
  int checks = 0, failures = 0;

  abcn_trim_latches #(.N(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    foreach (ref_t[c]) ref_t[c] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      trimreg = 16'($urandom);
      load = ($urandom % 2) == 1;
      if (load) ref_t[trimreg[11:5]] = trimreg[4:0];
      @(negedge clk); load = 0;
      for (int c = 0; c < 128; c++) begin
        checks++;
        if (trim[c] !== ref_t[c]) begin failures++; $display("FAIL ch %0d", c); end
      end
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
