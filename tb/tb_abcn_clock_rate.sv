// Self-checking test of the beam-crossing enable generator: for each clock
// rate setting, BC is generated synchronously at 1/1, 1/2 or 1/4 of the clock
// and bc_en must occur exactly once per BC period, at a fixed phase.
module tb_abcn_clock_rate;
  logic clk = 0, rst_n = 0, bc = 0, clkmode80 = 0, clkmode160 = 0;
  logic bc_en;
  logic [1:0] rate;
  int checks = 0, failures = 0;

  abcn_clock_rate dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic m80, input logic m160, input int div, input logic [1:0] exp_rate);
    int n_en, phase0;
    clkmode80 = m80; clkmode160 = m160;
    rst_n = 0; bc = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    n_en = 0; phase0 = -1;
    for (int c = 0; c < 40 * div; c++) begin
      @(negedge clk);
      bc = (div == 1) ? 1'b1 : ((c % div) < div / 2);
      if (c >= 8 * div) begin
        if (bc_en) begin
          n_en++;
          if (phase0 < 0) phase0 = c % div;
          else if ((c % div) != phase0) begin
            failures++; $display("FAIL phase div=%0d c=%0d", div, c);
          end
        end
      end
    end
    checks++;
    if (n_en != 32) begin failures++; $display("FAIL div=%0d n_en=%0d", div, n_en); end
    checks++;
    if (rate != exp_rate) begin failures++; $display("FAIL rate %0d", rate); end
  endtask

  initial begin
    run(0, 0, 1, 2'd0);
    run(1, 0, 2, 2'd1);
    run(0, 1, 4, 2'd2);
    run(1, 1, 1, 2'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
