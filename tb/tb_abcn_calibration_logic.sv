// Self-checking test of the calibration logic: the strobe must come exactly
// CAL_LATENCY beam crossings after the command, last one crossing, and pulse
// the line of the calibration code table; the delay code is passed through.
module tb_abcn_calibration_logic;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, bc_en = 1, cal_cmd = 0;
  logic [1:0] cal_mode = 0;
  logic [7:0] caldelay = 0;
  logic cal_strobe;
  logic [3:0] cal_line;
  logic [5:0] strobe_delay;
  logic [1:0] strobe_step;
  int checks = 0, failures = 0;

  abcn_calibration_logic #(.CAL_LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      cal_mode = 2'(m); caldelay = 8'($urandom); cal_cmd = 1;
      @(negedge clk); cal_cmd = 0;
      for (int k = 1; k <= LAT + 2; k++) begin
        chk(cal_strobe == (k == LAT), $sformatf("strobe m=%0d k=%0d", m, k));
        chk(cal_line == ((k == LAT) ? (4'b1000 >> m) : 4'b0), "line");
        @(negedge clk);
      end
      chk(strobe_delay == caldelay[5:0] && strobe_step == caldelay[7:6], "delay code");
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
