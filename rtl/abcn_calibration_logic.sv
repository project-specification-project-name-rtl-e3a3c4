// Calibration logic. A CalPulse command (cal_cmd, one clock) produces a
// calibration strobe of one beam crossing a fixed CAL_LATENCY crossings
// later. cal_line selects which of the four calibration lines the chopper
// drives, from CFG1 Cal_Mode (code 00: in3,in7,..; 01: in2,..; 10: in1,..;
// 11: in0,in4,..); it is all zero when no strobe is active. The fine delay
// of the strobe (6-bit value, 2-bit step range from the Calibration Delay
// register) is passed to the analog delay line, which is not modelled.
// The channel groups follow the specification's calibration code table; the
// latency value is a local choice, since only "a fixed number of clock
// pulses" is specified.
module abcn_calibration_logic #(
  parameter int unsigned CAL_LATENCY = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bc_en,
  input  logic       cal_cmd,
  input  logic [1:0] cal_mode,
  input  logic [7:0] caldelay,
  output logic       cal_strobe,
  output logic [3:0] cal_line,
  output logic [5:0] strobe_delay,
  output logic [1:0] strobe_step
);
  logic [CAL_LATENCY-1:0] sh;
  logic                   pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; pend <= 1'b0;
    end else begin
      if (cal_cmd) pend <= 1'b1;
      if (bc_en) begin
        sh   <= {sh[CAL_LATENCY-2:0], pend | cal_cmd};
        pend <= 1'b0;
      end
    end
  end

  always_comb begin
    cal_strobe   = sh[CAL_LATENCY-1];
    cal_line     = cal_strobe ? abcn_pkg::cal_line_sel(cal_mode) : 4'b0000;
    strobe_delay = caldelay[5:0];
    strobe_step  = caldelay[7:6];
  end
endmodule
