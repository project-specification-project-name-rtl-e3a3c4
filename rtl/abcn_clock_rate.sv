// Beam-crossing enable generator. The digital core runs on the readout
// clock Clk (40, 80 or 160 MHz, synchronous with the 40 MHz BC clock) and
// does its beam-crossing-rate work on cycles where bc_en is high. The rate
// is set by the ClkMode80/ClkMode160 pins as in the specification's clock
// rate table (00 and 11: 40 MHz, 10: 80 MHz, 01: 160 MHz).
// How the two clocks are related inside the chip is not specified; here BC
// is sampled on Clk and the divide-by-1/2/4 counter is re-phased on each
// sampled rising BC edge, so bc_en is one Clk cycle per BC period, one Clk
// cycle after the sampled edge. At 40 MHz bc_en is always high.
module abcn_clock_rate (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bc,          // selected BC clock, sampled on clk
  input  logic       clkmode80,
  input  logic       clkmode160,
  output logic       bc_en,
  output logic [1:0] rate         // 0: 40 MHz, 1: 80 MHz, 2: 160 MHz
);
  logic [1:0] cnt;
  logic       bc_q;

  always_comb begin
    unique case ({clkmode80, clkmode160})
      2'b10:   rate = 2'd1;
      2'b01:   rate = 2'd2;
      default: rate = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      bc_q <= 1'b0;
    end else begin
      bc_q <= bc;
      if (bc && !bc_q) cnt <= '0;
      else             cnt <= cnt + 2'd1;
    end
  end

  always_comb begin
    unique case (rate)
      2'd1:    bc_en = (cnt[0] == 1'b0);
      2'd2:    bc_en = (cnt == 2'd0);
      default: bc_en = 1'b1;
    endcase
  end
endmodule
