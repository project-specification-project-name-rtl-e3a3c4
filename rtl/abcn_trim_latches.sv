// Per-channel trim DAC codes. The TrimDac register holds a 7-bit channel
// address (bits 11:5) and a 5-bit code (bits 4:0); on "load" (end of a
// TrimDac write command) the code is stored for that channel only. trim[c]
// drives channel c's 5-bit threshold trim DAC. Hard reset clears all codes.
// The addressing follows the specification; keeping the codes in one
// latch bank beside the register is a local choice.
module abcn_trim_latches #(
  parameter int unsigned N = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [15:0]      trimreg,
  output logic [N-1:0][4:0] trim
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trim <= '0;
    else if (load) begin
      for (int unsigned c = 0; c < N; c++)
        if (trimreg[11:5] == 7'(c)) trim[c] <= trimreg[4:0];
    end
  end
endmodule
