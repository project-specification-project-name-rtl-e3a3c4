// Serial access register of N bits without cache (Calibration Delay and
// TrimDac registers). With "shift" high it takes one bit per clock, MSB
// first, into bit 0 and moves the contents towards bit N-1. q[N-1] is the
// serial output for read-back; with "rotate" also high the register takes
// its own q[N-1] instead of din, so N shifts read it out and leave it
// unchanged. Hard reset clears it; soft reset does not touch it.
// Loading and read-back follow the specification; the rotation that keeps
// the contents during read-back is a local choice.
module abcn_serial_register #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         rotate,
  input  logic         din,
  output logic [N-1:0] q,
  output logic         dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[N-2:0], rotate ? q[N-1] : din};
  end
  assign dout = q[N-1];
endmodule
