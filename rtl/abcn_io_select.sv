// Redundant input selection. The chip receives two independent sets of
// readout clock, command, beam-crossing clock and external L1 (LONE) inputs;
// the static "select" pin picks which set drives the chip (select low: set 0,
// select high: set 1), so a failed source can be bypassed. Purely
// combinational. The selection table follows the specification; the
// differential receivers in front of it are pad cells and are not modelled,
// so each input here is the single-ended receiver output.
module abcn_io_select (
  input  logic sel,
  input  logic clk0, clk1,
  input  logic com0, com1,
  input  logic bc0,  bc1,
  input  logic lone0, lone1,
  output logic clk,
  output logic command,
  output logic bc,
  output logic lone
);
  always_comb begin
    clk     = sel ? clk1  : clk0;
    command = sel ? com1  : com0;
    bc      = sel ? bc1   : bc0;
    lone    = sel ? lone1 : lone0;
  end
endmodule
