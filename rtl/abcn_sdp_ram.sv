// Simple dual-port RAM: one write port and one synchronous read port on the
// same clock. A read of the address being written in the same cycle returns
// the old contents (read-first), which the L1 pipeline relies on at its
// maximum latency. Used for the pipeline and derandomizer memory blocks.
module abcn_sdp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 144,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic          re,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rd
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
    if (re) rd <= mem[ra];
  end
endmodule
