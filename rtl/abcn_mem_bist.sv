// Built-in self test controller for one memory. While "enable" is high and
// the test has not finished, it takes over the memory ports and runs four
// passes over all addresses: write a checkerboard, read and compare, write
// the inverted checkerboard, read and compare. "running" is high during the
// test, "ended" goes high when it finishes and stays high until enable is
// dropped, and "fail" is set if any word read back differed. The memory's
// previous contents are lost. The specification asks only for a self test
// with pass/fail flags; the algorithm is a local choice.
module abcn_mem_bist #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 144,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          running,
  output logic          ended,
  output logic          fail,
  output logic          we,
  output logic [AW-1:0] wa,
  output logic [W-1:0]  wd,
  output logic          re,
  output logic [AW-1:0] ra,
  input  logic [W-1:0]  rd
);
  typedef enum logic [2:0] {B_IDLE, B_W0, B_R0, B_W1, B_R1, B_DONE} bist_e;
  bist_e         st;
  logic [AW-1:0] addr;
  logic          chk;        // a read issued last cycle is due for comparison
  logic [W-1:0]  expect_q;

  function automatic logic [W-1:0] pattern(input logic [AW-1:0] a, input logic inv);
    logic [W-1:0] p;
    for (int unsigned b = 0; b < W; b++) p[b] = b[0] ^ a[0] ^ inv;
    return p;
  endfunction

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= B_IDLE;
      addr     <= '0;
      chk      <= 1'b0;
      fail     <= 1'b0;
      expect_q <= '0;
    end else begin
      chk <= re;
      if (re) expect_q <= pattern(addr, st == B_R1);
      if (chk && rd != expect_q) fail <= 1'b1;
      unique case (st)
        B_IDLE: if (enable) begin st <= B_W0; addr <= '0; fail <= 1'b0; end
        B_W0:   begin addr <= addr + 1'b1; if (addr == LAST) st <= B_R0; end
        B_R0:   begin addr <= addr + 1'b1; if (addr == LAST) st <= B_W1; end
        B_W1:   begin addr <= addr + 1'b1; if (addr == LAST) st <= B_R1; end
        B_R1:   begin addr <= addr + 1'b1; if (addr == LAST) st <= B_DONE; end
        B_DONE: if (!enable) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    running = (st != B_IDLE) && (st != B_DONE);
    ended   = (st == B_DONE);
    we      = (st == B_W0) || (st == B_W1);
    re      = (st == B_R0) || (st == B_R1);
    wa      = addr;
    ra      = addr;
    wd      = pattern(addr, st == B_W1);
  end
endmodule
