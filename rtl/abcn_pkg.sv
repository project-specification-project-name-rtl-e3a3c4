// Shared types and constants of the ABC-N readout chip digital core.
// Channel count, memory geometry, command codes, register addresses,
// compression criteria, packet headers and error codes all follow the
// chip specification; the enum encodings of internal states are local choices.
package abcn_pkg;

  localparam int unsigned NCH       = 128;  // strips per chip
  localparam int unsigned BCW       = 8;    // beam crossing counter width
  localparam int unsigned L1W       = 4;    // L1 counter width
  localparam int unsigned PIPE_W    = 144;  // pipeline word: 128 hits + 8 BC + 8 unused
  localparam int unsigned BUF_W     = 180;  // derandomizer word: 128 hits + 4 L1 + 8 BC + unused
  localparam int unsigned IDW       = 7;    // geographical chip address width
  localparam logic [6:0]  GLOBAL_ID = 7'h7F;

  // Data compression criteria, CFG1 bits 1:0 (Table 3-7)
  typedef enum logic [1:0] {
    CRIT_HIT   = 2'b00,  // 1XX | X1X | XX1
    CRIT_LEVEL = 2'b01,  // X1X
    CRIT_EDGE  = 2'b10,  // 01X
    CRIT_TEST  = 2'b11   // XXX
  } crit_e;

  // Read-back register address (field 5 bits C5..C1, Table 3-41)
  localparam logic [4:0] RA_CFG1   = 5'b000_00;
  localparam logic [4:0] RA_MASK   = 5'b001_00;
  localparam logic [4:0] RA_CALDLY = 5'b010_00;
  localparam logic [4:0] RA_THRESH = 5'b011_00;
  localparam logic [4:0] RA_CALAMP = 5'b011_10;
  localparam logic [4:0] RA_BIAS1  = 5'b111_00;
  localparam logic [4:0] RA_BIAS2  = 5'b111_01;
  localparam logic [4:0] RA_BIAS3  = 5'b111_10;
  localparam logic [4:0] RA_TRIM   = 5'b000_10;
  localparam logic [4:0] RA_CFG2   = 5'b001_10;
  localparam logic [4:0] RA_DELAY  = 5'b010_10;
  localparam logic [4:0] RA_STAT1  = 5'b101_10;
  localparam logic [4:0] RA_STAT2  = 5'b110_10;
  // Instructions (field 5 with C0 = 0)
  localparam logic [5:0] CMD_TESTPULSE = 6'b100_000;
  localparam logic [5:0] CMD_DATATAKE  = 6'b101_000;
  localparam logic [5:0] CMD_CALPULSE  = 6'b110_000;

  // Index of the eight cached registers
  typedef enum logic [2:0] {
    CR_CFG1 = 3'd0, CR_CFG2 = 3'd1, CR_THRESH = 3'd2, CR_BIAS1 = 3'd3,
    CR_BIAS2 = 3'd4, CR_BIAS3 = 3'd5, CR_DELAY = 3'd6, CR_CALAMP = 3'd7
  } creg_e;
  localparam int unsigned NCREG = 8;

  // Chip mode of operation (3.2.19)
  typedef enum logic [1:0] {
    MODE_SENDID  = 2'd0,
    MODE_READREG = 2'd1,
    MODE_DATA    = 2'd2
  } chip_mode_e;

  // Error codes (3.2.17.13)
  localparam logic [2:0] ERR_NODATA   = 3'b001;
  localparam logic [2:0] ERR_OVERFLOW = 3'b100;

  // Module header preamble and trailer (Figure 3-17)
  localparam logic [4:0]  PREAMBLE = 5'b11101;
  localparam logic [16:0] TRAILER  = 17'b1_0000_0000_0000_0000;

  // Calibration line pulsed for each CFG1 Cal_Mode code (Table 3-40):
  // code 00 pulses in3,in7..., code 11 pulses in0,in4...
  function automatic logic [3:0] cal_line_sel(input logic [1:0] code);
    return 4'b0001 << (2'd3 - code);
  endfunction

endpackage
