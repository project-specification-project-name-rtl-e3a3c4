// Readout logic: token-driven serializer of one chip's event data.
// While it does not hold the token it forwards the serial data of the chips
// further down the chain (datain) to dataout with one clock of delay. On a
// token (tokenin pulse) it sends, MSB first and without gaps, one clock per
// bit:
//   module header (header_enable, master chip): 11101 0 LLLL BBBBBBBB 1
//   then, by chip mode and event status:
//     send-ID mode:       000 aaaaaaa 111 CCCCCCCC 1 CCCCCCCC 1   (CFG1)
//     read-register mode: 000 aaaaaaa 010 rrrrr DDDDDDDD 1 DDDDDDDD 1
//     buffer overflow:    000 aaaaaaa 100 1
//     no event stored:    000 aaaaaaa 001 1  (data-taking mode only)
//     hits:  first channel of a cluster 01 aaaaaaa ccccccc 1 ddd,
//            each further adjacent channel 1 ddd
//     no hits:            001
//   module trailer (trailer_enable, end chip): 1 followed by 16 zeros
// It answers each hit from the data compression logic with a "next" pulse,
// and releases every event it consumed with one more "next" so the event
// count stays right. A chip that gets the token puts its first bit on
// dataout TOKEN_LEAD clocks after the token pulse, and forwarding adds one
// clock, so the token is passed on (tokenout pulse) with the fourth-last bit
// of its own data: the next chip's first bit then follows this chip's last
// bit with no gap. The end chip keeps the token. srst aborts any transfer at once.
// Packet formats follow the specification. The header is sent as the 19 bits
// its fields add up to. In send-ID or read-register mode with no event
// stored, the packet is sent without consuming an event (local choice).
module abcn_readout_logic
  import abcn_pkg::*;
#(
  parameter int unsigned TOKEN_LEAD = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        datain,
  input  logic        tokenin,
  input  logic        header_enable,
  input  logic        trailer_enable,
  input  logic [3:0]  hdr_l1,
  input  logic [7:0]  hdr_bc,
  // data compression interface
  input  logic [6:0]  ch,
  input  logic [2:0]  hit,
  input  logic        datavalid,
  input  logic        adj,
  input  logic        end_i,
  input  logic        overflow,
  input  logic        event_pending,   // an event is stored or being loaded
  output logic        next,
  // chip state
  input  logic [6:0]  id,
  input  chip_mode_e  chip_mode,
  input  logic [15:0] config1,
  input  logic [15:0] regdata,
  input  logic [4:0]  cregister,
  output logic        dataout,
  output logic        tokenout,
  output logic        active
);
  typedef enum logic [2:0] {R_IDLE, R_HDR, R_BODY, R_REL, R_TRL, R_FIN} rst_e;
  rst_e st;

  localparam int unsigned SW = 36;
  logic [SW-1:0] sr;
  logic [5:0]    cnt;          // bits left in sr
  logic          final_q;      // sr holds the chip's last chunk
  logic          in_cluster;   // last hit sent had an adjacent successor

  logic          need;         // a new chunk may be loaded this clock
  logic          load;
  logic [SW-1:0] chunk;
  logic [5:0]    clen;
  logic          cfinal;
  logic          c_ready, c_none;
  rst_e          st_nx;
  logic          next_c;
  logic          in_cl_nx;

  assign need    = (cnt <= 6'd1);
  assign c_ready = datavalid || end_i || overflow;
  assign c_none  = !event_pending && !c_ready;

  function automatic logic [SW-1:0] left(input logic [SW-1:0] v, input int unsigned n);
    return v << (SW - n);
  endfunction

  always_comb begin
    load = 1'b0; chunk = '0; clen = '0; cfinal = 1'b0;
    st_nx = st; next_c = 1'b0; in_cl_nx = in_cluster;
    unique case (st)
      R_IDLE: if (tokenin) st_nx = header_enable ? R_HDR : R_BODY;
      R_HDR: if (need && (c_ready || c_none)) begin
        load = 1'b1; clen = 6'd19;
        chunk = left(SW'({PREAMBLE, 1'b0, hdr_l1, hdr_bc, 1'b1}), 19);
        st_nx = R_BODY;
      end
      R_BODY: if (need) begin
        if (chip_mode == MODE_SENDID && (c_ready || c_none)) begin
          load = 1'b1; clen = 6'd31;
          chunk = left(SW'({3'b000, id, 3'b111, config1[15:8], 1'b1, config1[7:0], 1'b1}), 31);
          next_c = c_ready; st_nx = R_TRL; cfinal = !trailer_enable;
        end else if (chip_mode == MODE_READREG && (c_ready || c_none)) begin
          load = 1'b1; clen = 6'd36;
          chunk = left(SW'({3'b000, id, 3'b010, cregister, regdata[15:8], 1'b1, regdata[7:0], 1'b1}), 36);
          next_c = c_ready; st_nx = R_TRL; cfinal = !trailer_enable;
        end else if (c_none) begin
          load = 1'b1; clen = 6'd14;
          chunk = left(SW'({3'b000, id, ERR_NODATA, 1'b1}), 14);
          st_nx = R_TRL; cfinal = !trailer_enable;
        end else if (overflow) begin
          load = 1'b1; clen = 6'd14;
          chunk = left(SW'({3'b000, id, ERR_OVERFLOW, 1'b1}), 14);
          next_c = 1'b1; st_nx = R_TRL; cfinal = !trailer_enable;
        end else if (datavalid) begin
          load = 1'b1;
          if (in_cluster) begin
            clen = 6'd4; chunk = left(SW'({1'b1, hit}), 4);
          end else begin
            clen = 6'd20; chunk = left(SW'({2'b01, id, ch, 1'b1, hit}), 20);
          end
          in_cl_nx = adj; next_c = 1'b1;
          if (end_i) begin st_nx = R_REL; cfinal = !trailer_enable; end
        end else if (end_i) begin
          // no hit channel in this event
          load = 1'b1; clen = 6'd3; chunk = left(SW'(3'b001), 3);
          next_c = 1'b1; st_nx = R_TRL; cfinal = !trailer_enable;
        end
      end
      R_REL: if (end_i && !datavalid) begin next_c = 1'b1; st_nx = R_TRL; end
      R_TRL: if (!trailer_enable) st_nx = R_FIN;
             else if (need) begin
               load = 1'b1; clen = 6'd17; chunk = left(SW'(TRAILER), 17);
               st_nx = R_FIN;
             end
      R_FIN: if (cnt == 6'd0 || (cnt == 6'd1 && !load)) st_nx = R_IDLE;
      default: st_nx = R_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; sr <= '0; cnt <= '0; final_q <= 1'b0;
      in_cluster <= 1'b0; dataout <= 1'b0;
      tokenout <= 1'b0; next <= 1'b0;
    end else if (srst) begin
      st <= R_IDLE; sr <= '0; cnt <= '0; final_q <= 1'b0;
      in_cluster <= 1'b0; dataout <= 1'b0;
      tokenout <= 1'b0; next <= 1'b0;
    end else begin
      st   <= st_nx;
      next <= next_c;
      // output bit: own data while bits remain, otherwise forwarded data
      if (cnt != 6'd0) dataout <= sr[SW-1];
      else             dataout <= (st == R_IDLE) ? datain : 1'b0;
      if (load) begin
        // any last bit of the previous chunk goes out this clock
        sr <= chunk; cnt <= clen; final_q <= cfinal;
      end else if (cnt != 6'd0) begin
        sr  <= sr << 1;
        cnt <= cnt - 6'd1;
      end
      in_cluster <= in_cl_nx;
      if (st == R_IDLE && tokenin) in_cluster <= 1'b0;
      // the next chip's first bit reaches our dataout TOKEN_LEAD + 2 clocks
      // after tokenout, so tokenout goes with the 4th-last bit of our data
      tokenout <= load ? (cfinal && clen == 6'(TOKEN_LEAD + 1))
                       : (final_q && cnt == 6'(TOKEN_LEAD + 2));
    end
  end

  assign active = (st != R_IDLE);
endmodule
