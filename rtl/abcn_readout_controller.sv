// Readout controller: event counters, master token generation, data
// formatting control and the Ldo output.
//  * L1 counter (4 bits): +1 on each accepted L1; cleared by hard/soft reset.
//  * BC counter (8 bits): +1 every beam crossing (bc_en); cleared by hard or
//    soft reset and by the BC Reset command.
//  * Both counters are held in three copies; the count is their bit-wise
//    majority, and all copies are rewritten from it every clock, so a
//    single upset is corrected at once. A disagreement sets the sticky
//    l1_seu / bc_seu flag (STAT2 bits 0 and 1), cleared by a soft reset.
//    The triplication is a local choice; the SEU status bits are specified.
//  * Role: master = ~(masterB | CFG1.Master); end = CFG1.End and not master.
//  * Token generation (master only): when an event is waiting and the chain
//    is idle, it gives the chip's own readout logic a token with the module
//    header enabled, then watches the data leaving on Ldo for the trailer
//    (a 1 followed by sixteen 0s); once seen, it may start the next event.
//  * Ldo: the master's serial data; with CFG1.Feed_Through clear the master
//    instead outputs the readout clock divided by two (power-up default).
//    Non-master chips drive their data on the data port and Ldo is 0.
// All of this follows the specification; the trailer search on the chip's
// own output stream (which also covers the master's own data) is a local
// choice of where to look.
module abcn_readout_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       srst,
  input  logic       bcr,
  input  logic       bc_en,
  input  logic       l1,            // accepted L1, one clock wide
  input  logic       master_b,      // masterB pin
  input  logic       cfg_master,    // CFG1 bit 11
  input  logic       cfg_end,       // CFG1 bit 12
  input  logic       cfg_feedthru,  // CFG1 bit 13
  input  logic       event_pending, // readout buffer or compression holds an event
  input  logic       rol_active,    // own readout logic busy
  input  logic       tokenin,       // token from the neighbour chip
  input  logic       rol_dataout,   // serial data from own readout logic
  output logic       rol_tokenin,   // token to own readout logic
  output logic       header_enable,
  output logic       trailer_enable,
  output logic       is_master,
  output logic       is_end,
  output logic       ldo,
  output logic       dataout,       // data port output (non-master)
  output logic [3:0] l1_count,
  output logic [7:0] bc_count,
  output logic       l1_seu,        // copies of the L1 counter disagreed
  output logic       bc_seu,        // copies of the BC counter disagreed
  output logic       waiting_trailer
);
  logic [16:0] hist;
  logic [2:0][3:0] l1_c;            // triple copies, voted and rewritten
  logic [2:0][7:0] bc_c;            // every clock (auto correction)
  logic [3:0]  l1_nx;
  logic [7:0]  bc_nx;
  logic        tok_gen, clkdiv2, trailer_seen;

  always_comb begin
    is_master      = ~(master_b | cfg_master);
    is_end         = ~is_master & cfg_end;
    header_enable  = is_master;
    trailer_enable = is_end;
    trailer_seen   = (hist == abcn_pkg::TRAILER);
    rol_tokenin    = is_master ? tok_gen : tokenin;
    ldo            = is_master ? (cfg_feedthru ? rol_dataout : clkdiv2) : 1'b0;
    dataout        = is_master ? 1'b0 : rol_dataout;
    l1_count       = (l1_c[0] & l1_c[1]) | (l1_c[1] & l1_c[2]) | (l1_c[0] & l1_c[2]);
    bc_count       = (bc_c[0] & bc_c[1]) | (bc_c[1] & bc_c[2]) | (bc_c[0] & bc_c[2]);
    l1_nx          = l1 ? l1_count + 4'd1 : l1_count;
    bc_nx          = bcr ? 8'd0 : (bc_en ? bc_count + 8'd1 : bc_count);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_c <= '0; bc_c <= '0; hist <= '0; tok_gen <= 1'b0;
      waiting_trailer <= 1'b0; clkdiv2 <= 1'b0; l1_seu <= 1'b0; bc_seu <= 1'b0;
    end else begin
      clkdiv2 <= ~clkdiv2;
      if (srst) begin
        l1_c <= '0; bc_c <= '0; hist <= '0; tok_gen <= 1'b0;
        waiting_trailer <= 1'b0; l1_seu <= 1'b0; bc_seu <= 1'b0;
      end else begin
        l1_c <= {3{l1_nx}};
        bc_c <= {3{bc_nx}};
        if (l1_c[0] != l1_count || l1_c[1] != l1_count || l1_c[2] != l1_count) l1_seu <= 1'b1;
        if (bc_c[0] != bc_count || bc_c[1] != bc_count || bc_c[2] != bc_count) bc_seu <= 1'b1;
        hist    <= {hist[15:0], rol_dataout};
        tok_gen <= 1'b0;
        if (!is_master) begin
          waiting_trailer <= 1'b0;
        end else if (waiting_trailer) begin
          if (trailer_seen) begin
            waiting_trailer <= 1'b0;
            hist <= '0;
          end
        end else if (event_pending && !rol_active && !tok_gen) begin
          tok_gen         <= 1'b1;
          waiting_trailer <= 1'b1;
        end
      end
    end
  end
endmodule
