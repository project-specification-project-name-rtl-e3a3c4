// Readout (derandomizing) buffer. A FIFO of DEPTH words of W bits that holds
// the three samples of each accepted L1 trigger until the data compression
// logic has read them. Each event is three consecutive writes (wr, the
// pipeline's L1stretch strobe) and is later removed by three reads (rd,
// BufferRd). Data read appears on o one clock after rd.
// data_avail is high while at least one complete event is stored.
// Overflow: when an event starts to arrive while MAX_EVENTS events are
// already stored, its three words are dropped and the sticky overflow flag
// is set; only a hard or soft reset clears it (and empties the buffer).
// Size (180 x 128, 42 events), the flags and reset behaviour follow the
// specification; dropping the new event rather than overwriting the oldest is
// a local choice. The BIST controller takes over the memory while it runs.
module abcn_readout_buffer #(
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned W          = 180,
  parameter int unsigned MAX_EVENTS = 42,
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned EW        = $clog2(MAX_EVENTS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic [W-1:0] i,
  input  logic         wr,
  input  logic         rd,
  output logic [W-1:0] o,
  output logic         data_avail,
  output logic         overflow,
  output logic [EW-1:0] events,
  input  logic         bist_enable,
  output logic         bist_running,
  output logic         bist_ended,
  output logic         bist_fail
);
  logic [AW-1:0] wp, rp;
  logic [1:0]    wcnt, rcnt;       // word index within the event being written / read
  logic          drop;             // the event being written is dropped
  logic          w_ok, w_last, r_last;

  logic          b_we, b_re, m_we, m_re;
  logic [AW-1:0] b_wa, b_ra, m_wa, m_ra;
  logic [W-1:0]  b_wd, m_wd;

  always_comb begin
    w_ok   = wr && !((wcnt == 2'd0) ? (events == EW'(MAX_EVENTS)) : drop);
    w_last = wr && (wcnt == 2'd2) && !drop;
    r_last = rd && (rcnt == 2'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; wcnt <= '0; rcnt <= '0;
      drop <= 1'b0; overflow <= 1'b0; events <= '0;
    end else if (srst) begin
      wp <= '0; rp <= '0; wcnt <= '0; rcnt <= '0;
      drop <= 1'b0; overflow <= 1'b0; events <= '0;
    end else begin
      if (wr) begin
        wcnt <= (wcnt == 2'd2) ? 2'd0 : wcnt + 2'd1;
        if (wcnt == 2'd0) begin
          drop <= (events == EW'(MAX_EVENTS));
          if (events == EW'(MAX_EVENTS)) overflow <= 1'b1;
        end
      end
      if (w_ok) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd) begin
        rp   <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
        rcnt <= (rcnt == 2'd2) ? 2'd0 : rcnt + 2'd1;
      end
      events <= events + EW'(w_last) - EW'(r_last);
    end
  end

  assign data_avail = (events != '0);

  abcn_mem_bist #(.DEPTH(DEPTH), .W(W)) u_bist (
    .clk, .rst_n, .enable(bist_enable), .running(bist_running),
    .ended(bist_ended), .fail(bist_fail),
    .we(b_we), .wa(b_wa), .wd(b_wd), .re(b_re), .ra(b_ra), .rd(o)
  );

  always_comb begin
    m_we = bist_running ? b_we : w_ok;
    m_wa = bist_running ? b_wa : wp;
    m_wd = bist_running ? b_wd : i;
    m_re = bist_running ? b_re : rd;
    m_ra = bist_running ? b_ra : rp;
  end

  abcn_sdp_ram #(.DEPTH(DEPTH), .W(W)) u_ram (
    .clk, .we(m_we), .wa(m_wa), .wd(m_wd), .re(m_re), .ra(m_ra), .rd(o)
  );

  // A read is only legal when a complete event is stored.
  a_rd_legal: assert property (@(posedge clk) disable iff (!rst_n || srst)
                               (rd && rcnt == 2'd0) |-> data_avail);
endmodule
