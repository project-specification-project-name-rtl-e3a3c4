// Binary L1 latency pipeline. Each beam crossing (bc_en) one 144-bit word
// (128 hit bits, the 8-bit BC count, unused bits) is written at the write
// pointer of a circular memory built from two 128-deep dual-port RAM blocks
// (256 words, 6.4 us at 40 MHz). When an L1 trigger is accepted, the three
// words centred on the crossing written l1delay crossings earlier are read
// out on this and the next two crossings, oldest first: on each of those
// crossings the word at (write pointer - l1delay - 1) is read. Each word
// appears on o one clock later with o_valid high for one clock (this is the
// write strobe, L1stretch, of the readout buffer). An L1 that arrives while
// a three-word readout is still running is ignored (busy is high then).
// l1delay may be 0..255; at 255 the read address equals the write address and
// the RAM's read-first behaviour returns the word 256 crossings old.
// srst (soft reset) re-initialises the pointers and leaves the contents.
// Memory size, the three-sample readout and the BIST flags follow the
// specification; the L1-while-busy rule is a local choice.
module abcn_pipeline #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 144,
  parameter int unsigned NBANK = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic         bc_en,
  input  logic [W-1:0] i,
  input  logic         l1,
  input  logic [7:0]   l1delay,
  output logic [W-1:0] o,
  output logic         o_valid,
  output logic         busy,
  input  logic         bist_enable,
  output logic         bist_running,
  output logic         bist_ended,
  output logic         bist_fail
);
  localparam int unsigned BDEPTH = DEPTH / NBANK;
  localparam int unsigned BAW    = $clog2(BDEPTH);

  logic [AW-1:0] wp, rp;
  logic [1:0]    rcnt;             // reads still to issue
  logic          rd_now, rd_q;
  logic [$clog2(NBANK > 1 ? NBANK : 2)-1:0] rbank_q;

  // functional and BIST access ports (BIST addresses the full depth)
  logic          f_we, f_re, b_we, b_re, m_we, m_re;
  logic [AW-1:0] b_wa, b_ra, m_wa, m_ra;
  logic [W-1:0]  b_wd, m_wd, m_rd;
  logic [W-1:0]  bank_rd [NBANK];

  assign busy   = (rcnt != 2'd0);
  assign rd_now = bc_en && (busy || l1);
  assign rp     = wp - AW'(l1delay) - AW'(1);
  assign f_we   = bc_en;
  assign f_re   = rd_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      rcnt <= '0;
      rd_q <= 1'b0;
    end else if (srst) begin
      wp   <= '0;
      rcnt <= '0;
      rd_q <= 1'b0;
    end else begin
      rd_q <= rd_now && !bist_running;
      if (bc_en && !bist_running) begin
        wp <= wp + 1'b1;
        if (busy)    rcnt <= rcnt - 2'd1;
        else if (l1) rcnt <= 2'd2;
      end
    end
  end

  abcn_mem_bist #(.DEPTH(DEPTH), .W(W)) u_bist (
    .clk, .rst_n, .enable(bist_enable), .running(bist_running),
    .ended(bist_ended), .fail(bist_fail),
    .we(b_we), .wa(b_wa), .wd(b_wd), .re(b_re), .ra(b_ra), .rd(m_rd)
  );

  always_comb begin
    m_we = bist_running ? b_we : f_we;
    m_wa = bist_running ? b_wa : wp;
    m_wd = bist_running ? b_wd : i;
    m_re = bist_running ? b_re : f_re;
    m_ra = bist_running ? b_ra : rp;
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic sel_w, sel_r;
    assign sel_w = (m_wa / BDEPTH) == b;
    assign sel_r = (m_ra / BDEPTH) == b;
    abcn_sdp_ram #(.DEPTH(BDEPTH), .W(W)) u_ram (
      .clk,
      .we(m_we && sel_w), .wa(BAW'(m_wa % BDEPTH)), .wd(m_wd),
      .re(m_re && sel_r), .ra(BAW'(m_ra % BDEPTH)), .rd(bank_rd[b])
    );
  end

  always_ff @(posedge clk) if (m_re) rbank_q <= $bits(rbank_q)'(m_ra / BDEPTH);

  assign m_rd    = bank_rd[rbank_q];
  assign o       = m_rd;
  assign o_valid = rd_q;
endmodule
