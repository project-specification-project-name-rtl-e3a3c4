// Workload test of the ABC-N digital core at the conditions it is sized for:
// a three-chip chain (master, slave, end) at 40 MHz with all parameters at
// their defaults, 1% strip occupancy (every channel of every chip is hit with
// probability 1/100 on each crossing), an L1 latency of 240 crossings (6 us)
// and external L1 triggers at a mean rate of 100 kHz (exponentially
// distributed spacing, mean 400 crossings, at least 5). The master's Ldo
// stream is decoded packet by packet as a module controller would, and each
// event is compared with the hits a reference model expects under the X1X
// (level) criterion: chip, channel and the three samples of every hit, the
// L1 count in the header and the trailer. Checked as well: no error packet
// and no derandomizer overflow for the whole run (the buffer must absorb
// the trigger bursts without data loss), every event read out, and the
// largest backlog of triggers still waiting to be read out. The peak backlog
// and the longest trigger-to-header delay are printed.
module tb_abcn_workload;
  import abcn_pkg::*;
  localparam int NCHIP   = 3;
  localparam int NTRIG   = 150;
  localparam int DELAY   = 240;
  localparam int MEAN_SP = 400;

  logic clk = 0, com = 0, lone = 0, hrst_b = 0;
  logic [NCH-1:0] hits [NCHIP];
  logic [NCHIP-1:0] tk1_i, tk2_i, data1_i, data2_i, tk1_o, tk2_o, data1_o, data2_o;
  logic [NCHIP-1:0] tk1_oe, tk2_oe, data1_oe, data2_oe, ldo, cal_strobe;
  logic [3:0] cal_line [NCHIP];
  logic [NCH-1:0][4:0] trim [NCHIP];
  logic [NCHIP-1:0] ovf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    abcn_top u (
      .clk0(clk), .clk1(1'b0), .com0(com), .com1(1'b0), .bc0(1'b0), .bc1(1'b0),
      .lone0(lone), .lone1(1'b0), .sel(1'b0), .hardreset_b(hrst_b),
      .master_b(c != 0), .clkmode80(1'b0), .clkmode160(1'b0), .shunt_e(1'b1),
      .reg_enable(1'b1), .id(7'(c + 1)), .hits(hits[c]),
      .tk1_i(tk1_i[c]), .tk2_i(tk2_i[c]), .data1_i(data1_i[c]), .data2_i(data2_i[c]),
      .tk1_o(tk1_o[c]), .tk2_o(tk2_o[c]), .data1_o(data1_o[c]), .data2_o(data2_o[c]),
      .tk1_oe(tk1_oe[c]), .tk2_oe(tk2_oe[c]), .data1_oe(data1_oe[c]), .data2_oe(data2_oe[c]),
      .ldo(ldo[c]), .thresh_reg(), .bias1_reg(), .bias2_reg(), .bias3_reg(),
      .calamp_reg(), .cfg2_reg(), .trim_range(), .thdac_offset(), .trim(trim[c]),
      .cal_strobe(cal_strobe[c]), .cal_line(cal_line[c]), .strobe_delay(), .strobe_step()
    );
    assign ovf[c] = u.overflow;
  end
  // chain: token up the chain on tk2 -> tk1, data down on data1 -> data2
  always_comb for (int c = 0; c < NCHIP; c++) begin
    tk1_i[c]   = (c == 0) ? 1'b0 : (tk2_oe[c - 1] && tk2_o[c - 1]);
    tk2_i[c]   = (c == NCHIP - 1) ? 1'b0 : (tk1_oe[c + 1] && tk1_o[c + 1]);
    data2_i[c] = (c == NCHIP - 1) ? 1'b0 : (data1_oe[c + 1] && data1_o[c + 1]);
    data1_i[c] = (c == 0) ? 1'b0 : (data2_oe[c - 1] && data2_o[c - 1]);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- crossings and commands ----------------
  int n = 0;
  logic [NCH-1:0] hist [NCHIP][int];
  bit cmd_q [$];
  bit occupancy_on = 0;

  function automatic logic [NCH-1:0] rand_occ();
    logic [NCH-1:0] h = '0;
    for (int ch = 0; ch < NCH; ch++) h[ch] = ($urandom % 100) == 0;
    return h;
  endfunction

  task automatic crossing();
    @(negedge clk);
    com = (cmd_q.size() > 0) ? cmd_q.pop_front() : 1'b0;
    for (int c = 0; c < NCHIP; c++) begin
      hits[c] = occupancy_on ? rand_occ() : '0;
      hist[c][n] = hits[c];
      if (hist[c].exists(n - 600)) hist[c].delete(n - 600);
    end
    n++;
  endtask
  task automatic push(input logic [63:0] v, input int nb);
    for (int b = nb - 1; b >= 0; b--) cmd_q.push_back(v[b]);
  endtask
  task automatic wreg(input logic [6:0] a, input logic [4:0] ra, input logic [15:0] v);
    push(7'b101_0111, 7); push(8'd28, 8); push(a, 7); push({ra, 1'b0}, 6); push(v, 16);
    while (cmd_q.size() > 0) crossing();
    repeat (2) crossing();
  endtask

  // ---------------- expected events ----------------
  // one entry per hit: {chip, channel, samples}; -1 marks a no-hit packet of a chip
  typedef int ev_t [$];
  ev_t exp_ev [$];
  int  trig_n [$];     // crossing of each trigger, for the latency figure
  int  sent = 0, got = 0;

  task automatic trigger();
    int centre = n - DELAY - 3;   // LONE is high in crossing n - 1
    ev_t e;
    lone = 1; crossing(); lone = 0;
    for (int c = 0; c < NCHIP; c++) begin
      bit any = 0;
      for (int ch = 0; ch < NCH; ch++) begin
        logic [2:0] p = {hist[c][centre - 1][ch], hist[c][centre][ch], hist[c][centre + 1][ch]};
        if (p[1]) begin e.push_back((c << 10) | (ch << 3) | int'(p)); any = 1; end
      end
      if (!any) e.push_back(-1);
    end
    exp_ev.push_back(e);
    trig_n.push_back(n);
    sent++;
  endtask

  // ---------------- stream decoder ----------------
  int max_wait = 0, nhits = 0, nclus = 0, nnohit = 0;
  task automatic getb(output bit b);
    @(posedge clk); b = ldo[0];
  endtask
  task automatic getv(input int nb, output int v);
    bit b; v = 0;
    for (int i = 0; i < nb; i++) begin getb(b); v = (v << 1) | int'(b); end
  endtask

  function automatic bit same(input ev_t a, input ev_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin : decoder
    bit b;
    int v, l1 = 0;
    wait (occupancy_on);   // Ldo carries the feed-through clock until configured
    forever begin
      automatic ev_t e;
      automatic int id = 0, ch = 0, t0 = 0;
      automatic bit done = 0;
      // wait for the start of a header
      do getb(b); while (!b);
      t0 = n;
      getv(18, v);
      chk(v[17:14] == 4'b1101 && !v[13] && v[0], $sformatf("header %h", v));
      chk(v[12:9] == (l1 & 15), $sformatf("L1 count %0d, expected %0d", v[12:9], l1 & 15));
      l1++;
      while (!done) begin
        getb(b);
        if (b) begin
          getv(3, v);
          if (v == 0) begin            // trailer
            getv(13, v); chk(v == 0, "trailer");
            done = 1;
          end else begin               // cluster continuation
            ch++; e.push_back((id - 1) << 10 | (ch << 3) | v); nclus++;
          end
        end else begin
          getb(b);
          if (b) begin                 // isolated hit
            getv(7, id); getv(7, ch); getv(1, v); chk(v == 1, "hit separator");
            getv(3, v); e.push_back((id - 1) << 10 | (ch << 3) | v); nhits++;
          end else begin
            getb(b);
            if (b) begin e.push_back(-1); nnohit++; end
            else begin
              getv(7, id); getv(3, v);
              chk(0, $sformatf("error/config packet code %b from chip %0d", v[2:0], id));
              getv(1, v);
            end
          end
        end
      end
      got++;
      if (exp_ev.size() == 0) chk(0, "event without a trigger");
      else begin
        automatic ev_t x = exp_ev.pop_front();
        automatic int tn = trig_n.pop_front();
        if (t0 - tn > max_wait) max_wait = t0 - tn;
        // no-hit packets carry no chip id: compare them by count and position
        if (!same(e, x) && failures < 2) begin
          foreach (e[i]) $display("DBG got c%0d ch%0d %b", e[i] >> 10, (e[i] >> 3) & 127, e[i][2:0]);
          foreach (x[i]) $display("DBG exp c%0d ch%0d %b", x[i] >> 10, (x[i] >> 3) & 127, x[i][2:0]);
        end
        chk(same(e, x), $sformatf("event %0d: %0d entries, expected %0d", got, e.size(), x.size()));
      end
    end
  end

  // ---------------- stimulus ----------------
  int backlog_max = 0;
  initial begin
    for (int c = 0; c < NCHIP; c++) hits[c] = '0;
    repeat (3) @(negedge clk);
    hrst_b = 1;
    wreg(7'd1, RA_CFG1, 16'h2000 | 16'(CRIT_LEVEL));   // master, feed-through off
    wreg(7'd2, RA_CFG1, 16'h0000 | 16'(CRIT_LEVEL));   // slave
    wreg(7'd3, RA_CFG1, 16'h1000 | 16'(CRIT_LEVEL));   // end of chain
    wreg(GLOBAL_ID, RA_DELAY, 16'(DELAY));
    push(7'b101_0111, 7); push(8'd12, 8); push(GLOBAL_ID, 7); push(CMD_DATATAKE, 6);
    while (cmd_q.size() > 0) crossing();
    occupancy_on = 1;
    repeat (DELAY + 10) crossing();
    for (int t = 0; t < NTRIG; t++) begin
      automatic real u = real'(($urandom % 1000000) + 1) / 1000000.0;
      automatic int sp = int'(-real'(MEAN_SP) * $ln(u));
      if (sp < 5) sp = 5;
      repeat (sp - 1) begin
        crossing();
        if (sent - got > backlog_max) backlog_max = sent - got;
      end
      trigger();
    end
    occupancy_on = 0;
    repeat (3000) crossing();
    chk(got == sent, $sformatf("events read out %0d of %0d", got, sent));
    chk(exp_ev.size() == 0, "no event left behind");
    chk(ovf == '0, "no derandomizer overflow");
    chk(nhits > 0 && nclus > 0 && nnohit > 0, $sformatf("hits %0d clusters %0d no-hit %0d", nhits, nclus, nnohit));
    chk(backlog_max < 42, $sformatf("backlog %0d", backlog_max));
    $display("workload: triggers=%0d events=%0d hits=%0d cluster_hits=%0d nohit=%0d peak_backlog=%0d max_trigger_to_header=%0d crossings",
             sent, got, nhits, nclus, nnohit, backlog_max, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
