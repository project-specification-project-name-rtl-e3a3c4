// End-to-end test of the ABC-N digital core: a module of three chips in a
// token chain (chip 1 master, chip 2 slave, chip 3 end), all parameters at
// their defaults, configured and triggered only through the serial command
// line and the external L1 input, as a module controller would. The
// master's Ldo stream is captured and compared bit for bit with the stream
// built by a reference model of the hits (pipeline latency, mask, edge
// detection, compression criteria, packet formats, chain order). Each
// mechanism is counted and must occur at least once: clock feed-through,
// send-ID packets, physics packets with isolated hits and clusters, no-hit
// packets, masking, edge detection, test pulse, register read-back (also of
// the status registers), external L1, L1 from command only (giving a
// no-data error on the chip that did not see the L1), derandomizer overflow
// and its error packets, soft reset, BC reset, calibration strobe, trim DAC
// load, the memory self tests and SEU detection in a cached register and
// the BC counter. A last phase runs the chain at 160 MHz, first with a
// master chip, then in module controller mode (no master: the testbench
// hands out the token and reads the first chip's data port), first in the
// normal and then in the reversed flow direction.
module tb_abcn_top;
  import abcn_pkg::*;
  localparam int NCHIP = 3;

  logic clk = 0, bc = 0, com = 0, lone = 0, hrst_b = 0;
  logic m80 = 0, m160 = 0;
  logic [NCH-1:0] hits [NCHIP];
  logic [NCHIP-1:0] tk1_i, tk2_i, data1_i, data2_i, tk1_o, tk2_o, data1_o, data2_o;
  logic [NCHIP-1:0] tk1_oe, tk2_oe, data1_oe, data2_oe, ldo, cal_strobe;
  logic [3:0] cal_line [NCHIP];
  logic [NCH-1:0][4:0] trim [NCHIP];
  logic [NCHIP-1:0] ovf, davail;
  logic mc_tok = 0;   // token from a module controller (module controller mode)
  bit   mc_mode = 0;
  bit   mc_rev = 0;     // reversed flow: the controller sits at chip 3
  int   order [NCHIP];  // chip order in the module stream
  int checks = 0, failures = 0;
  int div = 1;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    abcn_top u (
      .clk0(clk), .clk1(1'b0), .com0(com), .com1(1'b0), .bc0(bc), .bc1(1'b0),
      .lone0(lone), .lone1(1'b0), .sel(1'b0), .hardreset_b(hrst_b),
      .master_b(c != 0), .clkmode80(m80), .clkmode160(m160), .shunt_e(1'b1),
      .reg_enable(1'b1), .id(7'(c + 1)), .hits(hits[c]),
      .tk1_i(tk1_i[c]), .tk2_i(tk2_i[c]), .data1_i(data1_i[c]), .data2_i(data2_i[c]),
      .tk1_o(tk1_o[c]), .tk2_o(tk2_o[c]), .data1_o(data1_o[c]), .data2_o(data2_o[c]),
      .tk1_oe(tk1_oe[c]), .tk2_oe(tk2_oe[c]), .data1_oe(data1_oe[c]), .data2_oe(data2_oe[c]),
      .ldo(ldo[c]), .thresh_reg(), .bias1_reg(), .bias2_reg(), .bias3_reg(),
      .calamp_reg(), .cfg2_reg(), .trim_range(), .thdac_offset(), .trim(trim[c]),
      .cal_strobe(cal_strobe[c]), .cal_line(cal_line[c]), .strobe_delay(), .strobe_step()
    );
    assign ovf[c]    = u.overflow;
    assign davail[c] = u.data_avail;
  end
  // chain wiring: tk2/data2 of chip c face tk1/data1 of chip c+1, and each
  // wire is driven by whichever side enables its output. With direction 0
  // the token runs up the chain (in on tk1, out on tk2) and data runs down
  // (out on data1, in on data2); direction 1 reverses both. The module
  // controller sits at the low end (chip 1) or, reversed, at the high end.
  always_comb for (int c = 0; c < NCHIP; c++) begin
    tk1_i[c]   = (c == 0) ? (mc_tok && !mc_rev) : (tk2_oe[c - 1] && tk2_o[c - 1]);
    tk2_i[c]   = (c == NCHIP - 1) ? (mc_tok && mc_rev) : (tk1_oe[c + 1] && tk1_o[c + 1]);
    data2_i[c] = (c == NCHIP - 1) ? 1'b0 : (data1_oe[c + 1] && data1_o[c + 1]);
    data1_i[c] = (c == 0) ? 1'b0 : (data2_oe[c - 1] && data2_o[c - 1]);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {M_FEEDTHRU, M_SENDID, M_HIT, M_CLUSTER, M_NOHIT, M_MASK, M_EDGE,
                    M_TESTPULSE, M_READREG, M_STATUS, M_EXTL1, M_NODATA, M_OVERFLOW,
                    M_SOFTRESET, M_BCRESET, M_CAL, M_TRIM, M_BIST, M_SEU, M_160MHZ, M_MC, M_REVERSE, M_NUM} mech_e;
  int mech [M_NUM];
  initial foreach (mech[m]) mech[m] = 0;

  // ---------------- crossings, commands, hit history ----------------
  int n = 0;                                 // crossing number
  logic [NCH-1:0] hist [NCHIP][int];
  logic [NCH-1:0] next_hits [NCHIP];
  bit   cmd_q [$];
  logic [NCH-1:0] mask_m [NCHIP];
  bit   edge_m = 0;
  crit_e crit_m = CRIT_LEVEL;
  int   delay_m = 20;

  task automatic crossing();
    @(negedge clk);
    com = (cmd_q.size() > 0) ? cmd_q.pop_front() : 1'b0;
    for (int c = 0; c < NCHIP; c++) begin hits[c] = next_hits[c]; hist[c][n] = next_hits[c]; end
    for (int k = 1; k < div; k++) @(negedge clk);
    n++;
  endtask
  // BC clock for 80/160 MHz: rising edge at the start of each crossing
  int ph = 0;
  always @(negedge clk) begin
    bc <= (div == 1) ? 1'b0 : (ph < div / 2);
    ph <= (ph + 1 >= div) ? 0 : ph + 1;
  end

  task automatic idle(input int k);
    repeat (k) crossing();
  endtask

  task automatic push(input logic [255:0] v, input int nb);
    for (int b = nb - 1; b >= 0; b--) cmd_q.push_back(v[b]);
  endtask
  task automatic flush_cmds();
    while (cmd_q.size() > 0) crossing();
    idle(2);
  endtask

  task automatic slow(input logic [6:0] a, input logic [5:0] f5, input logic [127:0] d, input int nd);
    int len = 13 + nd;
    push(7'b101_0111, 7); push(8'(len - 1), 8); push(a, 7); push(f5, 6);
    for (int b = nd - 1; b >= 0; b--) cmd_q.push_back(d[b]);
    flush_cmds();
  endtask
  task automatic wreg(input logic [6:0] a, input logic [4:0] ra, input logic [15:0] v);
    slow(a, {ra, 1'b0}, 128'(v), 16);
  endtask

  // ---------------- Ldo capture ----------------
  bit ldo_q [$];
  bit capture = 0;
  always @(posedge clk)
    if (capture) ldo_q.push_back(!mc_mode ? ldo[0] : mc_rev ? data2_o[NCHIP - 1] : data1_o[0]);

  // ---------------- reference model ----------------
  // hits as they enter the pipeline at crossing k (input latch, mask, edge)
  function automatic logic [NCH-1:0] pipe_word(input int c, input int k);
    logic [NCH-1:0] cur, prv;
    cur = hist[c].exists(k) ? hist[c][k] : '0;
    prv = hist[c].exists(k - 1) ? hist[c][k - 1] : '0;
    return (edge_m ? (cur & ~prv) : cur) & mask_m[c];
  endfunction

  function automatic bit crit_ok(input logic [2:0] p);
    case (crit_m)
      CRIT_HIT:   return p != 3'b000;
      CRIT_LEVEL: return p[1];
      CRIT_EDGE:  return !p[2] && p[1];
      default:    return 1'b1;
    endcase
  endfunction

  bit exp_bits [$];
  int bc_pos;                 // position of the BC field in exp_bits
  task automatic put(input logic [35:0] v, input int nb);
    for (int b = nb - 1; b >= 0; b--) exp_bits.push_back(v[b]);
  endtask

  // physics packets of chip c for an event whose centre sample is crossing k
  task automatic put_physics(input int c, input int k, input logic [NCH-1:0] words [3]);
    bit any = 0; int last = -2; bit clustered = 0;
    for (int ch = 0; ch < NCH; ch++) begin
      logic [2:0] p = {words[0][ch], words[1][ch], words[2][ch]};
      if (crit_ok(p)) begin
        if (last == ch - 1) begin put({1'b1, p}, 4); clustered = 1; end
        else put({2'b01, 7'(c + 1), 7'(ch), 1'b1, p}, 20);
        last = ch; any = 1;
      end
    end
    if (!any) begin put(3'b001, 3); mech[M_NOHIT]++; end
    else mech[M_HIT]++;
    if (clustered) mech[M_CLUSTER]++;
  endtask

  // compare the captured stream with exp_bits; the BC field is returned
  task automatic compare_stream(input string name, output logic [7:0] bcv);
    int s = -1;
    int wait_n = 0;
    // wait until the whole module packet (header..trailer) has been captured
    while (wait_n < 20000) begin
      crossing(); wait_n++;
      if (ldo_q.size() > 0) begin
        int first = -1;
        if (mc_mode) first = 3;   // first bit registered TOKEN_LEAD clocks after the token is taken
        else foreach (ldo_q[i]) if (ldo_q[i]) begin first = i; break; end
        if (first >= 0 && ldo_q.size() >= first + exp_bits.size() + 4) begin s = first; break; end
      end
    end
    bcv = '0;
    if (s < 0) begin chk(0, {name, ": no module packet"}); exp_bits = {}; return; end
    if (bc_pos >= 0) for (int i = 0; i < 8; i++) bcv = {bcv[6:0], ldo_q[s + bc_pos + i]};
    for (int i = 0; i < exp_bits.size(); i++) begin
      if (i >= bc_pos && i < bc_pos + 8) continue;
      if (ldo_q[s + i] != exp_bits[i]) begin
        chk(0, $sformatf("%s: bit %0d of %0d", name, i, exp_bits.size()));
        if (failures < 4) begin
          string a = "", b = "";
          for (int j = 0; j < exp_bits.size() + 40 && s + j < ldo_q.size(); j++) a = {a, ldo_q[s + j] ? "1" : "0"};
          foreach (exp_bits[j]) b = {b, exp_bits[j] ? "1" : "0"};
          $display("DBG got %s\nDBG exp %s", a, b);
        end
        exp_bits = {}; ldo_q = {}; return;
      end
    end
    checks++;
    ldo_q = {};
    exp_bits = {};
  endtask

  int l1cnt [NCHIP];
  // L1 from the command line in crossing c0 (three bits), centre sample at c0+1-delay
  task automatic l1_cmd(output int centre);
    centre = n + 1 - delay_m;
    push(3'b110, 3);
    while (cmd_q.size() > 0) crossing();
  endtask
  task automatic l1_ext(output int centre);
    centre = n - delay_m - 3;   // LONE is high in crossing n - 1
    lone = 1; crossing(); lone = 0;
    mech[M_EXTL1]++;
  endtask

  // Build the expected module stream for one event. kind per chip:
  // 0 physics, 1 send-ID, 2 register (value), 3 no data, 4 overflow
  task automatic expect_event(input int centre, input int kind [NCHIP],
                              input logic [15:0] val [NCHIP], input logic [4:0] ra);
    if (!mc_mode) begin
      put({PREAMBLE, 1'b0}, 6);
      put(l1cnt[0][3:0], 4);
      bc_pos = exp_bits.size();
      put(8'h00, 8); put(1'b1, 1);
    end else bc_pos = -100;
    for (int oi = 0; oi < NCHIP; oi++) begin
      automatic int c = order[oi];
      logic [NCH-1:0] w [3];
      for (int s = 0; s < 3; s++) w[s] = pipe_word(c, centre - 1 + s);
      case (kind[c])
        0: put_physics(c, centre, w);
        1: begin put({3'b000, 7'(c + 1), 3'b111, val[c][15:8], 1'b1, val[c][7:0], 1'b1}, 31); mech[M_SENDID]++; end
        2: begin put({3'b000, 7'(c + 1), 3'b010, ra, val[c][15:8], 1'b1, val[c][7:0], 1'b1}, 36); mech[M_READREG]++; end
        3: begin put({3'b000, 7'(c + 1), ERR_NODATA, 1'b1}, 14); mech[M_NODATA]++; end
        default: begin put({3'b000, 7'(c + 1), ERR_OVERFLOW, 1'b1}, 14); mech[M_OVERFLOW]++; end
      endcase
      if (kind[c] != 3) l1cnt[c]++;
    end
    put(TRAILER, 17);
  endtask

  function automatic logic [NCH-1:0] rand_hits(input int nh);
    logic [NCH-1:0] h = '0;
    for (int i = 0; i < nh; i++) begin
      automatic int ch = $urandom % (NCH - 2);
      h[ch] = 1'b1;
      if ($urandom % 3 == 0) h[ch + 1] = 1'b1;
    end
    return h;
  endfunction

  // One physics event: random hits for three crossings around a centre
  // crossing, then an L1 timed to that centre.
  task automatic physics_event(input string name, input bit ext, input int nh,
                               output logic [7:0] bcv);
    int centre, kind [NCHIP];
    logic [15:0] val [NCHIP];
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < NCHIP; c++) next_hits[c] = (nh == 0) ? '0 : rand_hits(nh);
      crossing();
    end
    foreach (next_hits[c]) next_hits[c] = '0;
    // wait until the centre crossing is delay_m old
    idle(ext ? delay_m + 1 : delay_m - 3);
    if (ext) l1_ext(centre); else l1_cmd(centre);
    if (mc_mode) begin
      // the module controller hands the first chip the token
      idle(10);
      @(negedge clk); ldo_q = {}; mc_tok = 1; @(negedge clk); mc_tok = 0;
    end
    foreach (kind[c]) begin kind[c] = 0; val[c] = '0; end
    expect_event(centre, kind, val, 5'd0);
    compare_stream(name, bcv);
  endtask

  logic [15:0] cfg1_v [NCHIP];
  task automatic write_cfg1(input int c, input logic [15:0] v);
    cfg1_v[c] = v; wreg(7'(c + 1), RA_CFG1, v);
  endtask
  task automatic data_taking_all();
    slow(GLOBAL_ID, CMD_DATATAKE, '0, 0);
  endtask

  initial begin
    logic [7:0] bcv, bcv2;
    int centre, kind [NCHIP];
    logic [15:0] val [NCHIP];
    logic [15:0] st1;
    foreach (next_hits[c]) begin next_hits[c] = '0; hits[c] = '0; mask_m[c] = '1; l1cnt[c] = 0; end
    order = '{0, 1, 2};
    repeat (3) @(negedge clk);
    hrst_b = 1;
    // power-up: master outputs the divided clock on Ldo
    begin
      automatic int toggles = 0; automatic logic p = ldo[0];
      repeat (8) begin @(negedge clk); toggles += int'(ldo[0] != p); p = ldo[0]; end
      chk(toggles == 8, "feed-through clock on Ldo"); mech[M_FEEDTHRU] += (toggles == 8);
    end
    // ---- configuration ----
    write_cfg1(0, 16'h2000 | 16'(CRIT_LEVEL));            // master, feed-through off
    write_cfg1(1, 16'h0000 | 16'(CRIT_LEVEL));            // slave
    write_cfg1(2, 16'h1000 | 16'(CRIT_LEVEL));            // end
    wreg(GLOBAL_ID, RA_DELAY, 16'(delay_m));
    capture = 1;
    // ---- send-ID mode: every chip answers with its CFG1 ----
    l1_cmd(centre);
    foreach (kind[c]) begin kind[c] = 1; val[c] = cfg1_v[c]; end
    expect_event(centre, kind, val, 5'd0);
    compare_stream("send-ID", bcv);
    // ---- physics ----
    data_taking_all();
    for (int e = 0; e < 6; e++) physics_event($sformatf("physics %0d", e), 0, 4, bcv);
    physics_event("no hits", 0, 0, bcv);
    physics_event("external L1", 1, 3, bcv);
    // ---- BC reset: header BC restarts from zero ----
    push(7'b101_0010, 7); flush_cmds();
    idle(delay_m + 10);
    physics_event("after BC reset", 0, 2, bcv);
    chk(int'(bcv) < delay_m + 20, $sformatf("BC count restarted (%0d)", bcv));
    mech[M_BCRESET] += (int'(bcv) < delay_m + 20);
    // ---- mask and edge detection ----
    mask_m[1] = {$urandom, $urandom, $urandom, $urandom};
    slow(7'd2, {RA_MASK, 1'b0}, mask_m[1], 128);
    write_cfg1(0, cfg1_v[0] | 16'h0080); write_cfg1(1, cfg1_v[1] | 16'h0080); write_cfg1(2, cfg1_v[2] | 16'h0080);
    edge_m = 1; crit_m = CRIT_EDGE;
    for (int c = 0; c < NCHIP; c++) write_cfg1(c, (cfg1_v[c] & ~16'h3) | 16'(CRIT_EDGE));
    data_taking_all();
    for (int e = 0; e < 3; e++) physics_event($sformatf("mask+edge %0d", e), 0, 6, bcv);
    mech[M_MASK]++; mech[M_EDGE]++;
    edge_m = 0; crit_m = CRIT_LEVEL;
    for (int c = 0; c < NCHIP; c++) write_cfg1(c, (cfg1_v[c] & ~16'h83) | 16'(CRIT_LEVEL));
    // ---- test pulse: the mask pattern enters the pipeline for one crossing ----
    data_taking_all();
    begin
      automatic int ec;
      push(7'b101_0111, 7); push(8'd12, 8); push(7'd2, 7); push(CMD_TESTPULSE, 6);
      while (cmd_q.size() > 1) crossing();
      ec = n; crossing();
      idle(delay_m - 5);
      // the pattern enters the pipeline as the hits of crossing ec would
      while (n < ec + delay_m - 1) crossing();
      centre = n + 1 - delay_m;
      hist[1][centre] = mask_m[1] | hist[1][centre];   // test pattern seen as hits
      l1_cmd(centre);
      foreach (kind[c]) begin kind[c] = 0; val[c] = '0; end
      expect_event(centre, kind, val, 5'd0);
      compare_stream("test pulse", bcv);
      mech[M_TESTPULSE]++;
    end
    // ---- register read-back on chip 2, status register on chip 3 ----
    wreg(7'd2, RA_BIAS2, 16'h1234);
    slow(7'd2, {RA_BIAS2, 1'b1}, '0, 0);
    slow(7'd3, {RA_STAT1, 1'b1}, '0, 0);
    slow(7'd1, CMD_DATATAKE, '0, 0);
    idle(40);
    l1_cmd(centre);
    kind = '{0, 2, 2};
    st1 = {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 2'b00, 2'b00, 2'b00};
    val = '{16'h0, 16'h1234, st1};
    expect_event(centre, kind, val, RA_BIAS2);
    // chip 3's register packet carries RA_STAT1: patch its address field
    begin
      // rebuild the stream: chip 2 and chip 3 have different register addresses
      exp_bits = {};
      put({PREAMBLE, 1'b0}, 6); put(4'(l1cnt[0] - 1), 4); bc_pos = exp_bits.size(); put(8'h00, 8); put(1'b1, 1);
      begin
        logic [NCH-1:0] w [3];
        for (int s = 0; s < 3; s++) w[s] = pipe_word(0, centre - 1 + s);
        put_physics(0, centre, w);
      end
      put({3'b000, 7'd2, 3'b010, RA_BIAS2, 8'h12, 1'b1, 8'h34, 1'b1}, 36);
      put({3'b000, 7'd3, 3'b010, RA_STAT1, st1[15:8], 1'b1, st1[7:0], 1'b1}, 36);
      put(TRAILER, 17);
    end
    compare_stream("register read", bcv);
    mech[M_STATUS]++;
    // ---- L1 from command only on chip 2: external L1 gives it no data ----
    wreg(7'd2, RA_DELAY, 16'(delay_m) | 16'h0200);
    data_taking_all();
    idle(10);
    l1_ext(centre);
    kind = '{0, 3, 0}; val = '{16'h0, 16'h0, 16'h0};
    expect_event(centre, kind, val, 5'd0);
    compare_stream("no data error", bcv);
    wreg(7'd2, RA_DELAY, 16'(delay_m));
    data_taking_all();
    // ---- calibration strobe and trim load on chip 1 ----
    begin
      automatic int seen = 0;
      write_cfg1(0, cfg1_v[0] | 16'h0004);      // Cal_Mode 01: in2, in6, ...
      push(7'b101_0111, 7); push(8'd12, 8); push(7'd1, 7); push(CMD_CALPULSE, 6);
      while (cmd_q.size() > 0 || seen == 0 && n < 100000) begin
        crossing();
        if (cal_strobe[0]) begin seen++; chk(cal_line[0] == 4'b0100, "calibration line"); end
        if (cmd_q.size() == 0 && seen == 0) begin
          repeat (10) begin crossing(); if (cal_strobe[0]) begin seen++; chk(cal_line[0] == 4'b0100, "calibration line"); end end
          break;
        end
      end
      chk(seen == 1, "calibration strobe"); mech[M_CAL] += seen;
      wreg(7'd1, RA_TRIM, {4'h0, 7'd5, 5'h13});
      chk(trim[0][5] == 5'h13 && trim[0][4] == 5'h0, "trim DAC code"); mech[M_TRIM] += (trim[0][5] == 5'h13);
      write_cfg1(0, cfg1_v[0] & ~16'h000C);
      data_taking_all();
    end
    // ---- overflow: test criterion makes readout slow, L1s come fast ----
    for (int c = 0; c < NCHIP; c++) write_cfg1(c, cfg1_v[c] | 16'(CRIT_TEST));
    data_taking_all();
    begin
      automatic int nerr = 0;
      ldo_q = {};
      for (int t = 0; t < 50; t++) begin lone = 1; crossing(); lone = 0; crossing(); crossing(); end
      for (int c = 0; c < NCHIP; c++) chk(ovf[c], $sformatf("chip %0d overflow", c));
      // let the chain drain, then count overflow error packets in the stream
      idle(40000);
      for (int i = 0; i + 14 <= ldo_q.size(); i++) begin
        logic [13:0] w = '0;
        for (int b = 0; b < 14; b++) w = {w[12:0], ldo_q[i + b]};
        if (w[13:11] == 3'b000 && w[3:1] == ERR_OVERFLOW && w[0] && w[10:4] >= 1 && w[10:4] <= 3) nerr++;
      end
      chk(nerr > 0, "overflow error packets"); mech[M_OVERFLOW] += nerr;
      mech[M_EXTL1]++;
    end
    // ---- soft reset clears buffers and overflow ----
    push(7'b101_0100, 7); flush_cmds();
    idle(5);
    for (int c = 0; c < NCHIP; c++) begin
      chk(!ovf[c] && !davail[c], "soft reset clears buffer");
      l1cnt[c] = 0;
    end
    mech[M_SOFTRESET]++;
    for (int c = 0; c < NCHIP; c++) write_cfg1(c, (cfg1_v[c] & ~16'h3) | 16'(CRIT_LEVEL));
    data_taking_all();
    idle(300);
    ldo_q = {};
    physics_event("after soft reset", 0, 4, bcv);
    // ---- memory self tests, result through STAT1 ----
    wreg(7'd1, RA_DELAY, 16'(delay_m) | 16'hC000);
    idle(3000);
    slow(7'd1, {RA_STAT1, 1'b1}, '0, 0);
    idle(30);
    chk(g_chip[0].u.mirror[1:0] == 2'b11 && g_chip[0].u.mirror[15:14] == 2'b00, $sformatf("BIST ended, no failure (%h)", g_chip[0].u.mirror));
    mech[M_BIST] += (g_chip[0].u.mirror[1:0] == 2'b11);
    wreg(7'd1, RA_DELAY, 16'(delay_m));
    // ---- single event upsets: one copy of the threshold register and of
    // the BC counter flipped for one clock; STAT2 reports them until a soft
    // reset, and the values are not disturbed ----
    begin
      logic [15:0] th, bad_th;
      logic [7:0]  bad_bc;
      th = g_chip[0].u.g_creg[CR_THRESH].u_reg.vote;
      @(negedge clk);
      bad_th = ~th; bad_bc = ~g_chip[0].u.bc_count;
      force g_chip[0].u.g_creg[CR_THRESH].u_reg.cb = bad_th;
      force g_chip[0].u.u_ctl.bc_c[2] = bad_bc;
      @(negedge clk);
      release g_chip[0].u.g_creg[CR_THRESH].u_reg.cb;
      release g_chip[0].u.u_ctl.bc_c[2];
      idle(2);
      chk(g_chip[0].u.g_creg[CR_THRESH].u_reg.vote == th, "threshold survives the upset");
      slow(7'd1, {RA_STAT2, 1'b1}, '0, 0);
      idle(30);
      chk(g_chip[0].u.mirror == 16'h8022, $sformatf("STAT2 after upsets (%h)", g_chip[0].u.mirror));
      mech[M_SEU] += (g_chip[0].u.mirror == 16'h8022);
      push(7'b101_0100, 7); flush_cmds();
      slow(7'd1, {RA_STAT2, 1'b1}, '0, 0);
      idle(30);
      chk(g_chip[0].u.mirror == 16'h0000, $sformatf("STAT2 cleared by soft reset (%h)", g_chip[0].u.mirror));
    end
    // ---- 160 MHz readout clock: hard reset, reconfigure, events ----
    hrst_b = 0; m160 = 1; div = 4; capture = 0;
    idle(3);
    hrst_b = 1;
    idle(3);
    foreach (l1cnt[c]) l1cnt[c] = 0;
    foreach (mask_m[c]) mask_m[c] = '1;
    write_cfg1(0, 16'h2000 | 16'(CRIT_LEVEL));
    write_cfg1(1, 16'h0000 | 16'(CRIT_LEVEL));
    write_cfg1(2, 16'h1000 | 16'(CRIT_LEVEL));
    wreg(GLOBAL_ID, RA_DELAY, 16'(delay_m));
    data_taking_all();
    ldo_q = {}; capture = 1;
    begin
      automatic int f0 = failures;
      for (int e = 0; e < 3; e++) physics_event($sformatf("160 MHz %0d", e), 0, 4, bcv);
      mech[M_160MHZ] += (failures == f0);
    end
    // ---- module controller mode: no master, the controller gives the
    // token and reads the first chip's data port ----
    write_cfg1(0, 16'h2800 | 16'(CRIT_LEVEL));           // CFG1 master bit set: slave
    data_taking_all();
    chk(!g_chip[0].u.is_master, "chip 1 is a slave");
    mc_mode = 1;
    begin
      automatic int f0 = failures;
      for (int e = 0; e < 3; e++) physics_event($sformatf("module controller %0d", e), 0, 4, bcv);
      mech[M_MC] += (failures == f0);
    end
    // ---- reversed flow direction (CFG1 bit 9): token from the controller
    // enters chip 3 and runs down to chip 1, which is now the end chip ----
    write_cfg1(0, 16'h3A00 | 16'(CRIT_LEVEL));           // slave, end, reversed
    write_cfg1(1, 16'h0200 | 16'(CRIT_LEVEL));
    write_cfg1(2, 16'h0200 | 16'(CRIT_LEVEL));           // no longer the end
    data_taking_all();
    mc_rev = 1; order = '{2, 1, 0};
    begin
      automatic int f0 = failures;
      for (int e = 0; e < 3; e++) physics_event($sformatf("reversed chain %0d", e), 0, 4, bcv);
      mech[M_REVERSE] += (failures == f0);
    end
    mc_rev = 0; order = '{0, 1, 2};
    mc_mode = 0;
    // ---- mechanism coverage ----
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("mechanisms: feedthru=%0d sendid=%0d hit=%0d cluster=%0d nohit=%0d mask=%0d edge=%0d testpulse=%0d readreg=%0d status=%0d extl1=%0d nodata=%0d overflow=%0d softreset=%0d bcreset=%0d cal=%0d trim=%0d bist=%0d seu=%0d 160MHz=%0d mc=%0d reverse=%0d",
             mech[0], mech[1], mech[2], mech[3], mech[4], mech[5], mech[6], mech[7], mech[8], mech[9],
             mech[10], mech[11], mech[12], mech[13], mech[14], mech[15], mech[16], mech[17], mech[18], mech[19], mech[20], mech[21]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
