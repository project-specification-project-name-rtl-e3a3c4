// ABC-N digital core: binary readout of 128 silicon-strip channels.
// Each beam crossing the latched discriminator outputs (masked, optionally
// edge-detected) enter a 256-deep pipeline with the BC count. An L1 trigger
// (serial command or external LONE input) copies the three crossings around
// the triggered one into the 42-event derandomizing buffer, tagged with the
// L1 and BC counts. The data compression logic scans each stored event for
// channels whose 3-bit pattern meets the selected criterion, and the
// readout logic serializes the result on token arrival, forwarding the data
// of the chips further down the chain. A master chip starts each readout by
// itself, sends the module header and streams the chain's data on Ldo; the
// end chip appends the trailer. A serial command decoder loads the
// SEU-protected configuration registers, the mask, calibration delay and
// trim registers, reads any register back, and switches the chip between
// send-ID, read-register and data-taking modes.
// Clocking: everything runs on the selected readout clock (40/80/160 MHz);
// beam-crossing-rate logic advances on bc_en. The analog front end, DACs,
// calibration chopper and delay line, regulators and pads are not part of
// this RTL: their digital controls are brought out as ports and the
// discriminator outputs come in as "hits". Bidirectional pads appear as
// input, output and output-enable. Block structure and register map follow
// the specification; the single clock domain is a local choice.
module abcn_top
  import abcn_pkg::*;
(
  // redundant clock / command inputs (receiver outputs)
  input  logic              clk0, clk1,
  input  logic              com0, com1,
  input  logic              bc0,  bc1,
  input  logic              lone0, lone1,
  input  logic              sel,
  // static pins
  input  logic              hardreset_b,
  input  logic              master_b,
  input  logic              clkmode80,
  input  logic              clkmode160,
  input  logic              shunt_e,
  input  logic              reg_enable,
  input  logic [6:0]        id,
  // discriminator outputs of the analog front end
  input  logic [NCH-1:0]    hits,
  // token and data ports
  input  logic              tk1_i, tk2_i, data1_i, data2_i,
  output logic              tk1_o, tk2_o, data1_o, data2_o,
  output logic              tk1_oe, tk2_oe, data1_oe, data2_oe,
  output logic              ldo,
  // controls for the analog parts
  output logic [15:0]       thresh_reg,
  output logic [15:0]       bias1_reg,
  output logic [15:0]       bias2_reg,
  output logic [15:0]       bias3_reg,
  output logic [15:0]       calamp_reg,
  output logic [15:0]       cfg2_reg,
  output logic [2:0]        trim_range,
  output logic [1:0]        thdac_offset,
  output logic [NCH-1:0][4:0] trim,
  output logic              cal_strobe,
  output logic [3:0]        cal_line,
  output logic [5:0]        strobe_delay,
  output logic [1:0]        strobe_step
);
  logic clk, command, bc, lone, rst_n, bc_en;
  logic [1:0] rate;

  assign rst_n = hardreset_b;

  abcn_io_select u_sel (
    .sel, .clk0, .clk1, .com0, .com1, .bc0, .bc1, .lone0, .lone1,
    .clk, .command, .bc, .lone
  );

  abcn_clock_rate u_rate (
    .clk, .rst_n, .bc, .clkmode80, .clkmode160, .bc_en, .rate
  );

  // ---------------- command decoder and registers ----------------
  logic              dec_l1, srst, bcr, test_pulse, cal_pulse;
  chip_mode_e        chip_mode;
  logic              sdata, sh_mask, sh_caldly, sh_trim, rot_serial, trim_load;
  logic [NCREG-1:0]  sh_creg, ld_creg, rd_creg, creg_dout, creg_parity, creg_seu;
  logic [15:0]       creg_q [NCREG];
  logic [15:0]       caldly_q, trims_q, stat1, stat2, mirror;
  logic [4:0]        cregister;
  logic              sc_unused, fc_unused, parity_err;

  abcn_command_decoder u_dec (
    .clk, .rst_n, .bc_en, .command, .id,
    .l1(dec_l1), .soft_reset(srst), .bcr, .mode(chip_mode),
    .test_pulse, .cal_pulse,
    .sdata, .sh_creg, .ld_creg, .rd_creg, .creg_dout, .creg_parity,
    .sh_mask, .sh_caldly, .sh_trim, .rot_serial, .trim_load,
    .caldly_dout(caldly_q[15]), .trim_dout(trims_q[15]),
    .stat1, .stat2, .mirror, .cregister, .sc_unused, .fc_unused, .parity_err
  );

  localparam logic [15:0] CREG_RESET [NCREG] = '{
    16'h0000, 16'h0000, 16'h00FF, 16'h0000, 16'h0000, 16'h0000, 16'h00FF, 16'h0000
  };

  for (genvar r = 0; r < NCREG; r++) begin : g_creg
    abcn_cached_register #(.RESET_VAL(CREG_RESET[r])) u_reg (
      .clk, .rst_n, .srst, .shift(sh_creg[r]), .datashiftin(sdata),
      .load(ld_creg[r]), .read(rd_creg[r]), .dataout(creg_q[r]),
      .datashiftout(creg_dout[r]), .parity(creg_parity[r]), .seu(creg_seu[r])
    );
  end

  logic [15:0] cfg1, delay_reg;
  assign cfg1       = creg_q[CR_CFG1];
  assign cfg2_reg   = creg_q[CR_CFG2];
  assign thresh_reg = creg_q[CR_THRESH];
  assign bias1_reg  = creg_q[CR_BIAS1];
  assign bias2_reg  = creg_q[CR_BIAS2];
  assign bias3_reg  = creg_q[CR_BIAS3];
  assign delay_reg  = creg_q[CR_DELAY];
  assign calamp_reg = creg_q[CR_CALAMP];
  assign trim_range   = cfg1[6:4];
  assign thdac_offset = cfg1[15:14];

  abcn_serial_register #(.N(16)) u_caldly (
    .clk, .rst_n, .shift(sh_caldly), .rotate(rot_serial), .din(sdata),
    .q(caldly_q), .dout()
  );
  abcn_serial_register #(.N(16)) u_trims (
    .clk, .rst_n, .shift(sh_trim), .rotate(rot_serial), .din(sdata),
    .q(trims_q), .dout()
  );
  abcn_trim_latches #(.N(NCH)) u_trim (
    .clk, .rst_n, .load(trim_load), .trimreg(trims_q), .trim
  );

  abcn_calibration_logic u_cal (
    .clk, .rst_n, .bc_en, .cal_cmd(cal_pulse), .cal_mode(cfg1[3:2]),
    .caldelay(caldly_q[7:0]), .cal_strobe, .cal_line, .strobe_delay, .strobe_step
  );

  // ---------------- L1 and test pulse timing ----------------
  // Decoder pulses may fall between beam crossings at 80/160 MHz; they are
  // held until the next bc_en.
  logic l1_hold, tp_hold, l1_any, l1_acc, pipe_busy, p_bist_run, d_bist_run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_hold <= 1'b0; tp_hold <= 1'b0;
    end else begin
      l1_hold <= bc_en ? 1'b0 : (l1_hold | dec_l1);
      tp_hold <= bc_en ? 1'b0 : (tp_hold | test_pulse);
    end
  end
  assign l1_any = dec_l1 || l1_hold || (lone && !delay_reg[9]);
  assign l1_acc = bc_en && l1_any && !pipe_busy && !p_bist_run && !srst;

  // ---------------- front-end data path ----------------
  logic [NCH-1:0] ir_o, mask;
  logic [3:0]     l1_count;
  logic [7:0]     bc_count;
  logic           l1_seu, bc_seu;

  abcn_input_register #(.N(NCH)) u_inreg (
    .clk, .rst_n, .bc_en, .i(hits), .load(sh_mask), .sin(sdata),
    .mode(cfg1[8]), .edgemode(cfg1[7]), .pulse(test_pulse || tp_hold),
    .o(ir_o), .mask
  );

  logic [PIPE_W-1:0] pipe_o;
  logic              pipe_valid, p_bist_end, p_bist_fail;
  abcn_pipeline u_pipe (
    .clk, .rst_n, .srst, .bc_en,
    .i({8'h00, bc_count, ir_o}), .l1(l1_any && !srst), .l1delay(delay_reg[7:0]),
    .o(pipe_o), .o_valid(pipe_valid), .busy(pipe_busy),
    .bist_enable(delay_reg[14]), .bist_running(p_bist_run),
    .bist_ended(p_bist_end), .bist_fail(p_bist_fail)
  );

  // L1 count of the trigger being copied into the buffer
  logic [3:0] l1_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      l1_tag <= '0;
    else if (l1_acc) l1_tag <= l1_count;
  end

  logic [BUF_W-1:0] buf_o;
  logic             buf_rd, data_avail, overflow, d_bist_end, d_bist_fail;
  abcn_readout_buffer u_buf (
    .clk, .rst_n, .srst,
    .i({40'h0, pipe_o[135:128], l1_tag, pipe_o[NCH-1:0]}),
    .wr(pipe_valid), .rd(buf_rd), .o(buf_o), .data_avail, .overflow, .events(),
    .bist_enable(delay_reg[15]), .bist_running(d_bist_run),
    .bist_ended(d_bist_end), .bist_fail(d_bist_fail)
  );

  logic       c_next, c_ovf, c_adj, c_dv, c_end, c_busy;
  logic [6:0] c_ch;
  logic [2:0] c_hit;
  logic [3:0] ev_l1;
  logic [7:0] ev_bc;
  abcn_data_compression #(.N(NCH)) u_comp (
    .clk, .rst_n, .srst, .i(buf_o), .overflow,
    .sendid(chip_mode == MODE_SENDID), .readreg(chip_mode == MODE_READREG),
    .dataavail(data_avail && !d_bist_run), .mode(crit_e'(cfg1[1:0])), .next(c_next),
    .buffrd(buf_rd), .overflowout(c_ovf), .adj(c_adj), .ch(c_ch), .hit(c_hit),
    .datavalid(c_dv), .end_o(c_end), .busy(c_busy), .ev_l1, .ev_bc
  );

  // ---------------- readout ----------------
  logic tkin, tkout, datain, port_dataout, rol_dout, rol_tok, rol_active;
  logic hdr_en, trl_en, is_master, is_end, event_pending;

  assign event_pending = data_avail || c_busy;

  abcn_readout_logic u_rol (
    .clk, .rst_n, .srst, .datain, .tokenin(rol_tok),
    .header_enable(hdr_en), .trailer_enable(trl_en),
    .hdr_l1(ev_l1), .hdr_bc(ev_bc),
    .ch(c_ch), .hit(c_hit), .datavalid(c_dv), .adj(c_adj), .end_i(c_end),
    .overflow(c_ovf), .event_pending, .next(c_next),
    .id, .chip_mode, .config1(cfg1), .regdata(mirror), .cregister,
    .dataout(rol_dout), .tokenout(tkout), .active(rol_active)
  );

  abcn_readout_controller u_ctl (
    .clk, .rst_n, .srst, .bcr, .bc_en, .l1(l1_acc), .master_b,
    .cfg_master(cfg1[11]), .cfg_end(cfg1[12]), .cfg_feedthru(cfg1[13]),
    .event_pending, .rol_active, .tokenin(tkin), .rol_dataout(rol_dout),
    .rol_tokenin(rol_tok), .header_enable(hdr_en), .trailer_enable(trl_en),
    .is_master, .is_end, .ldo, .dataout(port_dataout),
    .l1_count, .bc_count, .l1_seu, .bc_seu, .waiting_trailer()
  );

  abcn_token_data_ports u_ports (
    .direction(cfg1[9]),
    .tk1_i, .tk2_i, .data1_i, .data2_i, .tk1_o, .tk2_o, .data1_o, .data2_o,
    .tk1_oe, .tk2_oe, .data1_oe, .data2_oe,
    .tkin, .tkout(tkout && !is_end), .datain, .dataout(port_dataout)
  );

  // ---------------- status registers ----------------
  logic sc_flag, fc_flag, par_flag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_flag <= 1'b0; fc_flag <= 1'b0; par_flag <= 1'b0;
    end else begin
      if (sc_unused) sc_flag <= 1'b1;
      if (fc_unused) fc_flag <= 1'b1;
      if (srst)            par_flag <= 1'b0;
      else if (parity_err) par_flag <= 1'b1;
    end
  end

  assign stat1 = {d_bist_fail, p_bist_fail, overflow, data_avail, 1'b0,
                  delay_reg[9], reg_enable, shunt_e, is_end, is_master,
                  rate[1], rate[0], fc_flag, sc_flag, d_bist_end, p_bist_end};
  assign stat2 = {|creg_seu || l1_seu || bc_seu, 2'b00, par_flag, 2'b00,
                  creg_seu[CR_DELAY], creg_seu[CR_BIAS3], creg_seu[CR_BIAS2],
                  creg_seu[CR_BIAS1], creg_seu[CR_THRESH], creg_seu[CR_CALAMP],
                  creg_seu[CR_CFG2], creg_seu[CR_CFG1], bc_seu, l1_seu};
endmodule
