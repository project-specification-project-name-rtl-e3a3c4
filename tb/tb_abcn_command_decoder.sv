// Self-checking test of the command decoder. Serial commands are sent one
// bit per crossing: L1, soft reset, BC reset, register writes (to this chip,
// to another chip, and to the global address), instructions and reads. The
// testbench models the registers behind the decoder's strobes: it collects
// the bits shifted into each register, applies load strobes, and serves
// read-back from its own copies. Checked: strobes, written values, chip mode
// changes, mirror/cregister after reads (also a read sent with the full 28-bit length), parity error detection and the
// unused-code flags.
module tb_abcn_command_decoder;
  import abcn_pkg::*;
  logic clk = 0, rst_n = 0, bc_en = 1, command = 0;
  logic [6:0] id = 7'h0D;
  logic l1, soft_reset, bcr, test_pulse, cal_pulse;
  chip_mode_e mode;
  logic sdata, sh_mask, sh_caldly, sh_trim, rot_serial, trim_load;
  logic [NCREG-1:0] sh_creg, ld_creg, rd_creg, creg_dout, creg_parity;
  logic caldly_dout, trim_dout;
  logic [15:0] stat1 = 16'hA5C3, stat2 = 16'h0F0F, mirror;
  logic [4:0] cregister;
  logic sc_unused, fc_unused, parity_err;
  int checks = 0, failures = 0;

  abcn_command_decoder dut (.*);
  always #5 clk = ~clk;

  // register models
  logic [15:0] sreg [NCREG], cache [NCREG], caldly = '0, trims = '0;
  logic [127:0] maskm = '0;
  int n_l1 = 0, n_sr = 0, n_bcr = 0, n_tp = 0, n_cp = 0, n_tl = 0, n_sc = 0, n_fc = 0, n_pe = 0;
  logic bad_parity = 0;
  initial foreach (sreg[r]) begin sreg[r] = '0; cache[r] = '0; end
  always_comb for (int r = 0; r < NCREG; r++) begin
    creg_dout[r]   = sreg[r][15];
    creg_parity[r] = (^cache[r]) ^ bad_parity;
  end
  assign caldly_dout = caldly[15];
  assign trim_dout   = trims[15];
  always @(posedge clk) begin
    for (int r = 0; r < NCREG; r++) begin
      if (rd_creg[r]) sreg[r] <= cache[r];
      else if (sh_creg[r]) sreg[r] <= {sreg[r][14:0], sdata};
      if (ld_creg[r]) cache[r] <= sreg[r];
    end
    if (sh_caldly) caldly <= {caldly[14:0], rot_serial ? caldly[15] : sdata};
    if (sh_trim)   trims  <= {trims[14:0], rot_serial ? trims[15] : sdata};
    if (sh_mask)   maskm  <= {maskm[126:0], sdata};
    if (rst_n) begin
    n_l1 <= n_l1 + int'(l1); n_sr <= n_sr + int'(soft_reset); n_bcr <= n_bcr + int'(bcr);
    n_tp <= n_tp + int'(test_pulse); n_cp <= n_cp + int'(cal_pulse); n_tl <= n_tl + int'(trim_load);
    n_sc <= n_sc + int'(sc_unused); n_fc <= n_fc + int'(fc_unused); n_pe <= n_pe + int'(parity_err);
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [255:0] bits, input int n);
    for (int b = n - 1; b >= 0; b--) begin
      @(negedge clk); command = bits[b];
    end
    @(negedge clk); command = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic slow(input logic [6:0] a, input logic [5:0] f5, input logic [127:0] d, input int nd);
    logic [255:0] v;
    int len = 13 + nd;
    v = '0;
    v = {v[255-7:0], 7'b101_0111};
    v = {v[255-8:0], 8'(len - 1)};
    v = {v[255-7:0], a};
    v = {v[255-6:0], f5};
    for (int b = nd - 1; b >= 0; b--) v = {v[254:0], d[b]};
    send(v, 7 + 8 + len);
  endtask

  task automatic rd(input logic [4:0] ra);
    slow(id, {ra, 1'b1}, '0, 0);
    repeat (20) @(negedge clk);
  endtask

  localparam int IX [NCREG] = '{0, 1, 2, 3, 4, 5, 6, 7};
  localparam logic [4:0] RA [NCREG] = '{RA_CFG1, RA_CFG2, RA_THRESH, RA_BIAS1,
                                        RA_BIAS2, RA_BIAS3, RA_DELAY, RA_CALAMP};

  initial begin
    logic [15:0] w [NCREG];
    logic [127:0] mk;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(mode == MODE_SENDID, "power-up send-ID mode");
    send(3'b110, 3);            chk(n_l1 == 1, $sformatf("L1 %0d", n_l1));
    send(7'b101_0100, 7);       chk(n_sr == 1, "soft reset");
    send(7'b101_0010, 7);       chk(n_bcr == 1, "BC reset");
    send(7'b101_1111, 7);       chk(n_fc == 1, "unused fast code");
    send(3'b111, 3);            chk(n_fc == 2, "unused 3-bit code");
    slow(id, CMD_DATATAKE, '0, 0);
    chk(mode == MODE_DATA, "data taking mode");
    // write every cached register
    foreach (RA[r]) begin
      w[r] = 16'($urandom);
      slow(id, {RA[r], 1'b0}, 128'(w[r]), 16);
      chk(cache[r] == w[r], $sformatf("write reg %0d", r));
      chk(mode == MODE_SENDID, "write gives send-ID");
    end
    // another chip's write must not act; global write must
    slow(7'h0E, {RA_CFG1, 1'b0}, 128'h1234, 16);
    chk(cache[0] == w[0], "other chip ignored");
    slow(GLOBAL_ID, {RA_CFG1, 1'b0}, 128'h4321, 16);
    chk(cache[0] == 16'h4321, "global write"); w[0] = 16'h4321;
    // serial registers and mask
    slow(id, {RA_CALDLY, 1'b0}, 128'h00B7, 16); chk(caldly == 16'h00B7, "caldelay write");
    slow(id, {RA_TRIM, 1'b0}, 128'h0A5F, 16);   chk(trims == 16'h0A5F && n_tl == 1, "trim write");
    mk = {$urandom, $urandom, $urandom, $urandom};
    slow(id, {RA_MASK, 1'b0}, mk, 128);         chk(maskm == mk, "mask write");
    // instructions
    slow(id, CMD_TESTPULSE, '0, 0); chk(n_tp == 1, "test pulse");
    slow(id, CMD_CALPULSE, '0, 0);  chk(n_cp == 1, "cal pulse");
    slow(id, 6'b111_111, '0, 0);    chk(n_sc == 1, "unused slow code");
    // reads
    foreach (RA[r]) begin
      rd(RA[r]);
      chk(mirror == w[r] && cregister == RA[r], $sformatf("read reg %0d mirror %h", r, mirror));
      chk(mode == MODE_READREG, "read-register mode");
    end
    rd(RA_CALDLY); chk(mirror == 16'h00B7 && caldly == 16'h00B7, "caldelay read keeps value");
    rd(RA_TRIM);   chk(mirror == 16'h0A5F && trims == 16'h0A5F, "trim read");
    rd(RA_STAT1);  chk(mirror == stat1 && cregister == RA_STAT1, "stat1 read");
    rd(RA_STAT2);  chk(mirror == stat2, "stat2 read");
    chk(n_pe == 0, "no parity error");
    bad_parity = 1; rd(RA_CFG2); bad_parity = 0;
    chk(n_pe == 1, "parity error detected");
    // read sent with the full length of Table 3-44 (28): the 16 trailing bits,
    // here full of 110 patterns, are skipped and not taken as L1 commands
    slow(id, {RA_CFG1, 1'b1}, 128'(16'hDB6D), 16); repeat (20) @(negedge clk);
    chk(mirror == w[0] && cregister == RA_CFG1 && n_l1 == 1, "read with 16 trailing bits");
    // L1 still decoded after long commands
    send(3'b110, 3); chk(n_l1 == 2, "L1 after slow commands");
    // half-rate crossings
    fork
      forever begin @(negedge clk); bc_en = ~bc_en; end
    join_none
    for (int b = 2; b >= 0; b--) begin
      @(posedge clk iff bc_en); #1 command = 3'b110 >> b;
    end
    @(posedge clk iff bc_en); #1 command = 0;
    repeat (6) @(negedge clk);
    chk(n_l1 == 3, "L1 at half rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
