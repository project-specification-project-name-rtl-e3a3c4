// Self-checking test of the readout controller: L1 and BC counters with
// their resets, master/end role decoding from masterB and CFG1, master token
// generation that waits for the trailer before the next token, the Ldo
// multiplexer and the divide-by-two clock feed-through. Upsets are forced
// into one copy of the triplicated counters: the count must not change and
// the SEU flag must be set until a soft reset.
module tb_abcn_readout_controller;
  logic clk = 0, rst_n = 0, srst = 0, bcr = 0, bc_en = 1, l1 = 0;
  logic master_b = 1, cfg_master = 0, cfg_end = 0, cfg_feedthru = 1;
  logic event_pending = 0, rol_active = 0, tokenin = 0, rol_dataout = 0;
  logic rol_tokenin, header_enable, trailer_enable, is_master, is_end, ldo, dataout, waiting_trailer;
  logic [3:0] l1_count;
  logic [7:0] bc_count;
  logic l1_seu, bc_seu;
  int checks = 0, failures = 0;

  abcn_readout_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int ntok = 0;
  always @(posedge clk) if (rst_n && rol_tokenin) ntok <= ntok + 1;

  task automatic send_bits(input logic [31:0] v, input int n);
    for (int b = n - 1; b >= 0; b--) begin rol_dataout = v[b]; @(negedge clk); end
    rol_dataout = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // counters
    repeat (37) @(negedge clk);
    chk(bc_count == 8'd37, $sformatf("bc count %0d", bc_count));
    for (int k = 0; k < 19; k++) begin l1 = 1; @(negedge clk); l1 = 0; @(negedge clk); end
    chk(l1_count == 4'd3, "l1 count modulo 16");
    bcr = 1; @(negedge clk); bcr = 0;
    chk(bc_count == 0, "BC reset");
    chk(l1_count == 4'd3, "BC reset leaves L1 count");
    srst = 1; @(negedge clk); srst = 0;
    chk(l1_count == 0 && bc_count == 0, "soft reset clears counters");
    bc_en = 0; repeat (5) @(negedge clk); bc_en = 1;
    chk(bc_count == 0, "bc_en gates counting");
    // single event upsets: one copy of each counter flipped for one clock
    repeat (10) @(negedge clk);
    for (int t = 0; t < 4; t++) begin
      automatic int cp = $urandom % 3;
      automatic logic [7:0] flip = 8'(1 << ($urandom % 8));
      automatic logic [7:0] bc_before = bc_count;
      automatic logic [3:0] l1_before = l1_count;
      chk(!l1_seu && !bc_seu, "no SEU flag before an upset");
      if (cp == 0) begin force dut.bc_c[0] = bc_before ^ flip; force dut.l1_c[0] = l1_before ^ flip[3:0]; end
      else if (cp == 1) begin force dut.bc_c[1] = bc_before ^ flip; force dut.l1_c[1] = l1_before ^ flip[3:0]; end
      else begin force dut.bc_c[2] = bc_before ^ flip; force dut.l1_c[2] = l1_before ^ flip[3:0]; end
      #1;
      chk(bc_count == bc_before && l1_count == l1_before, "vote masks an upset");
      release dut.bc_c[0]; release dut.bc_c[1]; release dut.bc_c[2];
      release dut.l1_c[0]; release dut.l1_c[1]; release dut.l1_c[2];
      @(negedge clk);
      chk(bc_count == bc_before + 8'd1 && l1_count == l1_before, $sformatf("count goes on after an upset %0d", bc_count));
      chk(bc_seu && (l1_seu || flip[7:4] != 0), "SEU flags set");
      chk(dut.bc_c[0] == dut.bc_c[1] && dut.bc_c[1] == dut.bc_c[2], "copies corrected");
      srst = 1; @(negedge clk); srst = 0;
      chk(!l1_seu && !bc_seu && bc_count == 0, "soft reset clears SEU flags");
      repeat (1 + $urandom % 7) @(negedge clk);
    end
    // roles
    for (int v = 0; v < 8; v++) begin
      {master_b, cfg_master, cfg_end} = 3'(v);
      #1;
      chk(is_master == !(master_b | cfg_master), "master decode");
      chk(is_end == (!is_master && cfg_end), "end decode");
      chk(header_enable == is_master && trailer_enable == is_end, "enables");
    end
    // slave: token from the port, data on the data port
    master_b = 1; cfg_master = 0; cfg_end = 0; #1;
    tokenin = 1; rol_dataout = 1; #1;
    chk(rol_tokenin && dataout && !ldo, "slave routing");
    tokenin = 0; rol_dataout = 0;
    // master with feed-through (power-up default CFG1 = 0)
    master_b = 0; cfg_feedthru = 0;
    @(negedge clk); begin automatic logic a = ldo; @(negedge clk); chk(ldo != a, "feed-through toggles"); end
    @(negedge clk); chk(dataout == 0, "master data port quiet");
    cfg_feedthru = 1;
    // token generation
    ntok = 0;
    event_pending = 1;
    repeat (3) @(negedge clk);
    chk(ntok == 1 && waiting_trailer, "one token for a pending event");
    rol_active = 1;
    send_bits(32'b11101_0_0000_00000000_1, 19);
    send_bits(32'b01_0001101_0000011_1_010, 20);
    rol_active = 0;
    // data of the next chips follows without a gap
    send_bits(32'b001_01_0000001_0000000_1_111, 23);
    send_bits(32'b000_1111111_001_1, 14);
    chk(ntok == 1, "no new token before trailer");
    rol_dataout = 1; #1; chk(ldo == 1, "master data on Ldo");
    send_bits(32'b1_0000_0000_0000_0000, 17);
    repeat (3) @(negedge clk);
    chk(ntok == 2, "next token after trailer");
    event_pending = 0;
    send_bits(32'b1_0000_0000_0000_0000, 17);
    repeat (20) @(negedge clk);
    chk(ntok == 2 && !waiting_trailer, "idle when no event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
