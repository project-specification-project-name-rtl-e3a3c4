// Self-checking test of the readout logic, driven by the data compression
// logic and a behavioural readout buffer. For each case a token is given
// and the serial output is compared bit for bit with the packet sequence the
// testbench builds from the event: module header, isolated and clustered hit
// packets, no-hit packet, configuration packet (send-ID), register packet
// (read-register), overflow and no-data error packets, and the trailer.
// It also checks that the output starts a fixed 2 clocks after the token,
// that the token is passed exactly once (never by the end chip), and that
// data from the chain is forwarded with one clock of delay while idle.
module tb_abcn_readout_logic;
  import abcn_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, datain = 0, tokenin = 0;
  logic header_enable = 0, trailer_enable = 0, overflow = 0;
  chip_mode_e chip_mode = MODE_DATA;
  crit_e crit = CRIT_LEVEL;
  logic [6:0] id = 7'h0D;
  logic [15:0] config1 = 16'hC35A, regdata = 16'hBEEF;
  logic [4:0] cregister = RA_BIAS2;
  logic dataout, tokenout, active, next;
  int checks = 0, failures = 0;

  // compression + behavioural buffer
  logic [179:0] bw = '0;
  logic [179:0] words [$];
  logic dataavail, buffrd, c_ovf, c_adj, c_dv, c_end, c_busy;
  logic [6:0] c_ch; logic [2:0] c_hit; logic [3:0] ev_l1; logic [7:0] ev_bc;
  assign dataavail = words.size() >= 3;
  always @(posedge clk) if (buffrd) bw <= words.pop_front();

  abcn_data_compression u_comp (
    .clk, .rst_n, .srst, .i(bw), .overflow, .sendid(chip_mode == MODE_SENDID),
    .readreg(chip_mode == MODE_READREG), .dataavail, .mode(crit), .next,
    .buffrd, .overflowout(c_ovf), .adj(c_adj), .ch(c_ch), .hit(c_hit),
    .datavalid(c_dv), .end_o(c_end), .busy(c_busy), .ev_l1, .ev_bc
  );

  abcn_readout_logic dut (
    .clk, .rst_n, .srst, .datain, .tokenin, .header_enable, .trailer_enable,
    .hdr_l1(ev_l1), .hdr_bc(ev_bc), .ch(c_ch), .hit(c_hit), .datavalid(c_dv),
    .adj(c_adj), .end_i(c_end), .overflow(c_ovf),
    .event_pending(dataavail || c_busy), .next, .id, .chip_mode, .config1,
    .regdata, .cregister, .dataout, .tokenout, .active
  );
  always #5 clk = ~clk;

  bit exp_bits [$];
  task automatic put(input logic [35:0] v, input int n);
    for (int b = n - 1; b >= 0; b--) exp_bits.push_back(v[b]);
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // queue an event; returns the hit channel list for the level criterion
  logic [127:0] s [3];
  task automatic make_event(input int nhits_groups, input logic [3:0] l1t, input logic [7:0] bct);
    foreach (s[k]) s[k] = '0;
    for (int h = 0; h < nhits_groups; h++) begin
      automatic int c = $urandom % 126;
      automatic int len = 1 + $urandom % 3;
      for (int d = 0; d < len; d++) begin
        s[1][c + d] = 1'b1;
        s[0][c + d] = 1'($urandom); s[2][c + d] = 1'($urandom);
      end
    end
    for (int k = 0; k < 3; k++) words.push_back({40'h0, bct, l1t, s[k]});
  endtask

  task automatic expect_hits();
    bit prev_adj = 0;
    bit any = 0;
    for (int c = 0; c < 128; c++) if (s[1][c]) begin
      logic [2:0] p = {s[0][c], s[1][c], s[2][c]};
      if (!(c > 0 && s[1][c - 1])) put({2'b01, id, 7'(c), 1'b1, p}, 20);
      else put({1'b1, p}, 4);
      any = 1;
    end
    if (!any) put(3'b001, 3);
  endtask

  task automatic run_case(input string name, input int maxlen);
    bit got [$];
    int ntok = 0, n = exp_bits.size(), tok_at = -1;
    repeat (40) @(negedge clk);   // compression has loaded the event
    tokenin = 1; @(negedge clk); tokenin = 0;
    for (int k = 0; k < n + 30; k++) begin
      got.push_back(dataout);
      ntok += tokenout;
      if (tokenout) tok_at = k;
      @(negedge clk);
    end
    chk(!active, {name, ": done"});
    // the first two clocks after the token are idle
    for (int k = 0; k < n; k++)
      if (got[k + 2] != exp_bits[k]) begin
        chk(0, $sformatf("%s: bit %0d of %0d", name, k, n)); break;
      end
    checks++;
    for (int k = n + 2; k < got.size(); k++) if (got[k]) begin
      failures++; $display("FAIL %s: trailing bits", name); break;
    end
    chk(ntok == (trailer_enable ? 0 : 1), {name, ": token passed once"});
    // token goes with the fourth-last bit (the next chip's data is gapless)
    if (!trailer_enable) chk(tok_at == n + 2 - 4, $sformatf("%s: token timing %0d", name, tok_at));
    exp_bits = {};
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // A: master-like and end-like chip with hits
    header_enable = 1; trailer_enable = 1;
    make_event(5, 4'h9, 8'hA7);
    put({PREAMBLE, 1'b0, 4'h9, 8'hA7, 1'b1}, 19); expect_hits(); put(TRAILER, 17);
    run_case("hits+header+trailer", 0);
    // B: plain slave, several events with hits
    header_enable = 0; trailer_enable = 0;
    for (int e = 0; e < 10; e++) begin
      make_event(1 + $urandom % 6, 4'(e), 8'(e));
      expect_hits();
      run_case("slave hits", 0);
    end
    // C: no hit
    make_event(0, 0, 0); put(3'b001, 3); run_case("no hit", 0);
    // D: no event stored
    put({3'b000, id, ERR_NODATA, 1'b1}, 14); run_case("no data", 0);
    // E: send-ID
    chip_mode = MODE_SENDID; make_event(3, 0, 0);
    put({3'b000, id, 3'b111, config1[15:8], 1'b1, config1[7:0], 1'b1}, 31);
    run_case("send-ID", 0);
    chk(words.size() == 0, "send-ID consumed event");
    // F: read register
    chip_mode = MODE_READREG; make_event(3, 0, 0);
    put({3'b000, id, 3'b010, cregister, regdata[15:8], 1'b1, regdata[7:0], 1'b1}, 36);
    run_case("read register", 0);
    // G: overflow
    chip_mode = MODE_DATA; overflow = 1; make_event(2, 0, 0);
    put({3'b000, id, ERR_OVERFLOW, 1'b1}, 14); run_case("overflow", 0);
    overflow = 0;
    // H: forwarding while idle
    for (int k = 0; k < 50; k++) begin
      automatic logic b = 1'($urandom);
      datain = b; @(negedge clk);
      chk(dataout == b, "forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
