// Self-checking test of the data compression logic. A behavioural readout
// buffer feeds random sparse events (with clusters of adjacent hits). For
// each of the four criteria the channels presented, their hit patterns, the
// adj and end flags and the event's L1/BC tags are compared with a
// reference scan done in the testbench. Send-ID, read-register and overflow
// events must be flushed without a scan.
module tb_abcn_data_compression;
  import abcn_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, overflow = 0, sendid = 0, readreg = 0, next = 0;
  logic [179:0] i = '0;
  logic dataavail;
  crit_e mode = CRIT_HIT;
  logic buffrd, overflowout, adj, datavalid, end_o, busy;
  logic [6:0] ch;
  logic [2:0] hit;
  logic [3:0] ev_l1;
  logic [7:0] ev_bc;
  int checks = 0, failures = 0;

  abcn_data_compression dut (.*);
  always #5 clk = ~clk;

  logic [179:0] words [$];
  assign dataavail = words.size() >= 3;
  always @(posedge clk) if (buffrd) i <= words.pop_front();

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic bit crit(input crit_e m, input logic [2:0] p);
    case (m)
      CRIT_HIT:   return p != 3'b000;
      CRIT_LEVEL: return p[1];
      CRIT_EDGE:  return !p[2] && p[1];
      default:    return 1'b1;
    endcase
  endfunction

  task automatic one_event(input int kind);   // 0 data, 1 sendid, 2 readreg, 3 overflow
    logic [127:0] s [3];
    logic [3:0] l1t; logic [7:0] bct;
    int exp_ch [$]; logic [2:0] exp_p [$];
    l1t = 4'($urandom); bct = 8'($urandom);
    begin
      // sparse clusters of one to three channels; each sample of a cluster
      // channel is set at random
      logic [127:0] m = '0;
      for (int h = 0; h < 6; h++) begin
        automatic int c = $urandom % 128;
        automatic int len = 1 + $urandom % 3;
        for (int d = 0; d < len && c + d < 128; d++) m[c + d] = 1'b1;
      end
      for (int k = 0; k < 3; k++) s[k] = m & {$urandom, $urandom, $urandom, $urandom};
    end
    for (int k = 0; k < 3; k++)
      words.push_back({40'h0, (k == 1) ? bct : 8'($urandom), (k == 1) ? l1t : 4'($urandom), s[k]});
    for (int c = 0; c < 128; c++)
      if (crit(mode, {s[0][c], s[1][c], s[2][c]})) begin
        exp_ch.push_back(c); exp_p.push_back({s[0][c], s[1][c], s[2][c]});
      end
    sendid = (kind == 1); readreg = (kind == 2); overflow = (kind == 3);
    wait (datavalid || end_o || overflowout);
    @(negedge clk);
    if (kind == 3) chk(overflowout && !datavalid && !end_o, "overflow flush");
    else if (kind != 0) chk(end_o && !datavalid, "mode flush");
    else begin
      chk(ev_l1 == l1t && ev_bc == bct, "event tags");
      for (int n = 0; n < exp_ch.size(); n++) begin
        chk(datavalid, "datavalid");
        chk(ch == 7'(exp_ch[n]) && hit == exp_p[n], $sformatf("hit %0d ch %0d/%0d", n, ch, exp_ch[n]));
        chk(adj == (n + 1 < exp_ch.size() && exp_ch[n + 1] == exp_ch[n] + 1), "adj");
        chk(end_o == (n + 1 == exp_ch.size()), "end with last hit");
        next = 1; @(negedge clk); next = 0; @(negedge clk);
      end
      chk(end_o && !datavalid, "end state");
    end
    next = 1; @(negedge clk); next = 0; @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      mode = crit_e'(m);
      for (int e = 0; e < 30; e++) one_event(0);
    end
    mode = CRIT_LEVEL;
    for (int e = 0; e < 9; e++) one_event(1 + e % 3);
    one_event(0);
    chk(words.size() == 0, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
