// Self-checking test of the L1 pipeline. A random word is written each
// crossing and kept in a reference array. L1 triggers at random crossings,
// for latencies from 2 to the maximum 255, must return the three words
// written l1delay+1, l1delay and l1delay-1 crossings before the trigger
// crossing, in that order, the first one clock after the trigger. An L1
// during a running readout must be ignored. Also run at half rate (bc_en
// every second clock). Finally the BIST must end without failure.
module tb_abcn_pipeline;
  logic clk = 0, rst_n = 0, srst = 0, bc_en = 1, l1 = 0, bist_enable = 0;
  logic [143:0] i = '0, o;
  logic [7:0] l1delay = 8'd10;
  logic o_valid, busy, bist_running, bist_ended, bist_fail;
  int checks = 0, failures = 0;

  abcn_pipeline dut (.*);
  always #5 clk = ~clk;

  logic [143:0] hist [int];
  int n = 0;                  // crossing number of the word on i
  logic [143:0] expq [$];
  int ignored_seen = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // reference: record writes, check reads
  always @(posedge clk) if (rst_n) begin
    if (o_valid) begin
      chk(expq.size() > 0, "unexpected o_valid");
      if (expq.size() > 0) chk(o == expq.pop_front(), $sformatf("data n=%0d", n));
    end
  end

  task automatic crossing(input bit trig, input int div);
    // one beam crossing: div clocks, bc_en on the first
    @(negedge clk);
    bc_en = 1; i = {$urandom, $urandom, $urandom, $urandom, $urandom};
    hist[n] = i;
    l1 = trig;
    if (trig && !busy) begin
      for (int k = -1; k <= 1; k++) expq.push_back(hist[n - l1delay + k]);
    end else if (trig) ignored_seen++;
    @(negedge clk);
    // the readout word of this crossing must already be valid (1-clock latency)
    bc_en = 0; l1 = 0;
    for (int d = 1; d < div; d++) @(negedge clk);
    n++;
  endtask

  initial begin
    int dl [4] = '{2, 10, 100, 255};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int div = 1; div <= 2; div++) begin
      foreach (dl[k]) begin
        l1delay = 8'(dl[k]);
        for (int t = 0; t < 300; t++) crossing(0, div);
        for (int t = 0; t < 200; t++) crossing(($urandom % 5) == 0, div);
        crossing(1, div); crossing(1, div);   // second one lands while busy
        for (int t = 0; t < 5; t++) crossing(0, div);
      end
    end
    chk(expq.size() == 0, "missing reads");
    chk(ignored_seen > 0, "L1 while busy exercised");
    @(negedge clk); bc_en = 0; bist_enable = 1;
    wait (bist_ended);
    repeat (3) @(negedge clk);
    chk(!bist_fail, "bist passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
