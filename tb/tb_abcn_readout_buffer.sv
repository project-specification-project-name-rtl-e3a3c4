// Self-checking test of the derandomizing buffer. Events of three random
// words are written and read in random interleaving and must come out in
// order with DataAvail matching a reference event count. Then the buffer is
// filled to 42 events: the 43rd must be dropped and set Overflow, which
// stays set until soft reset. Finally the BIST must pass.
module tb_abcn_readout_buffer;
  logic clk = 0, rst_n = 0, srst = 0, wr = 0, rd = 0, bist_enable = 0;
  logic [179:0] i = '0, o;
  logic data_avail, overflow, bist_running, bist_ended, bist_fail;
  logic [5:0] events;
  int checks = 0, failures = 0;

  abcn_readout_buffer dut (.*);
  always #5 clk = ~clk;

  logic [179:0] q [$];
  int nev = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [179:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic write_event(input bit expect_drop);
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); wr = 1; i = rnd();
      if (!expect_drop) q.push_back(i);
    end
    @(negedge clk); wr = 0;
    if (!expect_drop) nev++;
  endtask

  task automatic read_event();
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); rd = 1;
      @(negedge clk); rd = 0;
      chk(o == q.pop_front(), "read data");
    end
    nev--;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(!data_avail && !overflow, "empty after reset");
    for (int t = 0; t < 300; t++) begin
      if (nev < 40 && ($urandom % 2 == 0 || nev == 0)) write_event(0);
      else read_event();
      chk(data_avail == (nev > 0), "data_avail");
      chk(events == 6'(nev), "event count");
    end
    while (nev > 0) read_event();
    for (int e = 0; e < 42; e++) write_event(0);
    chk(!overflow, "42 events fit");
    write_event(1);
    chk(overflow, "overflow on 43rd event");
    read_event();
    chk(overflow, "overflow sticky");
    while (nev > 0) read_event();
    chk(overflow && !data_avail, "overflow stays with empty buffer");
    @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    chk(!overflow && !data_avail, "soft reset clears");
    bist_enable = 1;
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
