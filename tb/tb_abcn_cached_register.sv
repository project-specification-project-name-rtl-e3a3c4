// Self-checking test of the cached register: reset value, serial write and
// load, read-back through the serial output, parity, and correction of a
// single upset copy (forced into one copy of the cache) with the SEU flag,
// which soft reset clears.
module tb_abcn_cached_register;
  logic clk = 0, rst_n = 0, srst = 0, shift = 0, datashiftin = 0, load = 0, read = 0;
  logic [15:0] dataout;
  logic datashiftout, parity, seu;
  int checks = 0, failures = 0;

  abcn_cached_register #(.RESET_VAL(16'h00FF)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input logic [15:0] w);
    for (int b = 15; b >= 0; b--) begin
      @(negedge clk); shift = 1; datashiftin = w[b];
    end
    @(negedge clk); shift = 0; load = 1;
    @(negedge clk); load = 0;
  endtask

  task automatic readback(output logic [15:0] r);
    @(negedge clk); read = 1;
    @(negedge clk); read = 0;
    r = '0;
    for (int b = 0; b < 16; b++) begin
      r = {r[14:0], datashiftout};
      shift = 1;
      @(negedge clk);
    end
    shift = 0;
  endtask

  initial begin
    logic [15:0] w, r;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(dataout == 16'h00FF, "reset value");
    for (int t = 0; t < 10; t++) begin
      w = 16'($urandom);
      write(w);
      chk(dataout == w, $sformatf("load %h got %h", w, dataout));
      chk(parity == ^w, "parity");
      readback(r);
      chk(r == w, $sformatf("readback %h got %h", w, r));
      chk(!seu, "no seu");
    end
    // single event upset in one copy
    @(negedge clk);
    force dut.cb = ~w;
    @(negedge clk);
    release dut.cb;
    chk(dataout == w, "vote hides upset");
    @(negedge clk);
    @(negedge clk);
    chk(seu, "seu flag");
    chk(dut.cb == w, "copy corrected");
    srst = 1; @(negedge clk); srst = 0; @(negedge clk);
    chk(!seu, "seu cleared by soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
