// Self-checking test of the token/data port direction control: every
// combination of direction, pad inputs and core outputs.
module tb_abcn_token_data_ports;
  logic direction, tk1_i, tk2_i, data1_i, data2_i, tkout, dataout;
  logic tk1_o, tk2_o, data1_o, data2_o, tk1_oe, tk2_oe, data1_oe, data2_oe, tkin, datain;
  int checks = 0, failures = 0;

  abcn_token_data_ports dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 128; v++) begin
      {direction, tk1_i, tk2_i, data1_i, data2_i, tkout, dataout} = 7'(v);
      #1;
      chk(tkin,   direction ? tk2_i : tk1_i, "tkin");
      chk(datain, direction ? data1_i : data2_i, "datain");
      chk(tk1_oe, direction, "tk1_oe");   chk(tk2_oe, !direction, "tk2_oe");
      chk(data1_oe, !direction, "d1_oe"); chk(data2_oe, direction, "d2_oe");
      chk(direction ? tk1_o : tk2_o, tkout, "tk_o");
      chk(direction ? data2_o : data1_o, dataout, "data_o");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
