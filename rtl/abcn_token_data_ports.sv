// Direction control of the two bidirectional token ports (tk1 "bottom",
// tk2 "top") and the two bidirectional data ports (data1, data2), so a chip
// can take its token from, and send its data to, either neighbour and a
// failed chip can be bypassed. Per the specification's port tables:
//   direction = 0: token in on tk1, out on tk2; data out on data1, in on data2
//   direction = 1: token in on tk2, out on tk1; data out on data2, in on data1
// Each pad is modelled as input, output and output enable (the differential
// bidirectional pad cells are not modelled). Purely combinational.
module abcn_token_data_ports (
  input  logic direction,
  // pads
  input  logic tk1_i, tk2_i, data1_i, data2_i,
  output logic tk1_o, tk2_o, data1_o, data2_o,
  output logic tk1_oe, tk2_oe, data1_oe, data2_oe,
  // core side
  output logic tkin,
  input  logic tkout,
  output logic datain,
  input  logic dataout
);
  always_comb begin
    tkin     = direction ? tk2_i : tk1_i;
    tk1_oe   = direction;
    tk2_oe   = !direction;
    tk1_o    = direction ? tkout : 1'b0;
    tk2_o    = direction ? 1'b0 : tkout;
    datain   = direction ? data1_i : data2_i;
    data1_oe = !direction;
    data2_oe = direction;
    data1_o  = direction ? 1'b0 : dataout;
    data2_o  = direction ? dataout : 1'b0;
  end
endmodule
