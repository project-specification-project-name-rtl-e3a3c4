// Cached (SEU-protected) 16-bit configuration register. It has two parts:
//  * a serial access register: with "shift" high it takes one bit per clock
//    from datashiftin, MSB first (a 16-bit write leaves the first bit sent in
//    bit 15); datashiftout is its bit 15, used to read the register back;
//  * the cache: three copies of the word, majority-voted. "load" copies the
//    serial register into all three; "read" copies the voted word into the
//    serial register so it can be shifted out.
// Every clock all three copies are rewritten with the voted word, so a
// single upset is corrected on the next clock; "seu" is set whenever a copy
// disagrees with the vote and is cleared by soft reset. "parity" is the XOR
// of the voted word. Hard reset loads RESET_VAL. dataout is the voted word.
// The structure and flags follow the specification; the every-clock
// correction is a local choice.
module abcn_cached_register #(
  parameter logic [15:0] RESET_VAL = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        shift,
  input  logic        datashiftin,
  input  logic        load,
  input  logic        read,
  output logic [15:0] dataout,
  output logic        datashiftout,
  output logic        parity,
  output logic        seu
);
  logic [15:0] sreg, ca, cb, cc, vote;

  always_comb begin
    vote         = (ca & cb) | (ca & cc) | (cb & cc);
    dataout      = vote;
    datashiftout = sreg[15];
    parity       = ^vote;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
    end else if (read) begin
      sreg <= vote;
    end else if (shift) begin
      sreg <= {sreg[14:0], datashiftin};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca  <= RESET_VAL;
      cb  <= RESET_VAL;
      cc  <= RESET_VAL;
      seu <= 1'b0;
    end else begin
      if (load) begin
        ca <= sreg; cb <= sreg; cc <= sreg;
      end else begin
        ca <= vote; cb <= vote; cc <= vote;
      end
      if (srst)                                seu <= 1'b0;
      else if (ca != vote || cb != vote || cc != vote) seu <= 1'b1;
    end
  end
endmodule
