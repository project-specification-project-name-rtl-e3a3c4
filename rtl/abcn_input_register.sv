// Input register, edge detector and channel mask register (one block).
// Every beam crossing (bc_en) the 128 discriminator outputs are latched.
// With edgemode set, a channel gives a single '1' on the crossing where its
// latched input goes from 0 to 1, whatever the pulse length. The 128-bit
// mask register is loaded serially (load = shift strobe, sin = data, shifted
// towards bit 127 so the first bit sent ends in channel 127); a channel is
// masked with '0'. Output to the pipeline, one word per bc_en:
//   mode = 0 (normal):  o = hits & mask
//   mode = 1 (test):    o = mask (the mask contents are the test pattern)
//   pulse = 1:          o = mask (all unmasked outputs pulsed at once)
// The output is registered: o holds the word of the previous crossing.
// The table of modes and the masking rule follow the specification; the
// shift direction and the mask reset value (all ones, nothing masked) are
// local choices.
module abcn_input_register #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bc_en,
  input  logic [N-1:0] i,
  input  logic         load,
  input  logic         sin,
  input  logic         mode,
  input  logic         edgemode,
  input  logic         pulse,
  output logic [N-1:0] o,
  output logic [N-1:0] mask
);
  logic [N-1:0] lat, lat_q, hits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '1;
    end else if (load) begin
      mask <= {mask[N-2:0], sin};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat   <= '0;
      lat_q <= '0;
      o     <= '0;
    end else if (bc_en) begin
      lat   <= i;
      lat_q <= lat;
      o     <= (mode || pulse) ? mask : (hits & mask);
    end
  end

  always_comb hits = edgemode ? (lat & ~lat_q) : lat;
endmodule
