// spike_source: input layer of the digit-recognition network.
//
// One input neuron per pixel of a 5 x 8 digit image plus one training
// (teacher) neuron, whose spike is the top bit of the output vector.  image
// is a one-hot digit select (bit d selects digit d; several bits give the
// union of their glyphs).  While active is high, every pixel that is on in
// the selected image fires together once every IN_PERIOD clocks; while
// teach is high the teacher fires once every TEACH_PERIOD clocks.  The two
// periods differ, so teacher spikes fall at all phases of the pixel period
// and the STDP modules see both spike orders.  The input layer is a stimulus
// generator and runs on the clock, not on EN_Neuron, so its spikes may
// arrive while the AER bus is still busy (they then wait in the AER FIFO).
// Spikes are registered one-clock pulses.  The document gives the one-hot
// image vector and a training neuron; the glyphs, the regular firing and
// the periods are this design's choices.
module spike_source
  import snn_pkg::*;
#(
  parameter int unsigned IN_PERIOD    = 64,
  parameter int unsigned TEACH_PERIOD = 48
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               active,
  input  logic               teach,
  input  logic [NDIGITS-1:0] image,
  output logic [NPIX:0]      spikes
);

  localparam int unsigned CW = $clog2(IN_PERIOD + 1);
  localparam int unsigned TW = $clog2(TEACH_PERIOD + 1);

  logic [CW-1:0] pix_q;
  logic [TW-1:0] tch_q;
  glyph_t        pattern;

  always_comb begin
    pattern = '0;
    for (int unsigned d = 0; d < NDIGITS; d++)
      if (image[d]) pattern |= glyph(d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_q  <= '0;
      tch_q  <= '0;
      spikes <= '0;
    end else begin
      pix_q  <= (pix_q == CW'(IN_PERIOD - 1)) ? '0 : pix_q + 1'b1;
      tch_q  <= (tch_q == TW'(TEACH_PERIOD - 1)) ? '0 : tch_q + 1'b1;
      spikes <= {teach && tch_q == '0, pattern & {NPIX{active && pix_q == '0}}};
    end
  end

endmodule
