// snn_pkg: constants, number formats and the digit glyph table shared by the
// spiking feedforward digit-recognition system.
//
// Membrane potential v and recovery u are kept in units of 0.1 mV, so the
// Izhikevich equation v' = 0.04v^2 + 5v + 140 - u + I becomes, for V = 10v,
// U = 10u and W = 10I:  V' = 0.004V^2 + 5V + 1400 - U + W.  A synaptic weight
// of 120 therefore stands for an input step of 12 mV, as in the neuron
// simulations this design follows.  The integer part of V is 13 bits wide and
// weights are 11-bit signed numbers (both widths follow the published
// waveforms); the fractional bits, the time step and the glyph table are this
// design's own choices.
package snn_pkg;

  // Widths -------------------------------------------------------------------
  localparam int unsigned WW      = 11;  // synaptic weight, signed
  localparam int unsigned VW      = 13;  // integer part of V (0.1 mV units), signed
  localparam int unsigned FRAC    = 8;   // fractional bits of the V and U stores
  localparam int unsigned SW      = VW + FRAC;  // width of a state register
  localparam int unsigned IW      = 18;  // input current accumulator, signed

  typedef logic signed [WW-1:0] weight_t;
  typedef logic signed [SW-1:0] state_t;   // V or U, fixed point, FRAC fraction bits
  typedef logic signed [VW-1:0] vout_t;    // V, integer part only
  typedef logic signed [IW-1:0] cur_t;     // input current W summed over a burst

  // Izhikevich constants in the scaled units --------------------------------
  localparam int VTH_MV10   = 300;   // spike when v >= 30 mV
  localparam int K_SQ_Q16   = 262;   // 0.004 * 2^16
  localparam int K_LIN      = 5;     // 5V
  localparam int K_CONST    = 1400;  // 140 mV * 10

  localparam int VMAX = (1 << (VW - 1)) - 1;   // saturation bounds of V
  localparam int VMIN = -(1 << (VW - 1)) + 1;

  // Digit glyphs: 5 columns by 8 rows, row 0 on top, bit 4 of a row is the
  // left column.  Pixel p = 5*row + (4 - column) is input neuron p.
  localparam int unsigned GLYPH_ROWS = 8;
  localparam int unsigned GLYPH_COLS = 5;
  localparam int unsigned NPIX       = GLYPH_ROWS * GLYPH_COLS;  // 40
  localparam int unsigned NDIGITS    = 10;

  typedef logic [NPIX-1:0] glyph_t;

  function automatic glyph_t glyph(input int unsigned d);
    logic [GLYPH_COLS-1:0] r [GLYPH_ROWS];
    glyph_t g;
    case (d)
      0: r = '{5'b01110, 5'b10001, 5'b10011, 5'b10101, 5'b11001, 5'b10001, 5'b10001, 5'b01110};
      1: r = '{5'b00100, 5'b01100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b01110};
      2: r = '{5'b01110, 5'b10001, 5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000, 5'b11111};
      3: r = '{5'b11111, 5'b00010, 5'b00100, 5'b00010, 5'b00001, 5'b00001, 5'b10001, 5'b01110};
      4: r = '{5'b00010, 5'b00110, 5'b01010, 5'b10010, 5'b11111, 5'b00010, 5'b00010, 5'b00010};
      5: r = '{5'b11111, 5'b10000, 5'b11110, 5'b00001, 5'b00001, 5'b00001, 5'b10001, 5'b01110};
      6: r = '{5'b00110, 5'b01000, 5'b10000, 5'b11110, 5'b10001, 5'b10001, 5'b10001, 5'b01110};
      7: r = '{5'b11111, 5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b01000, 5'b01000, 5'b01000};
      8: r = '{5'b01110, 5'b10001, 5'b10001, 5'b01110, 5'b10001, 5'b10001, 5'b10001, 5'b01110};
      9: r = '{5'b01110, 5'b10001, 5'b10001, 5'b01111, 5'b00001, 5'b00001, 5'b00010, 5'b01100};
      default: r = '{default: '0};
    endcase
    for (int unsigned row = 0; row < GLYPH_ROWS; row++)
      g[row*GLYPH_COLS +: GLYPH_COLS] = r[row];
    return g;
  endfunction

  // Training controller states
  typedef enum logic [2:0] {
    TC_INIT,     // waiting for the weight-restore sweep after reset
    TC_IDLE,     // waiting for BTN
    TC_TEACH_ON, // write the teacher weight into the selected neurons
    TC_TRAIN,    // STDP active, synapse address swept
    TC_DRAIN,    // let the last STDP write reach the RAM
    TC_TEACH_OFF // clear the teacher weight again
  } tc_state_e;

endpackage
