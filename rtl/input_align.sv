// input_align: gathers the synaptic input of one neuron time step.
//
// While the neuron is held (en low) because the AER bus is delivering a burst
// of addresses, every weight read from the neuron RAM is added to an
// accumulator.  In the cycle the neuron steps (en high), the current I handed
// to the v equation is the accumulated sum plus the weight read in that same
// cycle, and the accumulator starts again from zero.  With a bus that keeps
// one address, I is that address's weight on every step (a constant input
// step).  The idle bus code reads an entry that stays zero, so idle cycles
// add nothing.  The document names the block and its ports (CLK, EN,
// Synaptic_in, I); the accumulate-and-release behaviour and the saturation of
// the sum are this design's reading of it.
module input_align
  import snn_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  weight_t  syn_in,
  output cur_t     i_out
);

  cur_t acc_q;
  logic signed [IW:0] sum;

  localparam logic signed [IW:0] IMAX = (IW+1)'((1 << (IW - 1)) - 1);
  localparam logic signed [IW:0] IMIN = -IMAX;

  always_comb begin
    sum = (IW+1)'(acc_q) + (IW+1)'(syn_in);
    if (sum > IMAX)      i_out = cur_t'(IMAX);
    else if (sum < IMIN) i_out = cur_t'(IMIN);
    else                 i_out = cur_t'(sum);
  end

  always_ff @(posedge clk) begin
    if (rst || en) acc_q <= '0;
    else           acc_q <= i_out;
  end

endmodule
