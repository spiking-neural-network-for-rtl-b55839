// stdp_id_sel: incrementor/decrementor link selector of the STDP module.
//
// Remembers the order of the latest pre- and post-synaptic spikes of the
// selected synapse.  A post spike alone sets incr (the pre spike, if any, came
// first: potentiation); a pre spike, alone or together with a post spike,
// sets decr (post first or simultaneous: depression, the "otherwise" branch of
// the STDP window function).  Both flags are cleared by rst and by clr (a new
// synapse is selected).  The flags are registered: they change the clock
// after the spike, together with the spike window gates of the STDP module.
module stdp_id_sel (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic pre_spike,
  input  logic post_spike,
  output logic incr,
  output logic decr
);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      incr <= 1'b0;
      decr <= 1'b0;
    end else if (pre_spike) begin
      incr <= 1'b0;
      decr <= 1'b1;
    end else if (post_spike) begin
      incr <= 1'b1;
      decr <= 1'b0;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(incr && decr));

endmodule
