// stdp: spike-timing-dependent plasticity learning module for one neuron.
//
// Ports follow the document's STDP block: clk, en (learning on), en_addr
// (move to the next synapse), pre_spikes (spikes of the input neurons),
// post_spike (spike of the learning neuron), rst; outputs we, addr, weight
// drive the write port of the neuron's RAM.  busy is an extra output, high
// during the weight-restore sweep after reset.
//
// Inside, as in the document's block diagram: the address counter picks one
// synapse; a multiplexer takes that synapse's pre spike; two shift registers
// hold the last PRE_WIN pre samples and POST_WIN post samples, and their OR
// gives pre_gate and post_gate; the I/D selector records which spike came
// first.  While both gates are open the weight counter counts the synapse's
// weight up (pre first) or down (post first) by one per clock.  The change is
// therefore largest for close spikes and falls off linearly with their time
// difference: a piecewise-linear stand-in for the exponential STDP window,
// with PRE_WIN and POST_WIN playing the time constants and POST_WIN bounding
// the change of one spike pair.  Window lengths and the linear shape are
// this design's choices.  The windows and flags are cleared when en is low
// and when a new synapse is selected.
module stdp
  import snn_pkg::*;
#(
  parameter int unsigned N_SYN    = 40,
  parameter int unsigned AW       = 6,
  parameter int unsigned PRE_WIN  = 64,
  parameter int unsigned POST_WIN = 16,
  parameter int          W_MAX    = 1023,
  parameter int          W_MIN    = -1023
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             en_addr,
  input  logic [N_SYN-1:0] pre_spikes,
  input  logic             post_spike,
  output logic             we,
  output logic [AW-1:0]    addr,
  output weight_t          weight,
  output logic             busy
);

  logic [AW-1:0]       syn_addr;
  logic                pre_sel, clr;
  logic [PRE_WIN-1:0]  pre_sr;
  logic [POST_WIN-1:0] post_sr;
  logic                pre_gate, post_gate, sel_incr, sel_decr, incr, decr;

  assign clr = !en || en_addr;

  stdp_addr_cnt #(.N_SYN(N_SYN), .AW(AW)) u_addr (
    .clk(clk), .rst(rst), .en(en), .en_addr(en_addr), .syn_addr(syn_addr)
  );

  assign pre_sel = (int'(syn_addr) < N_SYN) ? pre_spikes[syn_addr] : 1'b0;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      pre_sr  <= '0;
      post_sr <= '0;
    end else begin
      pre_sr  <= {pre_sr[PRE_WIN-2:0], pre_sel};
      post_sr <= {post_sr[POST_WIN-2:0], post_spike};
    end
  end

  assign pre_gate  = |pre_sr;
  assign post_gate = |post_sr;

  stdp_id_sel u_idsel (
    .clk(clk), .rst(rst), .clr(clr), .pre_spike(pre_sel), .post_spike(post_spike),
    .incr(sel_incr), .decr(sel_decr)
  );

  assign incr = pre_gate && post_gate && sel_incr;
  assign decr = pre_gate && post_gate && sel_decr;

  stdp_weight_cnt #(.N_SYN(N_SYN), .AW(AW), .W_MAX(W_MAX), .W_MIN(W_MIN)) u_wcnt (
    .clk(clk), .rst(rst), .en(en), .incr(incr), .decr(decr), .syn_addr(syn_addr),
    .we(we), .addr(addr), .weight(weight), .busy(busy)
  );

endmodule
