// stdp_weight_cnt: synaptic weight counter of the STDP module.
//
// Keeps the weights of all N_SYN learned synapses of one neuron.  In every
// clock in which en is high and exactly one of incr/decr is high, the weight
// of the selected synapse (syn_addr) moves one step up or down, saturating
// at W_MAX / W_MIN, and the new value is written to the neuron RAM through
// we/addr/weight.  When no update happens, weight shows the stored weight of
// the selected synapse and we is low.  The size of a weight change is thus
// the number of clocks the pre- and post-spike windows overlap.
//
// Reset restores every weight: the stored weights go to 0 and for the next
// 2**AW clocks (busy high) the counter writes 0 to every RAM entry,
// including entries it does not learn (the teacher entry and the idle bus
// code).  Outputs are registered, one clock after the update.
module stdp_weight_cnt
  import snn_pkg::*;
#(
  parameter int unsigned N_SYN = 40,
  parameter int unsigned AW    = 6,
  parameter int          W_MAX = 1023,
  parameter int          W_MIN = -1023
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          incr,
  input  logic          decr,
  input  logic [AW-1:0] syn_addr,
  output logic          we,
  output logic [AW-1:0] addr,
  output weight_t       weight,
  output logic          busy
);

  weight_t       w_q [N_SYN];
  logic [AW:0]   clr_q;          // restore sweep position, bit AW set when done
  logic          upd;
  weight_t       w_cur, w_new;

  assign busy  = !clr_q[AW];
  assign w_cur = (int'(syn_addr) < N_SYN) ? w_q[syn_addr] : '0;
  assign upd   = en && !busy && (incr != decr) && (int'(syn_addr) < N_SYN);

  always_comb begin
    w_new = w_cur;
    if (incr && int'(w_cur) < W_MAX)      w_new = w_cur + 1'b1;
    else if (decr && int'(w_cur) > W_MIN) w_new = w_cur - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < N_SYN; k++) w_q[k] <= '0;
      clr_q  <= '0;
      we     <= 1'b0;
      addr   <= '0;
      weight <= '0;
    end else if (busy) begin
      we     <= 1'b1;
      addr   <= clr_q[AW-1:0];
      weight <= '0;
      clr_q  <= clr_q + 1'b1;
    end else begin
      we     <= upd;
      addr   <= syn_addr;
      weight <= upd ? w_new : w_cur;
      if (upd) w_q[syn_addr] <= w_new;
    end
  end

endmodule
