// izh_neuron: one Izhikevich spiking neuron with its own synaptic RAM.
//
// The neuron has the seven inputs of the document's neuron block (clk, en,
// we, addr, weight, aer_bus, rst) and the output spike_out.  Internally
// (following the neuron block diagram): the weight RAM is written through
// we/addr/weight and read at the address on the AER bus; input_align sums
// the weights of a burst into the current I; the "v" and "u" equations
// compute the next state, which is held in the "v" and "u" store registers.
//
// Timing: one Euler step (dt = 2^-DT_SHIFT ms) per clock in which en is
// high; while en is low the state is held and bus weights are accumulated.
// When the stored V is at or above 30 mV, the next step resets V to c and
// adds d to U, and spike_out is high for that one clock.  After rst, V = c
// and U = b*c.  v_out (integer V in 0.1 mV) is an observation port; the
// document shows this value in its neuron waveforms but not as a block port.
module izh_neuron
  import snn_pkg::*;
#(
  parameter int unsigned AW       = 6,
  parameter int unsigned DT_SHIFT = 1,
  parameter int unsigned A_Q16    = 1311,
  parameter int unsigned B_Q16    = 13107,
  parameter int          C_MV10   = -650,
  parameter int          D_MV10   = 20
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  weight_t       weight,
  input  logic [AW-1:0] aer_bus,
  output logic          spike_out,
  output vout_t         v_out
);

  localparam state_t V_RST = state_t'(longint'(C_MV10) <<< FRAC);
  localparam state_t U_RST = state_t'((longint'(C_MV10) * longint'(B_Q16)) <<< FRAC >>> 16);

  weight_t syn_w;
  cur_t    i_cur;
  state_t  v_q, u_q, v_n, u_n;
  logic    spk;

  neuron_ram #(.AW(AW)) u_ram (
    .clk (clk), .we(we), .a(addr), .di(weight), .dpra(aer_bus), .dpo(syn_w)
  );

  input_align u_align (
    .clk(clk), .rst(rst), .en(en), .syn_in(syn_w), .i_out(i_cur)
  );

  izh_v_eq #(.DT_SHIFT(DT_SHIFT), .C_MV10(C_MV10)) u_veq (
    .v(v_q), .u(u_q), .i_in(i_cur), .v_next(v_n), .spike(spk)
  );

  izh_u_eq #(.DT_SHIFT(DT_SHIFT), .A_Q16(A_Q16), .B_Q16(B_Q16), .D_MV10(D_MV10)) u_ueq (
    .v(v_q), .u(u_q), .spike(spk), .u_next(u_n)
  );

  // "v" and "u" stores
  always_ff @(posedge clk) begin
    if (rst) begin
      v_q       <= V_RST;
      u_q       <= U_RST;
      spike_out <= 1'b0;
    end else begin
      spike_out <= en & spk;
      if (en) begin
        v_q <= v_n;
        u_q <= u_n;
      end
    end
  end

  assign v_out = vout_t'(v_q >>> FRAC);

endmodule
