// neuron_ram: synaptic weight memory inside one Izhikevich neuron.
//
// Entry k holds the weight of the synapse from the neuron whose AER address
// is k.  The write port (we, a, di) is synchronous; the read port is
// asynchronous and is addressed by the AER bus (dpra -> dpo), so the weight of
// the address currently on the bus is available in the same cycle, as in a
// dual-port distributed RAM.  The memory has no reset: it is cleared by the
// weight-restore sweep of the STDP module, which writes every entry.  The
// port names follow the neuron's block diagram; depth and width are set by
// the address and weight widths.
module neuron_ram
  import snn_pkg::*;
#(
  parameter int unsigned AW = 6   // address width, 2**AW entries
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   a,
  input  weight_t         di,
  input  logic [AW-1:0]   dpra,
  output weight_t         dpo
);

  weight_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= di;
  end

  assign dpo = mem[dpra];

endmodule
