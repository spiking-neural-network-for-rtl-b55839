// stdp_addr_cnt: synapse address counter of the STDP module.
//
// Selects the one synapse the STDP rule is applied to.  Starts at 0 after
// reset and moves to the next synapse on every clock in which en and en_addr
// are both high, wrapping from N_SYN-1 back to 0.
module stdp_addr_cnt #(
  parameter int unsigned N_SYN = 40,
  parameter int unsigned AW    = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          en_addr,
  output logic [AW-1:0] syn_addr
);

  always_ff @(posedge clk) begin
    if (rst)                 syn_addr <= '0;
    else if (en && en_addr)  syn_addr <= (syn_addr == AW'(N_SYN - 1)) ? '0 : syn_addr + 1'b1;
  end

endmodule
