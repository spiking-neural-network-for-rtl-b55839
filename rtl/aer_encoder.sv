// aer_encoder: the AER (address-event representation) system.
//
// Inputs are the spike vector of all neurons and the clock; outputs are the
// AER bus and EN_Neuron, the activation signal of the neurons.  A comparator
// detects a non-zero spike vector.  If nothing is pending, the vector goes
// straight to the priority encoder (bypass); otherwise it is stored in the
// FIFO.  A multiplexer chooses the vector being sent: the remainder of the
// current burst, else the FIFO head, else the incoming vector.  The priority
// encoder puts one address per clock on the bus, highest-numbered neuron
// first, and the sent bit is cleared.  With no event the bus carries the all
// ones code (63 for a 6-bit bus).  EN_Neuron is low while more addresses of
// a burst or stored vectors remain, so the neurons pause and integrate the
// whole burst as one time step.
//
// Timing: an address appears on the bus one clock after its spike (bypass);
// EN_Neuron is high again in the clock that carries the burst's last
// address.  A vector arriving while the FIFO is full is dropped and the
// sticky overflow output is set (the document does not say what happens
// then).  The four parts, the two inputs and two outputs, the idle code and
// the highest-first order follow the document; the rest is this design's.
module aer_encoder #(
  parameter int unsigned N          = 47,   // neurons on the bus
  parameter int unsigned AW         = 6,    // bus width
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  spikes,
  output logic [AW-1:0] aer,
  output logic          en_neuron,
  output logic          overflow
);

  localparam logic [AW-1:0] IDLE = '1;

  logic [N-1:0]  cur_q, src, fifo_dout, src_rest;
  logic          any_in, fifo_empty, fifo_full, fifo_pop, fifo_push;
  logic          pe_valid;
  logic [AW-1:0] pe_idx;

  // comparator
  assign any_in = (spikes != '0);

  // multiplexer: which vector feeds the priority encoder this cycle
  always_comb begin
    fifo_pop  = 1'b0;
    fifo_push = 1'b0;
    src       = '0;
    if (cur_q != '0) begin
      src       = cur_q;
      fifo_push = any_in;
    end else if (!fifo_empty) begin
      src       = fifo_dout;
      fifo_pop  = 1'b1;
      fifo_push = any_in;
    end else begin
      src       = spikes;        // bypass
    end
  end

  aer_priority_encoder #(.N(N), .AW(AW)) u_penc (
    .vec(src), .valid(pe_valid), .idx(pe_idx)
  );

  always_comb begin
    src_rest = src;
    if (pe_valid) src_rest[pe_idx] = 1'b0;
  end

  aer_fifo #(.WIDTH(N), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .push(fifo_push), .din(spikes), .pop(fifo_pop),
    .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_q    <= '0;
      aer      <= IDLE;
      overflow <= 1'b0;
    end else begin
      cur_q <= src_rest;
      aer   <= pe_valid ? pe_idx : IDLE;
      if (fifo_push && fifo_full && !fifo_pop) overflow <= 1'b1;
    end
  end

  assign en_neuron = (cur_q == '0) && fifo_empty;

  // The all-ones code must not be a neuron address.
  initial assert (N < (1 << AW)) else $error("aer_encoder: N must be below 2**AW");

endmodule
