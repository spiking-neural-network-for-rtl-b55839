// snn_top: spiking feedforward computing system for digit recognition.
//
// A 40-pixel input layer (spike_source, plus one teacher neuron) and six
// Izhikevich output neurons share one AER bus.  The spike vector of all 47
// neurons (bits 0-39 pixels, bit 40 teacher, bits 41-46 output neurons
// N41-N46) enters the AER encoder, which sends one address per clock and
// holds every neuron (EN_Neuron low) until a burst is through.  Each output
// neuron reads the weight of the address on the bus from its own RAM and
// integrates the burst as one time step.  Each output neuron has its own
// STDP module, which sees the pixel spikes as pre spikes and the neuron's
// own spike as post spike and writes the learned weights into that neuron's
// RAM.  train_ctrl runs learning phases: on btn with sel low it gives the
// selected neuron(s) a strong teacher synapse, lets STDP sweep all pixel
// synapses, then removes the teacher; meanwhile the other output neurons
// are held at rest, so only the neuron being trained fires.  With sel high
// the image is shown continuously and the output neurons that have learned
// it fire (spikes_out).  rst clears the state and restores all weights to 0.
//
// The structure (IZH neurons with RAM, AER system, STDP per learning
// neuron, one-hot image and neuron selects, BTN/SEL/RST, 47 spikes, 6-bit
// AER bus, six outputs) follows the document; the pixel count, glyphs,
// teacher mechanism, firing period and window lengths are this design's.
// The document says that only the neuron being trained fires during its
// phase but not how; holding the others in reset is this design's way.
// v_out gives each output neuron's membrane potential in 0.1 mV.
module snn_top
  import snn_pkg::*;
#(
  parameter int unsigned N_OUT      = 6,
  parameter int unsigned AW         = 6,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned IN_PERIOD  = 64,
  parameter int unsigned TEACH_PERIOD = 48,
  parameter int unsigned DWELL      = 160,
  parameter int unsigned PRE_WIN    = 64,
  parameter int unsigned POST_WIN   = 16,
  parameter int          W_TEACH    = 1023,
  parameter int unsigned DT_SHIFT   = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     btn,
  input  logic                     sel,
  input  logic [NDIGITS-1:0]       image,
  input  logic [N_OUT-1:0]         neuron,
  output logic [NPIX+N_OUT:0]      spikes,
  output logic [AW-1:0]            aer,
  output logic                     en_neuron,
  output logic                     aer_overflow,
  output logic [N_OUT-1:0]         spikes_out,
  output logic                     en_stdp,
  output vout_t                    v_out [N_OUT]
);

  localparam int unsigned N          = NPIX + 1 + N_OUT;
  localparam int unsigned TEACH_ADDR = NPIX;

  logic              en_addr, teach, stim;
  logic [N_OUT-1:0]  learn, hold, ctrl_we, stdp_we, stdp_busy;
  logic [AW-1:0]     ctrl_addr;
  weight_t           ctrl_w;
  logic [AW-1:0]     stdp_addr [N_OUT];
  weight_t           stdp_w    [N_OUT];
  logic [NPIX:0]     in_spikes;

  spike_source #(.IN_PERIOD(IN_PERIOD), .TEACH_PERIOD(TEACH_PERIOD)) u_src (
    .clk(clk), .rst(rst), .active(stim), .teach(teach),
    .image(image), .spikes(in_spikes)
  );

  assign spikes = {spikes_out, in_spikes};

  aer_encoder #(.N(N), .AW(AW), .FIFO_DEPTH(FIFO_DEPTH)) u_aer (
    .clk(clk), .rst(rst), .spikes(spikes), .aer(aer), .en_neuron(en_neuron),
    .overflow(aer_overflow)
  );

  train_ctrl #(
    .N_OUT(N_OUT), .N_SYN(NPIX), .AW(AW), .DWELL(DWELL),
    .TEACH_ADDR(TEACH_ADDR), .W_TEACH(W_TEACH)
  ) u_ctrl (
    .clk(clk), .rst(rst), .btn(btn), .sel(sel), .neuron(neuron),
    .en_stdp(en_stdp), .en_addr(en_addr), .learn(learn), .hold(hold), .teach(teach), .stim(stim),
    .ram_we(ctrl_we), .ram_addr(ctrl_addr), .ram_w(ctrl_w)
  );

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    logic          we;
    logic [AW-1:0] addr;
    weight_t       w;

    stdp #(.N_SYN(NPIX), .AW(AW), .PRE_WIN(PRE_WIN), .POST_WIN(POST_WIN)) u_stdp (
      .clk(clk), .rst(rst), .en(learn[k]), .en_addr(en_addr),
      .pre_spikes(in_spikes[NPIX-1:0]), .post_spike(spikes_out[k]),
      .we(stdp_we[k]), .addr(stdp_addr[k]), .weight(stdp_w[k]), .busy(stdp_busy[k])
    );

    // RAM write port: the controller's teacher writes, else the STDP module
    assign we   = ctrl_we[k] || stdp_we[k];
    assign addr = ctrl_we[k] ? ctrl_addr : stdp_addr[k];
    assign w    = ctrl_we[k] ? ctrl_w    : stdp_w[k];

    izh_neuron #(.AW(AW), .DT_SHIFT(DT_SHIFT)) u_neuron (
      .clk(clk), .rst(rst || hold[k]), .en(en_neuron), .we(we), .addr(addr), .weight(w),
      .aer_bus(aer), .spike_out(spikes_out[k]), .v_out(v_out[k])
    );

    a_one_writer: assert property (@(posedge clk) disable iff (rst) !(ctrl_we[k] && stdp_we[k]));
  end

  // The controller only starts a phase after the weight-restore sweep.
  a_restored: assert property (@(posedge clk) disable iff (rst) en_stdp |-> stdp_busy == '0);

endmodule
