// train_ctrl: controls the learning phases of the network.
//
// After reset it waits INIT_CYCLES clocks for the STDP modules to restore
// all weights.  A rising edge of btn (synchronised by two flip-flops) while
// sel is low starts a learning phase for the output neurons selected by the
// one-hot vector neuron:
//   1. the teacher weight W_TEACH is written into entry TEACH_ADDR of their
//      RAMs, so the teacher neuron makes them fire;
//   2. en_stdp is high for N_SYN * DWELL clocks; every DWELL clocks en_addr
//      moves the STDP modules to the next synapse, so every synapse is
//      trained once; the teacher and the input image fire throughout;
//   3. after one clock for the last STDP write, the teacher entry is
//      cleared again.
// From step 1 to step 3, hold is high for every output neuron that is not
// being trained; the top keeps those neurons at rest, so that only the
// neuron being trained can fire while a phase runs, even one that has
// already learned a similar digit.
// With sel high (recognition) btn is ignored and the image is shown
// continuously.  learn is en_stdp per output neuron.  ram_we/ram_addr/ram_w
// take the neuron RAM write ports for one clock at steps 1 and 3; the STDP
// modules never write then.  BTN, SEL, the neuron select and EN_STDP are
// the document's signals; the phase sequence is this design's reading of
// its training description.
// ram_addr is always TEACH_ADDR and the sign bit of ram_w is always 0;
// they stay ports so that the RAM write mux in the top takes a complete
// write (enable, address, data) from either the controller or STDP.
module train_ctrl
  import snn_pkg::*;
#(
  parameter int unsigned N_OUT       = 6,
  parameter int unsigned N_SYN       = 40,
  parameter int unsigned AW          = 6,
  parameter int unsigned DWELL       = 160,
  parameter int unsigned TEACH_ADDR  = 40,
  parameter int          W_TEACH     = 1023,
  parameter int unsigned INIT_CYCLES = 2**AW + 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             btn,
  input  logic             sel,
  input  logic [N_OUT-1:0] neuron,
  output logic             en_stdp,
  output logic             en_addr,
  output logic [N_OUT-1:0] learn,
  output logic [N_OUT-1:0] hold,
  output logic             teach,
  output logic             stim,
  output logic [N_OUT-1:0] ram_we,
  output logic [AW-1:0]    ram_addr,
  output weight_t          ram_w
);

  localparam int unsigned DW = $clog2(DWELL + 1);
  localparam int unsigned SW_ = $clog2(N_SYN + 1);
  localparam int unsigned IW_ = $clog2(INIT_CYCLES + 1);

  tc_state_e        state_q;
  logic [2:0]       btn_sync_q;
  logic             btn_rise;
  logic [N_OUT-1:0] nsel_q;
  logic [DW-1:0]    dwell_q;
  logic [SW_-1:0]   syn_q;
  logic [IW_-1:0]   init_q;
  logic             last_dwell;

  assign btn_rise   = btn_sync_q[1] && !btn_sync_q[2];
  assign last_dwell = (dwell_q == DW'(DWELL - 1));

  always_ff @(posedge clk) begin
    if (rst) btn_sync_q <= '0;
    else     btn_sync_q <= {btn_sync_q[1:0], btn};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= TC_INIT;
      nsel_q  <= '0;
      dwell_q <= '0;
      syn_q   <= '0;
      init_q  <= '0;
    end else begin
      unique case (state_q)
        TC_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == IW_'(INIT_CYCLES - 1)) state_q <= TC_IDLE;
        end
        TC_IDLE: begin
          if (btn_rise && !sel && neuron != '0) begin
            nsel_q  <= neuron;
            state_q <= TC_TEACH_ON;
          end
        end
        TC_TEACH_ON: begin
          dwell_q <= '0;
          syn_q   <= '0;
          state_q <= TC_TRAIN;
        end
        TC_TRAIN: begin
          if (last_dwell) begin
            dwell_q <= '0;
            syn_q   <= syn_q + 1'b1;
            if (syn_q == SW_'(N_SYN - 1)) state_q <= TC_DRAIN;
          end else begin
            dwell_q <= dwell_q + 1'b1;
          end
        end
        TC_DRAIN:     state_q <= TC_TEACH_OFF;
        TC_TEACH_OFF: state_q <= TC_IDLE;
        default:      state_q <= TC_IDLE;
      endcase
    end
  end

  always_comb begin
    en_stdp  = (state_q == TC_TRAIN);
    en_addr  = en_stdp && last_dwell;
    learn    = nsel_q & {N_OUT{en_stdp}};
    hold     = (state_q inside {TC_TEACH_ON, TC_TRAIN, TC_DRAIN, TC_TEACH_OFF}) ? ~nsel_q : '0;
    teach    = en_stdp;
    stim     = en_stdp || sel;
    ram_we   = '0;
    ram_addr = AW'(TEACH_ADDR);
    ram_w    = '0;
    if (state_q == TC_TEACH_ON) begin
      ram_we = nsel_q;
      ram_w  = weight_t'(W_TEACH);
    end else if (state_q == TC_TEACH_OFF) begin
      ram_we = nsel_q;
    end
  end

endmodule
