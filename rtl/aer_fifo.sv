// aer_fifo: synchronous first-in first-out buffer for spike vectors.
//
// Holds spike vectors that arrive while the AER encoder is still sending an
// earlier burst.  push writes din at the clock edge unless the FIFO is full
// (then the vector is lost and full tells the writer so); pop removes the
// head, which is always visible on dout (first-word fall-through).  push and
// pop may be given in the same cycle.  DEPTH must be a power of two.  The
// document names the FIFO and its role; depth and interface are this
// design's choices.
module aer_fifo #(
  parameter int unsigned WIDTH = 47,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0]      wr_q, rd_q;
  logic             do_push, do_pop;

  assign empty   = (wr_q == rd_q);
  assign full    = (wr_q[PW-1:0] == rd_q[PW-1:0]) && (wr_q[PW] != rd_q[PW]);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_q[PW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q[PW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q <= '0;
      rd_q <= '0;
    end else begin
      if (do_push) wr_q <= wr_q + 1'b1;
      if (do_pop)  rd_q <= rd_q + 1'b1;
    end
  end

  // A pop is only requested when there is something to pop.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
