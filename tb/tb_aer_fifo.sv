// tb_aer_fifo: random pushes and pops against a queue model; checks the
// head word, empty and full after every clock, and that a push into a full
// FIFO without a pop is dropped.
module tb_aer_fifo;
  localparam int unsigned WIDTH = 47, DEPTH = 8;
  logic clk = 1'b0, rst, push, pop, empty, full;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0;

  aer_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .push(push), .din(din), .pop(pop), .dout(dout),
    .empty(empty), .full(full));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; push = 1'b0; pop = 1'b0; din = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        $display("FAIL: size %0d empty %0d full %0d", q.size(), empty, full);
      end
      push = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      pop  = !empty && (($urandom % 100) < 50);
      din  = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push && q.size() < DEPTH) q.push_back(din);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
