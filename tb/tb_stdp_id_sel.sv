// tb_stdp_id_sel: pre then post gives incr; post then pre gives decr; a
// simultaneous pair gives decr; the flags hold between spikes and are
// cleared by clr.  Random stimulus against a model of the last spike order.
module tb_stdp_id_sel;
  logic clk = 1'b0, rst, clr, pre, post, incr, decr;
  logic m_incr = 1'b0, m_decr = 1'b0;
  int checks = 0, failures = 0;

  stdp_id_sel dut (.clk(clk), .rst(rst), .clr(clr), .pre_spike(pre), .post_spike(post),
                   .incr(incr), .decr(decr));

  always #5 clk = ~clk;

  task automatic drive(input bit c, input bit p, input bit q);
    clr = c; pre = p; post = q;
    @(posedge clk);
    if (c) begin m_incr = 1'b0; m_decr = 1'b0; end
    else if (p) begin m_incr = 1'b0; m_decr = 1'b1; end
    else if (q) begin m_incr = 1'b1; m_decr = 1'b0; end
    #1;
    checks++;
    if (incr != m_incr || decr != m_decr) begin
      failures++;
      $display("FAIL: clr=%0d pre=%0d post=%0d -> incr=%0d decr=%0d", c, p, q, incr, decr);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; pre = 1'b0; post = 1'b0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    drive(0, 1, 0); drive(0, 0, 0); drive(0, 0, 1);      // pre then post
    if (!incr) $display("FAIL: pre-then-post not incr");
    drive(0, 0, 0); drive(0, 1, 0);                      // post then pre
    drive(0, 1, 1);                                      // together
    drive(1, 0, 0);
    for (int n = 0; n < 1000; n++) drive(($urandom % 16) == 0, ($urandom % 4) == 0, ($urandom % 4) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
