// tb_input_align: feeds random weights with en high at random and checks
// that the current handed to the neuron is the sum of all weights since the
// last step plus the present one, and that it restarts from zero after each
// step.  Also checks the saturation bound with a long burst of large
// weights.
module tb_input_align;
  import snn_pkg::*;

  logic clk = 1'b0, rst, en;
  weight_t syn_in;
  cur_t i_out;
  longint acc;
  int checks = 0, failures = 0;

  localparam longint IMAX = (longint'(1) << (IW - 1)) - 1;

  input_align dut (.clk(clk), .rst(rst), .en(en), .syn_in(syn_in), .i_out(i_out));

  always #5 clk = ~clk;

  task automatic step(input bit e, input weight_t w);
    longint want;
    en = e; syn_in = w;
    #1;
    want = acc + longint'(w);
    if (want > IMAX) want = IMAX;
    if (want < -IMAX) want = -IMAX;
    checks++;
    if (longint'(i_out) != want) begin
      failures++;
      $display("FAIL: I=%0d want %0d", i_out, want);
    end
    @(posedge clk);
    acc = e ? 0 : want;
    #1;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; syn_in = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0; acc = 0; #1;
    for (int n = 0; n < 3000; n++) step(($urandom % 4) == 0, weight_t'($urandom));
    // saturation: 200 weights of 1023 exceed the 18-bit range
    step(1'b1, '0);
    for (int n = 0; n < 200; n++) step(1'b0, weight_t'(1023));
    step(1'b1, weight_t'(1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
