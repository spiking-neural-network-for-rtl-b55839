// tb_izh_neuron: reproduces the neuron experiments of constant input steps.
//
// Weight 120, 300 or -150 (12 mV, 30 mV, -15 mV) is written to RAM entry 1
// and the AER bus is held at address 1, so every time step receives that
// input.  The spike times are compared with the Izhikevich model
// (a=0.02, b=0.2, c=-65, d=2, Euler steps of 0.5 ms, reset in the step
// after v reaches 30 mV) computed here in floating point: the number of
// spikes in 1500 steps must agree within 5 %, and with -15 mV there must be
// no spike and v must settle at the model's -81.8 mV.  Also checked: the
// state after reset (v = -65 mV), the first step with 12 mV (-60.5 mV, the 0.1 mV output rounds down),
// that a burst of two addresses delivered while en is low counts as one
// step with their summed weight, and that the state holds while en is low.
module tb_izh_neuron;
  import snn_pkg::*;
  localparam int unsigned AW = 6;

  logic clk = 1'b0, rst, en, we, spike_out;
  logic [AW-1:0] addr, aer_bus;
  weight_t weight;
  vout_t v_out;
  int checks = 0, failures = 0;

  izh_neuron #(.AW(AW)) dut (
    .clk(clk), .rst(rst), .en(en), .we(we), .addr(addr), .weight(weight),
    .aer_bus(aer_bus), .spike_out(spike_out), .v_out(v_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int model_spikes(input real i_mv, input int steps, output real v_end);
    real v = -65.0, u = -13.0, vn;
    int s = 0;
    for (int t = 0; t < steps; t++) begin
      if (v >= 30.0) begin
        v = -65.0; u = u + 2.0; s++;
      end else begin
        vn = v + 0.5 * (0.04 * v * v + 5.0 * v + 140.0 - u + i_mv);
        u  = u + 0.5 * 0.02 * (0.2 * v - u);
        v  = vn;
      end
    end
    v_end = v;
    return s;
  endfunction

  task automatic write(input int a, input int w);
    we = 1'b1; addr = AW'(a); weight = weight_t'(w);
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  task automatic reset();
    rst = 1'b1; en = 1'b0; aer_bus = '1;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
  endtask

  task automatic run_step(input int w, input int steps);
    int n = 0, want;
    real v_end;
    reset();
    write(1, w);
    aer_bus = AW'(1); en = 1'b1;
    for (int t = 0; t < steps; t++) begin
      @(posedge clk); #1;
      n += int'(spike_out);
    end
    want = model_spikes(real'(w) / 10.0, steps, v_end);
    $display("input %0d (x0.1 mV): %0d spikes, model %0d, v_out %0d", w, n, want, v_out);
    check((n - want) * 20 <= want && (want - n) * 20 <= want, $sformatf("spike count %0d vs model %0d", n, want));
    if (want == 0) begin
      check(n == 0, "inhibitory input fired");
      check(v_out >= -823 && v_out <= -813, $sformatf("settled v %0d, model %f", v_out, v_end * 10.0));
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; weight = '0;
    // clear the entries used below and the idle code entry
    reset();
    for (int k = 0; k < 2**AW; k++) write(k, 0);

    // state after reset and first step with 12 mV
    reset();
    check(v_out == -650, $sformatf("reset v %0d", v_out));
    write(1, 120);
    aer_bus = AW'(1); en = 1'b1;
    @(posedge clk); #1;
    check(v_out >= -606 && v_out <= -605, $sformatf("first step v %0d, want -605", v_out));

    // a burst of two addresses while en is low equals one step of their sum
    reset();
    write(2, 70); write(3, 50);
    en = 1'b0; aer_bus = AW'(2);
    @(posedge clk); #1;
    check(v_out == -650, "state moved while en low");
    aer_bus = AW'(3); en = 1'b1;
    @(posedge clk); #1;
    check(v_out >= -606 && v_out <= -605, $sformatf("burst step v %0d, want -605", v_out));
    // hold
    begin
      vout_t held;
      held = v_out;
      en = 1'b0; aer_bus = '1;
      repeat (20) @(posedge clk); #1;
      check(v_out == held, "state not held while en low");
    end

    run_step(120, 1500);
    run_step(300, 1500);
    run_step(-150, 1500);

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
