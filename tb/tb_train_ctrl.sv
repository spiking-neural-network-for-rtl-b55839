// tb_train_ctrl: a small controller (3 output neurons, 4 synapses, dwell
// of 5 clocks, 4-bit addresses).  Checks that btn is ignored during the
// start-up wait and in recognition mode (sel high, where the stimulus is on
// and no phase starts), and that a phase for neuron 1 does, in order: one
// teacher write of W_TEACH to entry TEACH_ADDR of neuron 1 only, en_stdp
// high for exactly 4 * 5 clocks with learn = neuron 1, teacher and stimulus
// on, en_addr pulses every 5 clocks (4 in all), then one free clock, then
// one write of 0 to the teacher entry.  hold must be high for neurons 0
// and 2 (not trained) from the teacher write to the teacher clear, both
// included, and low otherwise.
module tb_train_ctrl;
  import snn_pkg::*;
  localparam int unsigned N_OUT = 3, N_SYN = 4, AW = 4, DWELL = 5, TEACH_ADDR = 9;
  localparam int W_TEACH = 700;

  logic clk = 1'b0, rst, btn, sel;
  logic [N_OUT-1:0] neuron, learn, hold, ram_we;
  logic en_stdp, en_addr, teach, stim;
  logic [AW-1:0] ram_addr;
  weight_t ram_w;
  int checks = 0, failures = 0;

  train_ctrl #(.N_OUT(N_OUT), .N_SYN(N_SYN), .AW(AW), .DWELL(DWELL),
               .TEACH_ADDR(TEACH_ADDR), .W_TEACH(W_TEACH)) dut (
    .clk(clk), .rst(rst), .btn(btn), .sel(sel), .neuron(neuron), .en_stdp(en_stdp),
    .en_addr(en_addr), .learn(learn), .hold(hold), .teach(teach), .stim(stim), .ram_we(ram_we),
    .ram_addr(ram_addr), .ram_w(ram_w));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press();
    btn = 1'b1; repeat (4) @(posedge clk); #1; btn = 1'b0;
  endtask

  initial begin
    int t_on = -1, t_first = -1, t_last = -1, t_off = -1, n_addr = 0, n_stdp = 0, n_hold = 0, t = 0;
    rst = 1'b1; btn = 1'b0; sel = 1'b0; neuron = 3'b010;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    press();                                   // during the start-up wait
    repeat (2**AW + 4) @(posedge clk); #1;
    check(!en_stdp && ram_we == '0, "btn acted during start-up");

    sel = 1'b1; #1;
    check(stim && !teach, "stimulus on in recognition mode");
    press();
    repeat (10) @(posedge clk); #1;
    check(!en_stdp && ram_we == '0, "btn acted in recognition mode");

    sel = 1'b0;
    btn = 1'b1;
    for (t = 0; t < 200; t++) begin
      @(posedge clk); #1;
      if (t == 3) btn = 1'b0;
      if (ram_we != '0) begin
        check(ram_we == 3'b010 && int'(ram_addr) == TEACH_ADDR, "teacher write target");
        if (t_on < 0) begin t_on = t; check(int'(ram_w) == W_TEACH, "teacher weight"); end
        else begin t_off = t; check(ram_w == '0, "teacher cleared"); end
      end
      if ((t_on >= 0 && t_off < 0) || t == t_off) begin
        n_hold++;
        check(hold == 3'b101, "other neurons held during the phase");
      end else check(hold == '0, "no neuron held outside a phase");
      if (en_stdp) begin
        if (t_first < 0) t_first = t;
        t_last = t;
        n_stdp++;
        check(learn == 3'b010 && teach && stim, "learn/teach/stim during phase");
      end else check(learn == '0, "learn outside phase");
      if (en_addr) begin
        n_addr++;
        check(en_stdp && (t - t_first + 1) % DWELL == 0, "en_addr every DWELL clocks");
      end
    end
    check(t_on >= 0 && t_first == t_on + 1, "phase starts after teacher write");
    check(n_stdp == N_SYN * DWELL, $sformatf("en_stdp length %0d", n_stdp));
    check(n_addr == N_SYN, "one address step per synapse");
    check(t_off == t_last + 2, "teacher cleared one clock after the last STDP clock");
    check(n_hold == t_off - t_on + 1, "hold lasts the whole phase");
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
