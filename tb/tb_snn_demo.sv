// tb_snn_demo: the two-digit board demonstration, run on snn_top at its
// default size.
//
// Only two inputs of each select are used, as on a small board with four
// switches: image[1:0] picks digit 0 or 1, neuron[1:0] picks output neuron
// N41 or N42, and the first two spikes_out bits stand for two LEDs.  The
// sequence: reset; with digit 0 and N41 selected press btn (one learning
// phase); the same for digit 1 and N42; switch to recognition (sel high)
// and show each digit.  Checks: the LED of the digit's own neuron lights
// (it spikes) and lights more often than the other LED; while digit 0 is
// trained, N42 never spikes (it is held during N41's phase); after a second
// reset neither LED lights for either digit.  Watchdog included.
module tb_snn_demo;
  import snn_pkg::*;

  localparam int unsigned N_OUT = 6;
  localparam int unsigned SHOW  = 3000;   // clocks per shown digit

  logic                clk = 1'b0;
  logic                rst, btn, sel;
  logic [NDIGITS-1:0]  image;
  logic [N_OUT-1:0]    neuron;
  logic [NPIX+N_OUT:0] spikes;
  logic [5:0]          aer;
  logic                en_neuron, aer_overflow, en_stdp;
  logic [N_OUT-1:0]    spikes_out;
  vout_t               v_out [N_OUT];
  logic [1:0]          led;

  int checks = 0, failures = 0;
  int cnt [2];

  snn_top dut (
    .clk(clk), .rst(rst), .btn(btn), .sel(sel), .image(image), .neuron(neuron),
    .spikes(spikes), .aer(aer), .en_neuron(en_neuron), .aer_overflow(aer_overflow),
    .spikes_out(spikes_out), .en_stdp(en_stdp), .v_out(v_out)
  );

  assign led = spikes_out[1:0];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      if (led[0]) cnt[0]++;
      if (led[1]) cnt[1]++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic press_rst();
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (80) @(posedge clk);   // weight restore sweep and controller start-up
  endtask

  // switches: digit d and neuron d, then one btn press
  task automatic train(input int d);
    image  = NDIGITS'(1) << d;
    neuron = N_OUT'(1) << d;
    sel    = 1'b0;
    btn    = 1'b1;
    repeat (6) @(posedge clk);
    btn    = 1'b0;
    wait (en_stdp);
    cnt[0] = 0;
    cnt[1] = 0;
    wait (!en_stdp);
    check(cnt[1 - d] == 0, $sformatf("LD%0d lit while N%0d was trained", 1 - d, 41 + d));
    repeat (10) @(posedge clk);
  endtask

  task automatic show(input int d);
    image = NDIGITS'(1) << d;
    sel   = 1'b1;
    repeat (200) @(posedge clk);
    cnt[0] = 0;
    cnt[1] = 0;
    repeat (SHOW) @(posedge clk);
    $display("digit %0d: LD0 %0d pulses, LD1 %0d pulses", d, cnt[0], cnt[1]);
  endtask

  initial begin
    btn = 1'b0; sel = 1'b0; image = '0; neuron = '0;
    cnt[0] = 0; cnt[1] = 0;
    press_rst();

    train(0);
    train(1);
    for (int d = 0; d < 2; d++) begin
      show(d);
      check(cnt[d] > 0, $sformatf("LD%0d dark for digit %0d", d, d));
      check(cnt[d] > cnt[1 - d], $sformatf("digit %0d: LD%0d not ahead", d, d));
    end

    sel = 1'b0;
    press_rst();
    for (int d = 0; d < 2; d++) begin
      show(d);
      check(cnt[0] == 0 && cnt[1] == 0, $sformatf("LED lit for digit %0d after reset", d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
