// tb_snn_top: end-to-end test of the digit-recognition network at its
// default size.
//
// Runs the two digit-recognition experiments: trains output neuron k on
// digit k for k = 0..5 (one learning phase each, started with btn while sel
// is low), switches to recognition (sel high), shows each of the six digits
// for a while and counts the spikes of every output neuron; then resets and
// does the same with digits 4..9.  Checks: each trained neuron fires for its own digit
// and fires strictly more for it than any other neuron does; the teacher entries are
// removed after training (an untrained digit pattern alone, shown before
// training, gives no output spike); pixel weights that belong to the digit
// grow while weights of pixels that are off stay 0; after rst every learned
// weight is gone and no neuron fires.  It also counts how often each
// mechanism happened: AER bursts that hold the neurons (EN_Neuron low),
// bypassed single spikes, vectors queued in the FIFO, STDP increments and
// decrements, synapse address steps, teacher writes, weight-restore
// sweeps, and clocks in which an already trained neuron is held at rest
// during another neuron's phase.  Every one must occur, and no held neuron
// may spike.  A second instance, with the pixel period
// cut to 4 clocks and a 2-entry AER FIFO, must raise the AER overflow flag;
// the default instance must never do so.
module tb_snn_top;
  import snn_pkg::*;

  localparam int unsigned N_OUT = 6;
  localparam int unsigned SHOW  = 3000;   // clocks per recognised digit

  logic                clk = 1'b0;
  logic                rst, btn, sel;
  logic [NDIGITS-1:0]  image;
  logic [N_OUT-1:0]    neuron;
  logic [NPIX+N_OUT:0] spikes;
  logic [5:0]          aer;
  logic                en_neuron, aer_overflow, en_stdp;
  logic [N_OUT-1:0]    spikes_out;
  vout_t               v_out [N_OUT];

  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_fifo = 0, n_incr = 0, n_decr = 0;
  int n_step = 0, n_teach = 0, n_sweep = 0, n_phase = 0;
  int n_hold = 0, n_held_spike = 0;
  logic [N_OUT-1:0] trained = '0;   // neurons that finished a learning phase
  logic [N_OUT-1:0] hold_d  = '0;   // hold one clock ago (spike_out is registered)
  int cnt [N_OUT];

  snn_top dut (
    .clk(clk), .rst(rst), .btn(btn), .sel(sel), .image(image), .neuron(neuron),
    .spikes(spikes), .aer(aer), .en_neuron(en_neuron), .aer_overflow(aer_overflow),
    .spikes_out(spikes_out), .en_stdp(en_stdp), .v_out(v_out)
  );

  always #5 clk = ~clk;

  // A second, deliberately overloaded instance: pixels every 4 clocks and a
  // 2-entry FIFO, so spike vectors arrive faster than the bus can send them
  // and the AER overflow flag must rise.
  logic [NPIX+N_OUT:0] o_spikes;
  logic [5:0]          o_aer;
  logic                o_en, o_ovf, o_en_stdp;
  logic [N_OUT-1:0]    o_out;
  vout_t               o_v [N_OUT];

  snn_top #(.IN_PERIOD(4), .FIFO_DEPTH(2)) dut_ovf (
    .clk(clk), .rst(rst), .btn(1'b0), .sel(1'b1), .image(NDIGITS'(1) << 8), .neuron('0),
    .spikes(o_spikes), .aer(o_aer), .en_neuron(o_en), .aer_overflow(o_ovf),
    .spikes_out(o_out), .en_stdp(o_en_stdp), .v_out(o_v)
  );

  // mechanism counters
  logic en_stdp_d = 1'b0, en_neuron_d = 1'b1;
  always @(posedge clk) begin
    if (!rst) begin
      if (en_neuron_d && !en_neuron) n_stall++;
      if (dut.u_aer.cur_q == '0 && dut.u_aer.fifo_empty && spikes != '0) n_bypass++;
      if (dut.u_aer.fifo_push) n_fifo++;
      if (dut.u_ctrl.en_addr) n_step++;
      if (dut.u_ctrl.ram_we != '0) n_teach++;
      if (en_stdp && !en_stdp_d) n_phase++;
      if ((dut.hold & trained) != '0) n_hold++;
      if ((spikes_out & dut.hold & hold_d) != '0) n_held_spike++;
      for (int k = 0; k < N_OUT; k++) begin
        if (spikes_out[k]) cnt[k]++;
      end
    end
    en_stdp_d   <= en_stdp;
    hold_d      <= dut.hold;
    en_neuron_d <= en_neuron;
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_mon
    always @(posedge clk) begin
      if (!rst && dut.learn[k]) begin
        if (dut.g_out[k].u_stdp.incr) n_incr++;
        if (dut.g_out[k].u_stdp.decr) n_decr++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_counts();
    for (int k = 0; k < N_OUT; k++) cnt[k] = 0;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    trained = '0;
    n_sweep++;
    repeat (80) @(posedge clk);   // weight restore sweep and controller start-up
  endtask

  task automatic train_on(input int k, input int d);
    image  = NDIGITS'(1) << d;
    neuron = N_OUT'(1) << k;
    sel    = 1'b0;
    btn    = 1'b1;
    repeat (6) @(posedge clk);
    btn    = 1'b0;
    wait (en_stdp);
    wait (!en_stdp);
    repeat (10) @(posedge clk);
    trained[k] = 1'b1;
  endtask

  task automatic show(input int d);
    image = NDIGITS'(1) << d;
    sel   = 1'b1;
    repeat (200) @(posedge clk);   // let the previous digit's response die out
    clear_counts();
    repeat (SHOW) @(posedge clk);
  endtask

  function automatic weight_t ram_w(input int k, input int a);
    case (k)
      0: return dut.g_out[0].u_neuron.u_ram.mem[a];
      1: return dut.g_out[1].u_neuron.u_ram.mem[a];
      2: return dut.g_out[2].u_neuron.u_ram.mem[a];
      3: return dut.g_out[3].u_neuron.u_ram.mem[a];
      4: return dut.g_out[4].u_neuron.u_ram.mem[a];
      default: return dut.g_out[5].u_neuron.u_ram.mem[a];
    endcase
  endfunction

  // Train output neuron k on digit first+k, then show each of those digits.
  task automatic run_set(input int first);
    for (int k = 0; k < N_OUT; k++) begin
      int d;
      d = first + k;
      train_on(k, d);
      for (int p = 0; p < NPIX; p++) begin
        weight_t w;
        w = ram_w(k, p);
        if (!glyph(d)[p]) check(w == 0, $sformatf("N%0d off-pixel %0d weight %0d", 41 + k, p, w));
      end
      begin
        int sum;
        sum = 0;
        for (int p = 0; p < NPIX; p++) if (glyph(d)[p]) sum += int'(ram_w(k, p));
        $display("trained N%0d on digit %0d: on-pixel weight sum %0d", 41 + k, d, sum);
        check(sum > 0, "on-pixel weights grew");
      end
      check(ram_w(k, NPIX) == 0, "teacher entry removed");
    end
    for (int k = 0; k < N_OUT; k++) begin
      int best;
      show(first + k);
      best = k;
      $display("digit %0d: spikes N41..N46 = %0d %0d %0d %0d %0d %0d", first + k,
               cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]);
      for (int j = 0; j < N_OUT; j++) if (j != k && cnt[j] >= cnt[best]) best = j;
      check(cnt[k] > 0, $sformatf("N%0d silent for its digit %0d", 41 + k, first + k));
      check(best == k, $sformatf("digit %0d: N%0d fired at least as often as N%0d", first + k, 41 + best, 41 + k));
    end
    sel = 1'b0;
  endtask


  initial begin
    btn = 1'b0; sel = 1'b0; image = '0; neuron = '0;
    clear_counts();
    do_reset();

    // before any training no neuron answers a digit
    show(0);
    for (int k = 0; k < N_OUT; k++) check(cnt[k] == 0, $sformatf("untrained N%0d fired", 41 + k));
    sel = 1'b0;

    run_set(0);      // digits 0..5 on N41..N46
    do_reset();
    run_set(4);      // digits 4..9 on N41..N46

    // RST restores all weights
    sel = 1'b0;
    do_reset();
    show(3);
    for (int k = 0; k < N_OUT; k++) check(cnt[k] == 0, $sformatf("N%0d fired after reset", 41 + k));
    for (int p = 0; p < NPIX; p++) check(ram_w(3, p) == 0, "weight restored by reset");

    $display("mechanisms: stalls=%0d bypass=%0d fifo=%0d incr=%0d decr=%0d steps=%0d teach=%0d sweeps=%0d phases=%0d held=%0d overflow(overloaded instance)=%0d",
             n_stall, n_bypass, n_fifo, n_incr, n_decr, n_step, n_teach, n_sweep, n_phase, n_hold, o_ovf);
    check(n_stall > 0,  "AER stall never happened");
    check(n_bypass > 0, "AER bypass never happened");
    check(n_fifo > 0,   "AER FIFO never used");
    check(n_incr > 0,   "STDP increment never happened");
    check(n_decr > 0,   "STDP decrement never happened");
    check(n_step == 2 * N_OUT * NPIX, "synapse address steps");
    check(n_teach == 4 * N_OUT, "teacher writes");
    check(n_phase == 2 * N_OUT, "learning phases");
    check(n_sweep == 3, "weight restore sweeps");
    check(n_hold > 0, "trained neuron never held during another neuron's phase");
    check(n_held_spike == 0, $sformatf("%0d spikes of held neurons during a phase", n_held_spike));
    check(!aer_overflow, "no AER overflow at the default rates");
    check(o_ovf, "AER overflow never happened in the overloaded instance");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
