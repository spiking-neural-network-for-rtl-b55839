// tb_aer_encoder: the AER timeline experiment and a random stress test.
//
// Part 1 (5 neurons, 5-bit bus): idle bus shows 31; a single spike of
// neuron 0 appears on the bus in the next clock with EN_Neuron staying high;
// spikes of neurons 0, 1, 3, 4 together leave the bus as 4, 3, 1, 0 on
// consecutive clocks with EN_Neuron low until the last one; spikes of 1 and
// 2 that arrive during that burst are stored and then sent as 2, 1.
// Part 2 (47 neurons, 6-bit bus): random spike vectors at a rate the bus
// can carry; every address must appear, in arrival order and highest first
// within a vector, no overflow, and EN_Neuron must be high exactly when no
// address is pending.  Then a flood of vectors must set the overflow flag.
module tb_aer_encoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- part 1
  logic [4:0] s_spk, s_aer;
  logic s_en, s_ovf;
  aer_encoder #(.N(5), .AW(5), .FIFO_DEPTH(4)) dut_s (
    .clk(clk), .rst(rst), .spikes(s_spk), .aer(s_aer), .en_neuron(s_en), .overflow(s_ovf));

  // ---------------------------------------------------------------- part 2
  localparam int unsigned N = 47, AW = 6;
  logic [N-1:0]  b_spk;
  logic [AW-1:0] b_aer;
  logic b_en, b_ovf;
  aer_encoder #(.N(N), .AW(AW), .FIFO_DEPTH(8)) dut_b (
    .clk(clk), .rst(rst), .spikes(b_spk), .aer(b_aer), .en_neuron(b_en), .overflow(b_ovf));

  int exp_q [$];
  int sent = 0;

  initial begin
    int seq [$];
    rst = 1'b1; s_spk = '0; b_spk = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    @(posedge clk); #1;
    check(s_aer == 5'd31 && s_en, "idle bus is 31 with EN_Neuron high");

    s_spk = 5'b00001;
    @(posedge clk); #1;
    s_spk = '0;
    check(s_aer == 5'd0 && s_en, "single spike: address 0 in the next clock, EN stays high");
    @(posedge clk); #1;
    check(s_aer == 5'd31, "bus idle again");

    s_spk = 5'b11011;
    @(posedge clk); #1;
    s_spk = '0;
    seq.push_back(s_aer); check(!s_en, "EN_Neuron low during burst");
    @(posedge clk); #1;
    s_spk = 5'b00110;                    // arrives while the burst is sent
    seq.push_back(s_aer); check(!s_en, "EN_Neuron low during burst");
    @(posedge clk); #1;
    s_spk = '0;
    for (int k = 0; k < 4; k++) begin
      seq.push_back(s_aer);
      @(posedge clk); #1;
    end
    check(seq.size() == 6 && seq[0] == 4 && seq[1] == 3 && seq[2] == 1 && seq[3] == 0 &&
          seq[4] == 2 && seq[5] == 1, $sformatf("burst order %p, want 4 3 1 0 2 1", seq));
    check(s_aer == 5'd31 && s_en, "idle after the bursts");

    // part 2: random traffic, about one address per 1.6 clocks
    for (int n = 0; n < 6000; n++) begin
      logic [N-1:0] v;
      v = '0;
      if (($urandom % 8) == 0)
        for (int j = 0; j < 4; j++) if ($urandom % 2) v[$urandom % N] = 1'b1;
      b_spk = v;
      for (int k = N - 1; k >= 0; k--) if (v[k]) exp_q.push_back(k);
      @(posedge clk); #1;
      if (b_aer != '1) begin
        sent++;
        checks++;
        if (exp_q.size() == 0 || int'(b_aer) != exp_q[0]) begin
          failures++;
          $display("FAIL: bus %0d, expected %0d", b_aer, exp_q.size() ? exp_q[0] : -1);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
      if (b_spk == '0) check(b_en == (exp_q.size() == 0), "EN_Neuron high exactly when nothing is pending");
    end
    b_spk = '0;
    repeat (60) begin
      @(posedge clk); #1;
      if (b_aer != '1) begin
        if (exp_q.size()) void'(exp_q.pop_front());
        sent++;
      end
    end
    check(exp_q.size() == 0, "all addresses delivered");
    check(!b_ovf, "no overflow at a sustainable rate");
    $display("random traffic: %0d addresses sent", sent);

    // flood: a full vector every clock
    for (int n = 0; n < 40; n++) begin
      b_spk = '1;
      @(posedge clk); #1;
    end
    b_spk = '0;
    check(b_ovf, "overflow flag set by a flood");

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
