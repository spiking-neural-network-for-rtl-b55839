// tb_stdp: the STDP module with three synapses and a 5-bit address, as in
// the document's STDP timeline.
//
// After reset all 32 RAM entries must be written with 0.  Then, one synapse
// at a time, a single pre spike and a single post spike are applied with a
// time difference dt (negative: post first) and the weight written to the
// RAM is compared with the window-overlap rule worked out here:
//   pre first:  +max(0, min(PRE_WIN - dt, POST_WIN))
//   post first or together: -max(0, min(POST_WIN - |dt|, PRE_WIN))
// A synapse whose pre spikes are silent keeps its weight even when the
// post neuron fires; en_addr moves to the next synapse and clears the
// windows; with en low nothing is written.
module tb_stdp;
  import snn_pkg::*;
  localparam int unsigned N_SYN = 3, AW = 5, PRE_WIN = 64, POST_WIN = 16;

  logic clk = 1'b0, rst, en, en_addr, post, we, busy;
  logic [N_SYN-1:0] pre;
  logic [AW-1:0] addr;
  weight_t weight;
  int ram [2**AW];
  int model [N_SYN];
  int cur = 0, checks = 0, failures = 0, n_we = 0;

  stdp #(.N_SYN(N_SYN), .AW(AW), .PRE_WIN(PRE_WIN), .POST_WIN(POST_WIN)) dut (
    .clk(clk), .rst(rst), .en(en), .en_addr(en_addr), .pre_spikes(pre), .post_spike(post),
    .we(we), .addr(addr), .weight(weight), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) if (we) begin ram[addr] = int'(weight); n_we++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int rule(input int dt);
    int m;
    if (dt > 0) begin
      m = int'(PRE_WIN) - dt; if (m > int'(POST_WIN)) m = POST_WIN;
      return m > 0 ? m : 0;
    end
    m = int'(POST_WIN) + dt; if (m > int'(PRE_WIN)) m = PRE_WIN;
    return m > 0 ? -m : 0;
  endfunction

  // one pre/post pair on synapse cur (or on another synapse if silent)
  task automatic pair(input int dt, input bit silent);
    int t0 = (dt < 0) ? -dt : 0;
    for (int t = 0; t <= t0 + (dt > 0 ? dt : 0); t++) begin
      pre  = (t == t0 && !silent) ? N_SYN'(1) << cur : (t == t0 ? ~(N_SYN'(1) << cur) : '0);
      post = (t == t0 + dt);
      @(posedge clk); #1;
    end
    pre = '0; post = 1'b0;
    repeat (PRE_WIN + POST_WIN + 4) @(posedge clk);
    #1;
    if (!silent) begin
      model[cur] += rule(dt);
      if (model[cur] > 1023) model[cur] = 1023;
      if (model[cur] < -1023) model[cur] = -1023;
    end
    check(ram[cur] == model[cur], $sformatf("synapse %0d dt %0d: weight %0d want %0d", cur, dt, ram[cur], model[cur]));
    // next synapse
    en_addr = 1'b1;
    @(posedge clk); #1;
    en_addr = 1'b0;
    cur = (cur + 1) % N_SYN;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; en_addr = 1'b0; pre = '0; post = 1'b0;
    for (int k = 0; k < 2**AW; k++) ram[k] = 99;
    for (int k = 0; k < N_SYN; k++) model[k] = 0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    repeat (2**AW + 2) @(posedge clk); #1;
    for (int k = 0; k < 2**AW; k++) check(ram[k] == 0, $sformatf("entry %0d not restored", k));
    check(!busy, "busy after sweep");

    en = 1'b1;
    pair(10, 0);     // synapse 0: pre 10 clocks before post, weight +16
    pair(10, 1);     // synapse 1: no pre spike, unchanged
    pair(52, 0);     // synapse 2: larger time difference, smaller change (+12)
    check(ram[0] == 16 && ram[1] == 0 && ram[2] == 12, "first sweep weights 16, 0, 12");
    for (int n = 0; n < 60; n++) pair(int'($urandom % 100) - 30, 1'b0);
    pair(0, 0);      // together: depression

    // en low: nothing is written
    en = 1'b0;
    n_we = 0;
    pre = '1; post = 1'b1;
    repeat (40) @(posedge clk);
    #1;
    pre = '0; post = 1'b0;
    check(n_we == 0, "write with en low");

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
