// tb_stdp_weight_cnt: after reset the counter writes 0 to all 2**AW RAM
// entries (busy high meanwhile); then random incr/decr/en/address stimulus
// is checked against a model of the weights, including saturation at W_MAX
// and W_MIN, and every write (we, addr, weight, one clock later) is checked
// against the model.
module tb_stdp_weight_cnt;
  import snn_pkg::*;
  localparam int unsigned N_SYN = 5, AW = 3;
  localparam int W_MAX = 6, W_MIN = -4;

  logic clk = 1'b0, rst, en, incr, decr, we, busy;
  logic [AW-1:0] syn_addr, addr;
  weight_t weight;
  int model [N_SYN];
  int checks = 0, failures = 0;

  stdp_weight_cnt #(.N_SYN(N_SYN), .AW(AW), .W_MAX(W_MAX), .W_MIN(W_MIN)) dut (
    .clk(clk), .rst(rst), .en(en), .incr(incr), .decr(decr), .syn_addr(syn_addr),
    .we(we), .addr(addr), .weight(weight), .busy(busy));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit cleared [2**AW];
    rst = 1'b1; en = 1'b0; incr = 1'b0; decr = 1'b0; syn_addr = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int k = 0; k < 2**AW; k++) cleared[k] = 1'b0;
    for (int k = 0; k < N_SYN; k++) model[k] = 0;
    en = 1'b1; incr = 1'b1;            // ignored while restoring
    for (int n = 0; n < 2**AW + 1; n++) begin
      if (n == 2**AW) en = 1'b0;
      @(posedge clk); #1;
      if (we && weight == 0) cleared[addr] = 1'b1;
    end
    for (int k = 0; k < 2**AW; k++) check(cleared[k], $sformatf("entry %0d not restored", k));
    check(!busy, "busy after the sweep");

    for (int n = 0; n < 3000; n++) begin
      int a, wnew;
      bit upd;
      en = ($urandom % 4) != 0; incr = $urandom % 2; decr = $urandom % 2;
      syn_addr = AW'($urandom % N_SYN);
      a = int'(syn_addr);
      upd = en && (incr != decr);
      wnew = model[a];
      if (upd && incr && wnew < W_MAX) wnew++;
      if (upd && decr && wnew > W_MIN) wnew--;
      @(posedge clk); #1;
      check(we == upd, "write enable");
      check(int'(addr) == a && int'(weight) == wnew, $sformatf("addr %0d weight %0d, want %0d %0d", addr, weight, a, wnew));
      model[a] = wnew;
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
