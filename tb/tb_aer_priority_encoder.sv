// tb_aer_priority_encoder: random and one-hot vectors; the expected index
// is found by scanning from the top bit down for the first set bit.
module tb_aer_priority_encoder;
  localparam int unsigned N = 47, AW = 6;
  logic [N-1:0] vec;
  logic valid;
  logic [AW-1:0] idx;
  int checks = 0, failures = 0;

  aer_priority_encoder #(.N(N), .AW(AW)) dut (.vec(vec), .valid(valid), .idx(idx));

  task automatic try(input logic [N-1:0] x);
    int want = -1;
    vec = x;
    #1;
    for (int k = N - 1; k >= 0; k--) if (x[k]) begin want = k; break; end
    checks++;
    if ((want < 0 && valid) || (want >= 0 && (!valid || int'(idx) != want))) begin
      failures++;
      $display("FAIL: vec=%h valid=%0d idx=%0d want %0d", x, valid, idx, want);
    end
  endtask

  initial begin
    try('0);
    for (int k = 0; k < N; k++) try(N'(1) << k);
    for (int n = 0; n < 2000; n++) try({$urandom, $urandom} >> ($urandom % 64));
    try(5'b11011);   // spikes of neurons 0, 1, 3, 4: 4 goes first
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
