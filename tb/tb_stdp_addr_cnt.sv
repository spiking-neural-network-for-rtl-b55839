// tb_stdp_addr_cnt: the synapse address starts at 0, advances only when en
// and en_addr are both high, and wraps from N_SYN-1 to 0; random stimulus
// against a counter model.
module tb_stdp_addr_cnt;
  localparam int unsigned N_SYN = 5, AW = 4;
  logic clk = 1'b0, rst, en, en_addr;
  logic [AW-1:0] syn_addr;
  int model = 0, checks = 0, failures = 0;

  stdp_addr_cnt #(.N_SYN(N_SYN), .AW(AW)) dut (
    .clk(clk), .rst(rst), .en(en), .en_addr(en_addr), .syn_addr(syn_addr));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; en = 1'b0; en_addr = 1'b0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      checks++;
      if (int'(syn_addr) != model) begin
        failures++;
        $display("FAIL: addr %0d want %0d", syn_addr, model);
      end
      en = $urandom % 2; en_addr = $urandom % 2;
      @(posedge clk);
      if (en && en_addr) model = (model + 1) % N_SYN;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
