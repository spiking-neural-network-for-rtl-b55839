// tb_neuron_ram: writes random weights to random entries of the synaptic RAM
// (with write enable toggled at random) and checks the asynchronous read
// port against a reference array after every clock, for random read
// addresses.
module tb_neuron_ram;
  import snn_pkg::*;
  localparam int unsigned AW = 6;

  logic clk = 1'b0, we;
  logic [AW-1:0] a, dpra;
  weight_t di, dpo;
  weight_t ref_mem [2**AW];
  int checks = 0, failures = 0;

  neuron_ram #(.AW(AW)) dut (.clk(clk), .we(we), .a(a), .di(di), .dpra(dpra), .dpo(dpo));

  always #5 clk = ~clk;

  initial begin
    // fill every entry once
    for (int k = 0; k < 2**AW; k++) begin
      we = 1'b1; a = AW'(k); di = weight_t'($urandom); ref_mem[k] = di;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); a = AW'($urandom); di = weight_t'($urandom); dpra = AW'($urandom);
      #1;
      checks++;
      if (dpo !== ref_mem[dpra]) begin
        failures++;
        $display("FAIL: read %0d got %0d want %0d", dpra, dpo, ref_mem[dpra]);
      end
      @(posedge clk);
      if (we) ref_mem[a] = di;
      #1;
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
