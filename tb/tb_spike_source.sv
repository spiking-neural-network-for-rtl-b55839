// tb_spike_source: with a short pixel period (7) and teacher period (5),
// checks that the pixels of the selected digit, and only those, fire
// exactly every 7 clocks while active, that the teacher fires every 5
// clocks while teach is high, that nothing fires when both are low, and
// that a two-hot image gives the union of two glyphs.  The expected glyphs
// of digits 1 and 7 are written out here row by row.
module tb_spike_source;
  import snn_pkg::*;
  localparam int unsigned IN_PERIOD = 7, TEACH_PERIOD = 5;

  logic clk = 1'b0, rst, active, teach;
  logic [NDIGITS-1:0] image;
  logic [NPIX:0] spikes;
  int checks = 0, failures = 0;

  spike_source #(.IN_PERIOD(IN_PERIOD), .TEACH_PERIOD(TEACH_PERIOD)) dut (
    .clk(clk), .rst(rst), .active(active), .teach(teach), .image(image), .spikes(spikes));

  always #5 clk = ~clk;

  // glyph rows listed bottom row first (row 7 is the most significant),
  // leftmost column is the highest bit of each row
  localparam logic [39:0] ONE   = {5'b01110, 5'b00100, 5'b00100, 5'b00100,
                                   5'b00100, 5'b00100, 5'b01100, 5'b00100};
  localparam logic [39:0] SEVEN = {5'b01000, 5'b01000, 5'b01000, 5'b01000,
                                   5'b00100, 5'b00010, 5'b00001, 5'b11111};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic watch(input logic [39:0] want, input int cycles);
    int last_pix = -1, last_tch = -1;
    for (int t = 0; t < cycles; t++) begin
      @(posedge clk); #1;
      if (spikes[NPIX-1:0] != '0) begin
        check(spikes[NPIX-1:0] == want, $sformatf("pattern %h want %h", spikes[NPIX-1:0], want));
        if (last_pix >= 0) check(t - last_pix == IN_PERIOD, "pixel period");
        last_pix = t;
      end
      if (spikes[NPIX]) begin
        if (last_tch >= 0) check(t - last_tch == TEACH_PERIOD, "teacher period");
        last_tch = t;
      end
    end
    check((want != '0) == (last_pix >= 0), "pixels fire iff active");
    check(teach == (last_tch >= 0), "teacher fires iff teach");
  endtask

  initial begin
    rst = 1'b1; active = 1'b0; teach = 1'b0; image = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    image = NDIGITS'(1) << 1; active = 1'b1; teach = 1'b0; watch(ONE, 60);
    image = NDIGITS'(1) << 7; teach = 1'b1;                watch(SEVEN, 60);
    image = (NDIGITS'(1) << 7) | (NDIGITS'(1) << 1);     watch(SEVEN | ONE, 60);
    active = 1'b0; teach = 1'b0;                           watch('0, 60);
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
