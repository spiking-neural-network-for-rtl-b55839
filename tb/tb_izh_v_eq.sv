// tb_izh_v_eq: checks the v equation against the Izhikevich equation
// evaluated in floating point, v' = 0.04v^2 + 5v + 140 - u + I in 0.1 mV
// units, for random states and inputs below the threshold (tolerance: the
// rounding of 0.004 to a Q16 constant plus a few LSBs), the after-spike
// reset to c at and above 30 mV, and the saturation of V.
module tb_izh_v_eq;
  import snn_pkg::*;
  localparam int unsigned DT_SHIFT = 1;

  state_t v, u, v_next;
  cur_t   i_in;
  logic   spike;
  int checks = 0, failures = 0;

  izh_v_eq #(.DT_SHIFT(DT_SHIFT), .C_MV10(-650)) dut (
    .v(v), .u(u), .i_in(i_in), .v_next(v_next), .spike(spike));

  initial begin
    real vr, ur, ir, want, got, tol;
    for (int n = 0; n < 5000; n++) begin
      vr = -900.0 + ($urandom % 120000) / 100.0;     // -90 mV .. +30 mV
      ur = -300.0 + ($urandom % 60000) / 100.0;
      ir = real'(int'($urandom % 4000) - 2000);
      v = state_t'($rtoi(vr * 256.0)); u = state_t'($rtoi(ur * 256.0)); i_in = cur_t'($rtoi(ir));
      vr = real'(v) / 256.0; ur = real'(u) / 256.0;
      #1;
      checks++;
      if (vr >= 300.0) begin
        if (!spike || v_next != state_t'(-650 * 256)) begin
          failures++;
          $display("FAIL: no reset at V=%f", vr);
        end
      end else begin
        want = vr + (0.004 * vr * vr + 5.0 * vr + 1400.0 - ur + ir) / real'(1 << DT_SHIFT);
        if (want > 4095.0) want = 4095.0;
        if (want < -4095.0) want = -4095.0;
        got = real'(v_next) / 256.0;
        tol = 0.001 * 0.004 * vr * vr + 0.05;
        if (spike || (got - want > tol) || (want - got > tol)) begin
          failures++;
          $display("FAIL: V=%f U=%f I=%f got %f want %f", vr, ur, ir, got, want);
        end
      end
    end
    // saturation above the 13-bit range
    v = state_t'(299 * 256); u = state_t'(-5000 * 256); i_in = cur_t'(30000);
    #1; checks++;
    if (v_next != state_t'(4095 * 256)) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
