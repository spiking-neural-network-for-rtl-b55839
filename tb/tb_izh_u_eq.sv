// tb_izh_u_eq: checks the u equation u' = a(bv - u) against floating point
// with a = 0.02, b = 0.2 (tolerance covers the Q16 constants), and the
// after-spike step u <- u + d with d = 2 (20 in 0.1 mV units).
module tb_izh_u_eq;
  import snn_pkg::*;
  localparam int unsigned DT_SHIFT = 1;

  state_t v, u, u_next;
  logic   spike;
  int checks = 0, failures = 0;

  izh_u_eq #(.DT_SHIFT(DT_SHIFT)) dut (.v(v), .u(u), .spike(spike), .u_next(u_next));

  initial begin
    real vr, ur, want, got, tol;
    for (int n = 0; n < 5000; n++) begin
      v = state_t'(int'($urandom % (2000 * 256)) - 1000 * 256);
      u = state_t'(int'($urandom % (800 * 256)) - 400 * 256);
      spike = ($urandom % 5) == 0;
      vr = real'(v) / 256.0; ur = real'(u) / 256.0;
      #1;
      got = real'(u_next) / 256.0;
      if (spike) want = ur + 20.0;
      else       want = ur + 0.02 * (0.2 * vr - ur) / real'(1 << DT_SHIFT);
      tol = 0.0005 * (vr < 0 ? -vr : vr) + 0.0005 * (ur < 0 ? -ur : ur) + 0.02;
      checks++;
      if ((got - want > tol) || (want - got > tol)) begin
        failures++;
        $display("FAIL: V=%f U=%f spike=%0d got %f want %f", vr, ur, spike, got, want);
      end
    end
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
