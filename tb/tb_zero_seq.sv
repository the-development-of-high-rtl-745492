// tb_zero_seq: checks the positive/negative modulation split
// v_ip = (v_i - min)/2, v_in = (v_i - max)/2 against a floating-point
// model (tolerance 1 LSB), and the sign rules v_ip >= 0, v_in <= 0.
module tb_zero_seq;
  import npc_pkg::*;
  logic signed [17:0] v [N_PHASE], vp [N_PHASE], vn [N_PHASE];
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  zero_seq dut (.v(v), .vp(vp), .vn(vn));

  task automatic check_set(input int a, input int b, input int c);
    int vals[3];
    real mx, mn;
    vals = '{a, b, c};
    for (int p = 0; p < 3; p++) v[p] = 18'(vals[p]);
    #1;
    mx = real'(a); mn = real'(a);
    for (int p = 1; p < 3; p++) begin
      if (real'(vals[p]) > mx) mx = real'(vals[p]);
      if (real'(vals[p]) < mn) mn = real'(vals[p]);
    end
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (rabs(real'(vp[p]) - (real'(vals[p]) - mn) / 2.0) > 1.0 ||
          rabs(real'(vn[p]) - (real'(vals[p]) - mx) / 2.0) > 1.0 ||
          vp[p] < 0 || vn[p] > 0) begin
        failures++;
        $display("FAIL v=%0d %0d %0d p=%0d vp=%0d vn=%0d", a, b, c, p, vp[p], vn[p]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // balanced three-phase at 30 degrees steps, amplitude 0.9
    for (int k = 0; k < 12; k++) begin
      real th;
      th = 3.14159265358979 * k / 6.0;
      check_set(int'(14746.0 * $cos(th)), int'(14746.0 * $cos(th - 2.0943951)),
                int'(14746.0 * $cos(th + 2.0943951)));
    end
    check_set(0, 0, 0);
    check_set(16384, -8192, -8192);
    for (int k = 0; k < 2000; k++)
      check_set(int'($urandom_range(100000)) - 50000, int'($urandom_range(100000)) - 50000,
                int'($urandom_range(100000)) - 50000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
