// tb_nppb: checks the neutral-point balancing offset
// kp*|dUdc|*sign(dUdc)*sign(v_ip+v_in-1) on directed and random inputs. The
// expected magnitude is worked out as floor(kp*|dUdc|/256) limited to 16384.
module tb_nppb;
  import npc_pkg::*;
  logic signed [17:0] vp [N_PHASE], vn [N_PHASE], off [N_PHASE];
  sample_t udc1, udc2;
  logic [15:0] kp;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;

  nppb dut (.vp(vp), .vn(vn), .udc1(udc1), .udc2(udc2), .kp(kp), .off(off));

  function automatic int sgn(input longint x);
    return (x > 0) ? 1 : (x < 0) ? -1 : 0;
  endfunction

  task automatic check_now();
    longint du, mag;
    int e;
    #1;
    du  = longint'(udc1) - longint'(udc2);
    mag = (longint'(kp) * (du < 0 ? -du : du)) / 256;
    if (mag > 16384) mag = 16384;
    for (int p = 0; p < 3; p++) begin
      e = int'(mag) * sgn(du) * sgn(longint'(vp[p]) + longint'(vn[p]) - 16384);
      checks++;
      if (int'(off[p]) != e) begin
        failures++;
        $display("FAIL p=%0d du=%0d kp=%0d vp=%0d vn=%0d off=%0d exp=%0d", p, du, kp, vp[p], vn[p], off[p], e);
      end
      if (e > 0) n_pos++; else if (e < 0) n_neg++; else n_zero++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // upper capacitor high, normal modulation: offset is negative
    udc1 = 16'sd920; udc2 = 16'sd900; kp = 16'd512;
    for (int p = 0; p < 3; p++) begin vp[p] = 18'sd4000; vn[p] = -18'sd2000; end
    check_now();
    checks++; if (off[0] != -18'sd40) failures++;
    // lower capacitor high
    udc1 = 16'sd890; udc2 = 16'sd910; check_now();
    checks++; if (off[1] != 18'sd40) failures++;
    // balanced
    udc1 = 16'sd910; check_now();
    // v_ip + v_in above 1
    udc1 = 16'sd920; udc2 = 16'sd900; vp[2] = 18'sd16384; vn[2] = 18'sd100; check_now();
    checks++; if (off[2] != 18'sd40) failures++;
    // saturation of the magnitude
    kp = 16'hffff; udc1 = 16'sd30000; udc2 = -16'sd30000; check_now();
    for (int k = 0; k < 3000; k++) begin
      for (int p = 0; p < 3; p++) begin
        vp[p] = 18'($urandom_range(20000));
        vn[p] = -18'($urandom_range(20000));
      end
      udc1 = sample_t'($urandom_range(2000));
      udc2 = sample_t'($urandom_range(2000));
      kp   = 16'($urandom_range(4096));
      check_now();
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
