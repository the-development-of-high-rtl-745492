// tb_mod_latch: checks that the compare levels change only on a sync pulse
// and equal floor(v_ip*peak/2^14) and peak + floor(v_in*peak/2^14),
// computed here in floating point, for random waves and peaks.
module tb_mod_latch;
  import npc_pkg::*;
  logic clk = 0, rst_n = 0, sync_pulse = 0;
  q14_t vp [N_PHASE], vn [N_PHASE];
  logic [15:0] peak_in, peak, lp [N_PHASE], ln [N_PHASE];
  int checks = 0, failures = 0;
  int elp [3], eln [3], epk;

  mod_latch dut (.clk(clk), .rst_n(rst_n), .sync_pulse(sync_pulse), .vp(vp), .vn(vn),
                 .peak_in(peak_in), .peak(peak), .lp(lp), .ln(ln));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string when);
    checks++;
    if (int'(peak) != epk) begin failures++; $display("FAIL %s peak %0d exp %0d", when, peak, epk); end
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (int'(lp[p]) != elp[p] || int'(ln[p]) != eln[p]) begin
        failures++;
        $display("FAIL %s p=%0d lp %0d exp %0d ln %0d exp %0d", when, p, lp[p], elp[p], ln[p], eln[p]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++) begin vp[p] = '0; vn[p] = '0; elp[p] = 0; eln[p] = 0; end
    peak_in = 16'd25000; epk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) compare("reset");
    for (int k = 0; k < 500; k++) begin
      peak_in = (k % 3 == 0) ? 16'd25000 : 16'(1000 + $urandom_range(60000));
      for (int p = 0; p < 3; p++) begin
        vp[p] = q14_t'($urandom_range(16384));
        vn[p] = -q14_t'($urandom_range(16384));
      end
      if (k == 1) begin vp[0] = 16'sd16384; vn[0] = -16'sd16384; vp[1] = '0; vn[1] = '0; end
      // no sync: nothing changes
      @(negedge clk);
      compare("hold");
      sync_pulse = 1;
      @(negedge clk);
      sync_pulse = 0;
      epk = int'(peak_in);
      for (int p = 0; p < 3; p++) begin
        elp[p] = int'($floor(real'(vp[p]) * real'(peak_in) / 16384.0));
        eln[p] = int'(peak_in) + int'($floor(real'(vn[p]) * real'(peak_in) / 16384.0));
      end
      compare("sync");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
