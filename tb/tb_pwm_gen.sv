// tb_pwm_gen: drives the comparator with a triangular count and random
// compare levels. Checks each gate one clock after the count against the
// comparison rules, the complementary pairs, that the illegal state
// (T1 on, T2 off) never appears, and that over one carrier period T1 is
// on for exactly 2*lp clocks and T2 for 2*ln clocks (when lp <= ln).
// Also counts that the leg visited P, M and N.
module tb_pwm_gen;
  import npc_pkg::*;
  localparam int PK = 200;
  logic clk = 0, rst_n = 0;
  logic [15:0] cnt, lp [N_PHASE], ln [N_PHASE];
  leg_gates_t leg [N_PHASE];
  int checks = 0, failures = 0;
  int on1 [3], on2 [3];
  int n_p = 0, n_m = 0, n_n = 0;

  pwm_gen dut (.clk(clk), .rst_n(rst_n), .cnt(cnt), .lp(lp), .ln(ln), .leg(leg));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] c_prev;
    logic        e1, e2;
    cnt = '0;
    for (int p = 0; p < 3; p++) begin lp[p] = '0; ln[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int per = 0; per < 300; per++) begin
      for (int p = 0; p < 3; p++) begin
        int a, b;
        a = int'($urandom_range(PK));
        b = int'($urandom_range(PK));
        if (per == 0) begin a = 0; b = PK; end
        if (per == 1) begin a = PK; b = PK; end
        if (per == 2) begin a = 0; b = 0; end
        if (per == 3 && p == 0) begin a = 150; b = 100; end  // would be illegal
        lp[p] = 16'(a < b || per == 3 ? a : b);
        ln[p] = 16'(a < b || per == 3 ? b : a);
        on1[p] = 0; on2[p] = 0;
      end
      for (int t = 0; t < 2 * PK; t++) begin
        @(negedge clk);
        c_prev = cnt;
        cnt = 16'((t < PK) ? t : 2 * PK - 1 - t);
        if (t == 0) continue;  // first clock sees the previous period's count
        for (int p = 0; p < 3; p++) begin
          e1 = lp[p] > c_prev;
          e2 = (ln[p] > c_prev) || e1;
          checks++;
          if (leg[p].t1 != e1 || leg[p].t2 != e2 || leg[p].b1 == leg[p].t1 || leg[p].b2 == leg[p].t2 ||
              (leg[p].t1 && !leg[p].t2)) begin
            failures++;
            if (failures < 10) $display("FAIL per %0d p %0d cnt %0d gates %b", per, p, c_prev, leg[p]);
          end
          if (leg[p].t1) on1[p]++;
          if (leg[p].t2) on2[p]++;
          if (leg[p].t1 && leg[p].t2) n_p++;
          else if (leg[p].t2 && leg[p].b1) n_m++;
          else if (leg[p].b1 && leg[p].b2) n_n++;
        end
      end
      // duty over one period, from the gates seen (the last count, 0, is
      // seen one clock into the next period and is added here)
      for (int p = 0; p < 3; p++) begin
        int c1, c2;
        c1 = on1[p] + ((lp[p] > 0) ? 1 : 0);
        c2 = on2[p] + ((ln[p] > 0 || lp[p] > 0) ? 1 : 0);
        checks++;
        if (per != 3 && (c1 != 2 * int'(lp[p]) || c2 != 2 * int'(ln[p]))) begin
          failures++;
          $display("FAIL duty p %0d lp %0d ln %0d c1 %0d c2 %0d", p, lp[p], ln[p], c1, c2);
        end
      end
    end
    checks++;
    if (n_p == 0 || n_m == 0 || n_n == 0) begin failures++; $display("FAIL levels P %0d M %0d N %0d", n_p, n_m, n_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
