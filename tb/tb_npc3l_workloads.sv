// tb_npc3l_workloads: runs the operating points of the 110 kW / 1140 V drive
// through the FPGA controller at its default sizes (50 MHz, 2 kHz interrupt,
// 1 kHz carrier, U_dc = 1820 V so U_dc/2 = 910 sample units at 1 V/LSB):
//   * rated point, 50 Hz at 1140 V line voltage, one full fundamental cycle,
//   * sensorless test speeds 1192 rpm and 893 rpm of the 4-pole motor
//     (39.7 Hz and 29.8 Hz), one full cycle each, voltage on a straight V/f
//     line through the rated point,
//   * the low end of the V/f range, 5 Hz, for 20 ms (a tenth of a cycle).
// The DSP model writes the reference once per carrier period; currents are
// zero here so that the read-back applied references are the commanded ones.
// Checks per period: read-back references against the model (3 LSB), T1/T2
// on-times against the model's levels (16 clocks), T1 turn-off position,
// and per clock the legal gate combinations. Per full-cycle workload the
// largest line-to-line read-back voltage, converted to an RMS line voltage,
// must be within 2% of the commanded one.
`timescale 1ns/1ps
module tb_npc3l_workloads;
  import npc_pkg::*;
  `include "tb_int_model.svh"

  localparam int TDT   = 500;
  localparam int KP    = 512;
  localparam int NW    = 4;
  localparam real WL_F [NW] = '{50.0, 1192.0 / 30.0, 893.0 / 30.0, 5.0};
  localparam int  WL_N [NW] = '{20, 26, 34, 20};
  localparam bit  WL_FULL [NW] = '{1, 1, 1, 0};
  localparam int NPER  = 100;
  localparam int TOL   = 16;

  logic clk = 0, rst_n = 0;
  logic cs_n = 1, rd_n = 1, we_n = 1, dsp_sync = 0;
  logic [12:0] addr = '0;
  logic [7:0]  d_to_fpga = '0, d_from_fpga;
  logic        d_oe;
  logic [11:0] gate;

  npc3l_fpga dut (
    .clk(clk), .rst_n(rst_n), .dsp_cs_n(cs_n), .dsp_rd_n(rd_n), .dsp_we_n(we_n),
    .dsp_addr(addr), .dsp_d_i(d_to_fpga), .dsp_d_o(d_from_fpga), .dsp_d_oe(d_oe),
    .dsp_sync(dsp_sync), .gate(gate));

  `include "dsp_bus_tasks.svh"

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int n_sync = 0;
  int n_lvl_p = 0, n_lvl_m = 0, n_lvl_n = 0, n_gap = 0, n_off_dis = 0;
  int n_ontime = 0;

  // model results per carrier period k (written after sync k)
  int_ref_t ref_k [NPER];
  int       peak_at_sync [NPER + 1];
  int       lvl1 [NPER + 1][3];   // compare levels used in window w
  int       lvl2 [NPER + 1][3];
  bit       enabled = 0;      // enable bit written
  bit       enabling = 0;     // enable write in progress

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ---- watchdog ----
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- per-clock gate checks and per-window on-time counting ----
  int win = -1;              // current window index (window w starts at sync w)
  int win_start_at = -1;     // clock at which the next window starts
  int cyc = 0;
  int on_t1 [3], on_t2 [3];
  int first_off [3];         // clock of T1's first turn-off in the window
  logic t1_prev [3] = '{0, 0, 0};
  int n_align = 0;
  int cur_start = 0;         // clock at which the current window started

  // On-time of one switch in a window whose compare level is l (previous
  // window: l_prev). The raw pulse is centred on the valley, i.e. it spans
  // the window boundary: l_prev clocks at the end of the previous window and
  // l at the start of this one; the switch comes on TDT clocks after the
  // pulse starts. The second pulse starts l clocks before the window ends.
  function automatic int expect_on(input int l, input int l_prev, input int pk);
    int first, second, late;
    late   = (TDT - l_prev > 0) ? TDT - l_prev : 0;
    first  = ((l < pk) ? l : pk) - late;
    if (first < 0) first = 0;
    second = (l >= pk) ? pk : ((l - TDT > 0) ? l - TDT : 0);
    return first + second;
  endfunction

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc == win_start_at) begin
      // close the previous window
      if (win >= 2 && enabled) begin
        for (int p = 0; p < 3; p++) begin
          int e1, e2, pk;
          pk = peak_at_sync[win];
          if (lvl1[win][p] == 0 && lvl1[win-1][p] == 0) begin
            checks++; if (on_t1[p] != 0) fail($sformatf("w%0d p%0d T1 on %0d exp 0", win, p, on_t1[p]));
          end else if (lvl1[win][p] > 0 && lvl1[win-1][p] > 0) begin
            e1 = expect_on(lvl1[win][p], lvl1[win-1][p], pk);
            checks++; n_ontime++;
            if (on_t1[p] < e1 - TOL || on_t1[p] > e1 + TOL)
              fail($sformatf("w%0d p%0d T1 on %0d exp %0d", win, p, on_t1[p], e1));
          end
          if (lvl2[win][p] > 0 && lvl2[win-1][p] > 0) begin
            e2 = expect_on(lvl2[win][p], lvl2[win-1][p], pk);
            checks++; n_ontime++;
            if (on_t2[p] < e2 - TOL || on_t2[p] > e2 + TOL)
              fail($sformatf("w%0d p%0d T2 on %0d exp %0d", win, p, on_t2[p], e2));
          end
        end
      end
      // The carrier restarts at the window start, so T1, on across the
      // boundary, turns off l clocks into the window.
      if (win >= 2 && enabled) begin
        for (int p = 0; p < 3; p++) begin
          int l;
          l = lvl1[win][p];
          if (l > TDT && l < peak_at_sync[win] - 10 && lvl1[win-1][p] > TDT) begin
            checks++; n_align++;
            if (first_off[p] < l - 6 || first_off[p] > l + 6)
              fail($sformatf("w%0d p%0d T1 off at %0d exp %0d", win, p, first_off[p], l));
          end
        end
      end
      win++;
      n_sync++;
      cur_start = cyc;
      for (int p = 0; p < 3; p++) begin on_t1[p] = 0; on_t2[p] = 0; first_off[p] = -1; end
    end
    for (int p = 0; p < 3; p++) begin
      logic t1, t2, b1, b2;
      {t1, t2, b1, b2} = gate[4*p +: 4];
      if (t1) on_t1[p]++;
      if (!t1 && t1_prev[p] && first_off[p] < 0) first_off[p] = cyc - cur_start;
      t1_prev[p] = t1;
      if (t2) on_t2[p]++;
      checks++;
      if ((t1 && b1) || (t2 && b2) || (t1 && !t2)) fail($sformatf("illegal gates leg %0d: %b", p, gate[4*p +: 4]));
      if (!enabled && !enabling && gate == '0) n_off_dis++;
      if (enabled) begin
        if (t1 && t2) n_lvl_p++;
        if (t2 && b1) n_lvl_m++;
        if (b1 && b2) n_lvl_n++;
        if (!t1 && !b1) n_gap++;
      end
    end
    if (!enabled && !enabling) begin
      checks++;
      if (gate != '0) fail("gates on while disabled");
    end
  end

  // per-workload bookkeeping
  int  wl = 0;
  int  wl_first [NW];
  int  vs_rd [3];
  real vll_max = 0.0;
  initial begin
    wl_first[0] = 0;
    for (int w = 1; w < NW; w++) wl_first[w] = wl_first[w-1] + WL_N[w-1];
  end

  task automatic wl_done(input int w);
    real v_rms, v_cmd;
    v_cmd = 1140.0 * WL_F[w] / 50.0;
    v_rms = vll_max * 910.0 / 16384.0 / 1.4142135623730951;
    $display("workload %0d: %f Hz, commanded %f V line, read back peak gives %f V", w, WL_F[w], v_cmd, v_rms);
    if (WL_FULL[w]) begin
      checks++;
      if (v_rms < 0.98 * v_cmd || v_rms > 1.02 * v_cmd) fail($sformatf("workload %0d line voltage %f", w, v_rms));
    end
    vll_max = 0.0;
  endtask

  // ---- DSP model ----
  initial begin
    real t_s;
    int  period;
    logic [15:0] rd, st_prev;
    int  a, b, ia, ib, ic, u1, u2;
    real th, m;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // all gates off until enabled
    repeat (2000) @(negedge clk);
    bus_wr16(A_KP, 16'(KP));
    bus_wr16(A_TDT, 16'(TDT));
    peak_at_sync[0] = 25000;
    period = 50000;
    t_s = 0.0;
    st_prev = 0;
    for (int k = 0; k < NPER; k++) begin
      int t0;
      // workload of this period
      if (k == wl_first[wl] + WL_N[wl]) begin
        wl_done(wl);
        wl++;
        t_s = 0.0;   // each workload starts at angle 0
      end
      // synchronous edge: the window starts when it reaches the latch
      @(negedge clk);
      t0 = cyc;
      dsp_sync = 1;
      win_start_at = t0 + 3;
      // new reference for this period
      th = 6.283185307179586 * WL_F[wl] * t_s;
      // straight V/f line through 1140 V at 50 Hz; Q14 amplitude of the
      // phase reference in units of U_dc/2 = 910 V
      m  = 1140.0 * WL_F[wl] / 50.0 * 0.816496580927726 / 910.0 * 16384.0;
      a  = int'(m * $cos(th));
      b  = int'(m * $sin(th));
      ia = 0;
      ib = 0;
      ic = 0;
      // small DC-link unbalance so that the balancing offset is active
      u1 = 910 + int'(12.0 * $sin(6.283185307179586 * 40.0 * t_s + 0.3));
      u2 = 910 - int'(12.0 * $sin(6.283185307179586 * 40.0 * t_s + 0.3));
      bus_wr16(A_UALFA, 16'(a));
      bus_wr16(A_UBETA, 16'(b));
      bus_wr16(A_IA, 16'(ia));
      bus_wr16(A_IB, 16'(ib));
      bus_wr16(A_IC, 16'(ic));
      bus_wr16(A_UDC1, 16'(u1));
      bus_wr16(A_UDC2, 16'(u2));
      if (k == 0) begin enabling = 1; bus_wr16(A_CTRL, 16'd1); enabled = 1; end
      dsp_sync = 0;
      ref_k[k] = int_ref(a, b, ia, ib, ic, u1, u2, KP, TDT, 50, 100, 25000);
      peak_at_sync[k + 1] = 25000;
      for (int p = 0; p < 3; p++) begin
        int pk;
        pk = peak_at_sync[k + 1];
        lvl1[k + 1][p] = int'($floor(ref_k[k].vp[p] * pk / 16384.0));
        lvl2[k + 1][p] = pk + int'($floor(ref_k[k].vn[p] * pk / 16384.0));
        if (lvl1[k + 1][p] > lvl2[k + 1][p]) lvl2[k + 1][p] = lvl1[k + 1][p];
      end
      if (k == 0) begin lvl1[0] = '{0, 0, 0}; lvl2[0] = '{0, 0, 0}; end
      // shortly before the next sync: read back the applied references
      while (cyc < t0 + period - 3000) @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        bus_rd16(A_UAS + 13'(2 * p), rd);
        checks++;
        if (rabs(real'($signed(rd)) - ref_k[k].vs[p]) > 3.0)
          fail($sformatf("k%0d U%0ds read %0d exp %f", k, p, $signed(rd), ref_k[k].vs[p]));
        vs_rd[p] = int'($signed(rd));
      end
      if (rabs(real'(vs_rd[0] - vs_rd[1])) > vll_max) vll_max = rabs(real'(vs_rd[0] - vs_rd[1]));
      bus_rd16(A_STATUS, rd);
      if (k >= 1) begin
        checks++;
        if (rd - st_prev != 16'd2) fail($sformatf("interrupts in period %0d: %0d", k, rd - st_prev));
      end
      st_prev = rd;
      t_s += real'(period) / 50.0e6;
      while (cyc < t0 + period - 1) @(negedge clk);
    end
    wl_done(wl);
    // close the last window
    @(negedge clk) dsp_sync = 1;
    win_start_at = cyc + 3;
    repeat (10) @(negedge clk);
    dsp_sync = 0;

    $display("on-time checks %0d  position checks %0d  P %0d M %0d N %0d  gaps %0d  off-while-disabled %0d",
             n_ontime, n_align, n_lvl_p, n_lvl_m, n_lvl_n, n_gap, n_off_dis);
    checks++; if (n_gap == 0) fail("no dead-time gaps seen");
    checks++; if (n_sync < NPER) fail("sync");
    checks++; if (n_lvl_p == 0 || n_lvl_m == 0 || n_lvl_n == 0) fail("leg levels");
    checks++; if (n_ontime < 300) fail("too few on-time checks");
    checks++; if (wl != NW - 1) fail("not all workloads ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
