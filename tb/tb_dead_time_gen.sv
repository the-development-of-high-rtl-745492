// tb_dead_time_gen: random complementary gate commands on all six pairs.
// Each clock it checks every gate against the rule "a switch is on only
// when its command has been stable for max(t_dt,1) clocks and the enable is
// high", that the two switches of a pair are never on together, and that
// the gap between one switch turning off and the other turning on is
// exactly max(t_dt,1) clocks. Runs with t_dt = 20, 5 and 0, and with the
// enable toggled.
module tb_dead_time_gen;
  import npc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] t_dt;
  leg_gates_t raw [N_PHASE], gate [N_PHASE];
  int checks = 0, failures = 0, n_gaps = 0, n_off_en = 0;
  int age [6];
  logic cmd [6];
  logic prev [6];   // command at the previous clock edge

  dead_time_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .t_dt(t_dt), .raw(raw), .gate(gate));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic g_hi(input int k);
    return (k % 2 == 0) ? gate[k/2].t1 : gate[k/2].t2;
  endfunction
  function automatic logic g_lo(input int k);
    return (k % 2 == 0) ? gate[k/2].b1 : gate[k/2].b2;
  endfunction

  task automatic segment(input int dt, input int clocks, input int en_period);
    int need;
    t_dt = 16'(dt);
    need = (dt < 1) ? 1 : dt;
    for (int c = 0; c < clocks; c++) begin
      // new commands just after a negedge, sampled at the next posedge
      for (int k = 0; k < 6; k++) begin
        if ($urandom_range(3 * need + 2) == 0) cmd[k] = !cmd[k];
      end
      if (en_period > 0 && c % en_period == 0) en = !en;
      for (int p = 0; p < 3; p++)
        raw[p] = '{t1: cmd[2*p], t2: cmd[2*p+1], b1: !cmd[2*p], b2: !cmd[2*p+1]};
      @(posedge clk);
      for (int k = 0; k < 6; k++) begin
        if (cmd[k] != prev[k]) age[k] = 0; else age[k]++;
        prev[k] = cmd[k];
      end
      #1;
      for (int k = 0; k < 6; k++) begin
        logic eh, el;
        eh = en && cmd[k] && age[k] >= need;
        el = en && !cmd[k] && age[k] >= need;
        checks++;
        if (g_hi(k) != eh || g_lo(k) != el || (g_hi(k) && g_lo(k))) begin
          failures++;
          if (failures < 10) $display("FAIL dt=%0d k=%0d age=%0d cmd=%b hi=%b lo=%b", dt, k, age[k], cmd[k], g_hi(k), g_lo(k));
        end
        if (en && age[k] == need - 1 && !g_hi(k) && !g_lo(k)) n_gaps++;
        if (!en && !g_hi(k) && !g_lo(k)) n_off_en++;
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) begin cmd[k] = 0; prev[k] = 0; age[k] = 1000; end
    for (int p = 0; p < 3; p++) raw[p] = '{t1: 0, t2: 0, b1: 1, b2: 1};
    t_dt = 16'd20;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    en = 1;
    // let the counters settle on the reset command
    repeat (25) @(posedge clk);
    for (int k = 0; k < 6; k++) age[k] = 1000;
    @(negedge clk);
    segment(20, 20000, 0);
    segment(20, 5000, 777);
    en = 1;
    segment(5, 10000, 0);
    segment(0, 10000, 0);
    checks++;
    if (n_gaps == 0 || n_off_en == 0) begin failures++; $display("FAIL gaps %0d off %0d", n_gaps, n_off_en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
