// tb_dt_comp: checks the dead time compensation offset
// (T_DT + T_ON + T_OFF) * 16384 / T_SS, its saturation at 0.5, the sign
// taken from each phase current, and the 33-clock latency from start to
// done. T_SS is the default interrupt period, 25000 clocks.
module tb_dt_comp;
  import npc_pkg::*;
  localparam int TSS = 25000;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] t_dt, t_on, t_off;
  sample_t i_abc [N_PHASE];
  q14_t du_mag, du_abc [N_PHASE];
  int checks = 0, failures = 0;

  dt_comp #(.TSS(TSS)) dut (.clk(clk), .rst_n(rst_n), .start(start), .t_dt(t_dt), .t_on(t_on),
                            .t_off(t_off), .i_abc(i_abc), .du_mag(du_mag), .du_abc(du_abc),
                            .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int dt, input int ton, input int toff, input int ia, input int ib, input int ic);
    int lat;
    longint e;
    int cur[3];
    t_dt = 16'(dt); t_on = 16'(ton); t_off = 16'(toff);
    i_abc[0] = sample_t'(ia); i_abc[1] = sample_t'(ib); i_abc[2] = sample_t'(ic);
    cur = '{ia, ib, ic};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // Inputs may change once sampled.
    i_abc[0] = '0; t_dt = 16'hffff;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    e = (longint'(dt + ton + toff) * 16384) / TSS;
    if (e > 8192) e = 8192;
    checks++;
    if (int'(du_mag) != int'(e)) begin
      failures++;
      $display("FAIL mag %0d exp %0d", du_mag, e);
    end
    for (int p = 0; p < 3; p++) begin
      int ep;
      ep = (cur[p] > 0) ? int'(e) : (cur[p] < 0) ? -int'(e) : 0;
      checks++;
      if (int'(du_abc[p]) != ep) begin
        failures++;
        $display("FAIL phase %0d %0d exp %0d", p, du_abc[p], ep);
      end
    end
    checks++;
    if (lat != 33) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    t_dt = 0; t_on = 0; t_off = 0;
    for (int p = 0; p < 3; p++) i_abc[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(500, 50, 100, 100, -50, 0);      // 10 us + 1 us + 2 us at 50 MHz
    run(0, 0, 0, 5, 5, 5);
    run(25000, 0, 0, -1, 1, -1);          // saturates at 0.5
    for (int k = 0; k < 200; k++)
      run(int'($urandom_range(2000)), int'($urandom_range(300)), int'($urandom_range(300)),
          int'($urandom_range(200)) - 100, int'($urandom_range(200)) - 100,
          int'($urandom_range(200)) - 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
