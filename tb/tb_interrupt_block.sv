// tb_interrupt_block: drives the interrupt block with random and directed
// references, currents and DC-link voltages, pulses 'tick' and compares
// v_ip, v_in and v_ip + v_in with a floating-point model of the four steps
// (tolerance 3 LSB of Q14). Checks the 37-clock latency, that a tick while
// busy is dropped, and that every branch (both current signs, both
// balancing signs, saturation) is exercised.
module tb_interrupt_block;
  import npc_pkg::*;
  `include "tb_int_model.svh"
  localparam int TSS = 25000;
  logic clk = 0, rst_n = 0, tick = 0, busy, done;
  q14_t alpha, beta;
  sample_t i_abc [N_PHASE], udc1, udc2;
  logic [15:0] kp, t_dt, t_on, t_off, n_int;
  q14_t vp [N_PHASE], vn [N_PHASE], vs [N_PHASE];
  int checks = 0, failures = 0;
  int n_dtp = 0, n_dtn = 0, n_npp = 0, n_npn = 0, n_clamp = 0;

  interrupt_block #(.TSS(TSS)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .alpha(alpha), .beta(beta), .i_abc(i_abc),
    .udc1(udc1), .udc2(udc2), .kp(kp), .t_dt(t_dt), .t_on(t_on), .t_off(t_off),
    .vp_o(vp), .vn_o(vn), .vs_o(vs), .busy(busy), .done(done), .n_int(n_int));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int b, input int ia, input int ib, input int ic,
                     input int u1, input int u2, input int k);
    int_ref_t r;
    int lat;
    alpha = q14_t'(a); beta = q14_t'(b);
    i_abc[0] = sample_t'(ia); i_abc[1] = sample_t'(ib); i_abc[2] = sample_t'(ic);
    udc1 = sample_t'(u1); udc2 = sample_t'(u2); kp = 16'(k);
    r = int_ref(a, b, ia, ib, ic, u1, u2, k, int'(t_dt), int'(t_on), int'(t_off), TSS);
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    alpha = '0; beta = '0; udc1 = '0; // sampled already
    lat = 0;
    // a second tick while busy must be ignored
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    lat += 2;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 37) begin failures++; $display("FAIL latency %0d", lat); end
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (rabs(real'(vp[p]) - r.vp[p]) > 3.0 || rabs(real'(vn[p]) - r.vn[p]) > 3.0 ||
          rabs(real'(vs[p]) - r.vs[p]) > 3.0) begin
        failures++;
        $display("FAIL a=%0d b=%0d p=%0d got %0d %0d %0d exp %f %f %f", a, b, p, vp[p], vn[p], vs[p],
                 r.vp[p], r.vn[p], r.vs[p]);
      end
      if (r.dt_sign[p] > 0) n_dtp++;
      if (r.dt_sign[p] < 0) n_dtn++;
      if (r.np_sign[p] > 0) n_npp++;
      if (r.np_sign[p] < 0) n_npn++;
    end
    if (r.clamped) n_clamp++;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done (second tick not dropped)"); end
  endtask

  initial begin
    alpha = '0; beta = '0; udc1 = '0; udc2 = '0; kp = '0;
    for (int p = 0; p < 3; p++) i_abc[p] = '0;
    t_dt = 16'd500; t_on = 16'd50; t_off = 16'd100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(13107, 0, 100, -50, -50, 910, 900, 512);
    run(0, 13107, -100, 50, 50, 890, 910, 512);
    run(24576, 0, 10, -10, -10, 920, 900, 256);   // over-modulation, v_ip + v_in > 1
    run(0, 0, 0, 0, 0, 900, 900, 256);
    for (int k = 0; k < 300; k++) begin
      real th, m;
      th = 6.283185307 * $urandom_range(3599) / 3600.0;
      m  = 14000.0 * $urandom_range(1000) / 1000.0;
      run(int'(m * $cos(th)), int'(m * $sin(th)), int'($urandom_range(400)) - 200,
          int'($urandom_range(400)) - 200, int'($urandom_range(400)) - 200,
          900 + int'($urandom_range(40)) - 20, 900 + int'($urandom_range(40)) - 20,
          int'($urandom_range(2048)));
    end
    checks++;
    if (int'(n_int) != 304) begin failures++; $display("FAIL n_int %0d", n_int); end
    checks++;
    if (n_dtp == 0 || n_dtn == 0 || n_npp == 0 || n_npn == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage dt+ %0d dt- %0d np+ %0d np- %0d clamp %0d", n_dtp, n_dtn, n_npp, n_npn, n_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
