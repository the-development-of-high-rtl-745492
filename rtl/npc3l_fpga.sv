// npc3l_fpga: FPGA half of a three-level neutral-point-clamped inverter
// controller. A DSP runs the drive control (V/f, vector or sensorless
// control) and writes the alpha/beta voltage reference, the phase currents
// and the two DC-link capacitor voltages over an 8-bit data / 13-bit
// address bus. The FPGA turns them into the 12 IGBT gate signals:
//
//   bus_decoder -> interrupt_block (every 1/2 kHz, from int_timer):
//                  2r/3r, dead time compensation, zero sequence, NPPB
//               -> mod_latch (on the DSP synchronous pulse)
//               -> pwm_gen (against carrier_gen, which the same pulse clears)
//               -> dead_time_gen -> gate[11:0]
//
// gate[4*p+3 : 4*p] = {T1, T2, B1, B2} of leg p (p = 0,1,2 for U,V,W).
// The phase voltage references actually applied are readable by the DSP
// (registers UAS, UBS, UCS) for its voltage estimate. The DSP data pins are
// split into d_i, d_o and d_oe; the tri-state pad sits outside this module.
//
// Parameters: INT_DIV is the interrupt period in clocks (50 MHz / 2 kHz);
// PEAK_RST the reset carrier peak, giving 1 kHz PWM at 50 MHz (the DSP may
// change it at run time through the PEAK register).
module npc3l_fpga
  import npc_pkg::*;
#(
  parameter int unsigned INT_DIV  = CLK_HZ / INT_HZ,
  parameter logic [15:0] PEAK_RST = 16'(CLK_HZ / (2 * PWM_HZ))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dsp_cs_n,
  input  logic              dsp_rd_n,
  input  logic              dsp_we_n,
  input  logic [ADDR_W-1:0] dsp_addr,
  input  logic [DATA_W-1:0] dsp_d_i,
  output logic [DATA_W-1:0] dsp_d_o,
  output logic              dsp_d_oe,
  input  logic              dsp_sync,
  output logic [N_GATE-1:0] gate
);
  logic        sync_pulse, tick, pwm_en, ib_busy, ib_done, valley, up;
  q14_t        alpha, beta;
  sample_t     i_abc [N_PHASE];
  sample_t     udc1, udc2;
  logic [15:0] kp, t_dt, t_on, t_off, peak_reg, peak, cnt, n_int;
  q14_t        vp [N_PHASE], vn [N_PHASE], vs [N_PHASE];
  logic [15:0] lp [N_PHASE], ln [N_PHASE];
  leg_gates_t  raw [N_PHASE], legs [N_PHASE];

  bus_decoder #(.PEAK_RST(PEAK_RST)) u_bus (
    .clk        (clk),
    .rst_n      (rst_n),
    .cs_n       (dsp_cs_n),
    .rd_n       (dsp_rd_n),
    .we_n       (dsp_we_n),
    .addr       (dsp_addr),
    .d_i        (dsp_d_i),
    .d_o        (dsp_d_o),
    .d_oe       (dsp_d_oe),
    .sync_in    (dsp_sync),
    .sync_pulse (sync_pulse),
    .alpha      (alpha),
    .beta       (beta),
    .i_abc      (i_abc),
    .udc1       (udc1),
    .udc2       (udc2),
    .kp         (kp),
    .t_dt       (t_dt),
    .t_on       (t_on),
    .t_off      (t_off),
    .peak       (peak_reg),
    .pwm_en     (pwm_en),
    .vs         (vs),
    .status     (n_int)
  );

  int_timer #(.DIV(INT_DIV)) u_timer (.clk(clk), .rst_n(rst_n), .tick(tick));

  interrupt_block #(.TSS(INT_DIV)) u_int (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick),
    .alpha (alpha),
    .beta  (beta),
    .i_abc (i_abc),
    .udc1  (udc1),
    .udc2  (udc2),
    .kp    (kp),
    .t_dt  (t_dt),
    .t_on  (t_on),
    .t_off (t_off),
    .vp_o  (vp),
    .vn_o  (vn),
    .vs_o  (vs),
    .busy  (ib_busy),
    .done  (ib_done),
    .n_int (n_int)
  );

  mod_latch u_latch (
    .clk        (clk),
    .rst_n      (rst_n),
    .sync_pulse (sync_pulse),
    .vp         (vp),
    .vn         (vn),
    .peak_in    (peak_reg),
    .peak       (peak),
    .lp         (lp),
    .ln         (ln)
  );

  carrier_gen u_carrier (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (sync_pulse),
    .peak   (peak),
    .cnt    (cnt),
    .up     (up),
    .valley (valley)
  );

  pwm_gen u_pwm (.clk(clk), .rst_n(rst_n), .cnt(cnt), .lp(lp), .ln(ln), .leg(raw));

  dead_time_gen u_dt (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (pwm_en),
    .t_dt  (t_dt),
    .raw   (raw),
    .gate  (legs)
  );

  always_comb begin
    for (int p = 0; p < N_PHASE; p++) gate[4*p +: 4] = legs[p];
  end
endmodule
