// npc_pkg: types and constants shared by the FPGA half of a three-level
// neutral-point-clamped (NPC) inverter controller.
//
// Number formats (this design's choice; the source gives only the equations):
//   * Modulation signals are signed Q14: 16384 stands for 1.0, the peak of
//     the positive carrier. Phase references from the DSP use the same scale.
//   * Currents and DC-link voltages are raw signed 16-bit samples as the DSP
//     forwards them from its converters.
//   * Times (dead time, IGBT turn-on/off) are counts of the FPGA clock.
// The gate vector of one leg follows the bridge drawing: T1 and T2 are the
// upper pair, B1 and B2 the lower pair; T1/B1 are complementary (driven from
// the positive carrier) and T2/B2 are complementary (negative carrier).
package npc_pkg;

  localparam int unsigned CLK_HZ  = 50_000_000;  // FPGA clock, assumed
  localparam int unsigned PWM_HZ  = 1_000;       // carrier frequency
  localparam int unsigned INT_HZ  = 2_000;       // interrupt-block rate
  localparam int unsigned DATA_W  = 8;           // DSP data bus
  localparam int unsigned ADDR_W  = 13;          // DSP address bus
  localparam int unsigned N_PHASE = 3;
  localparam int unsigned N_GATE  = 12;

  localparam int Q       = 14;
  localparam int ONE_Q14 = 1 << Q;

  typedef logic signed [15:0] q14_t;
  typedef logic signed [15:0] sample_t;

  typedef struct packed {
    logic t1;
    logic t2;
    logic b1;
    logic b2;
  } leg_gates_t;

  // Byte addresses of the DSP register map. Every 16-bit register occupies
  // an even (low byte) and the following odd (high byte) address.
  localparam logic [ADDR_W-1:0] A_UALFA   = 13'h000;
  localparam logic [ADDR_W-1:0] A_UBETA   = 13'h002;
  localparam logic [ADDR_W-1:0] A_IA      = 13'h004;
  localparam logic [ADDR_W-1:0] A_IB      = 13'h006;
  localparam logic [ADDR_W-1:0] A_IC      = 13'h008;
  localparam logic [ADDR_W-1:0] A_UDC1    = 13'h00A;
  localparam logic [ADDR_W-1:0] A_UDC2    = 13'h00C;
  localparam logic [ADDR_W-1:0] A_KP      = 13'h00E;
  localparam logic [ADDR_W-1:0] A_TDT     = 13'h010;
  localparam logic [ADDR_W-1:0] A_TON     = 13'h012;
  localparam logic [ADDR_W-1:0] A_TOFF    = 13'h014;
  localparam logic [ADDR_W-1:0] A_PEAK    = 13'h016;
  localparam logic [ADDR_W-1:0] A_CTRL    = 13'h018;
  localparam logic [ADDR_W-1:0] A_UAS     = 13'h020;
  localparam logic [ADDR_W-1:0] A_UBS     = 13'h022;
  localparam logic [ADDR_W-1:0] A_UCS     = 13'h024;
  localparam logic [ADDR_W-1:0] A_STATUS  = 13'h026;

  // Saturate a wider signed value into [lo, hi].
  function automatic q14_t sat_q14(input logic signed [19:0] v,
                                   input logic signed [19:0] lo,
                                   input logic signed [19:0] hi);
    if (v < lo)      return q14_t'(lo);
    else if (v > hi) return q14_t'(hi);
    else             return q14_t'(v);
  endfunction

endpackage
