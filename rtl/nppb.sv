// nppb: neutral point potential balancing offset, one value per phase.
//
//   dU_NPPB,i = kp * |dU_dc| * sign(dU_dc) * sign(v_ip + v_in - 1)
//
// with dU_dc = U_dc1 - U_dc2, the difference of the two DC-link capacitor
// voltages, and "1" the carrier peak (16384 in Q14). The offset is added to
// both modulation waves of the phase. Combinational. kp is an unsigned Q8.8
// gain from DC-link sample units to Q14 modulation units, i.e.
// |offset| = (kp * |dU_dc|) >> 8; this scaling, sign(0) = 0 and the limit of
// the offset to +-1.0 are this design's choices.
module nppb
  import npc_pkg::*;
(
  input  logic signed [17:0] vp   [N_PHASE],
  input  logic signed [17:0] vn   [N_PHASE],
  input  sample_t            udc1,
  input  sample_t            udc2,
  input  logic [15:0]        kp,
  output logic signed [17:0] off  [N_PHASE]
);
  logic signed [16:0] du;
  logic        [16:0] du_abs;
  logic        [32:0] prod;
  logic        [17:0] mag;
  logic signed [19:0] s;

  always_comb begin
    du     = 17'(udc1) - 17'(udc2);
    du_abs = du[16] ? 17'(-du) : 17'(du);
    prod   = 33'(kp) * 33'(du_abs);
    mag    = ((prod >> 8) > 33'(ONE_Q14)) ? 18'(ONE_Q14) : 18'(prod >> 8);
    for (int p = 0; p < N_PHASE; p++) begin
      s = 20'(vp[p]) + 20'(vn[p]) - 20'(ONE_Q14);
      if (du == 0 || s == 0)        off[p] = '0;
      else if ((du < 0) == (s < 0)) off[p] = signed'(mag);
      else                          off[p] = -signed'(mag);
    end
  end
endmodule
