// zero_seq: carrier-based space-vector modulation for the three-level leg.
//
// Each phase reference v_i is split into a positive and a negative
// modulation wave,
//   v_ip = (v_i - min(v_a, v_b, v_c)) / 2
//   v_in = (v_i - max(v_a, v_b, v_c)) / 2,
// so that v_ip >= 0 is compared with the positive carrier and v_in <= 0
// with the negative carrier. Their sum v_ip + v_in equals v_i with the
// min/max zero-sequence signal added. Combinational; signed Q14 in and out,
// 18 bits wide. The halving is an arithmetic shift (rounds towards minus
// infinity), a choice of this design.
module zero_seq
  import npc_pkg::*;
(
  input  logic signed [17:0] v   [N_PHASE],
  output logic signed [17:0] vp  [N_PHASE],
  output logic signed [17:0] vn  [N_PHASE]
);
  logic signed [17:0] vmax, vmin;
  logic signed [18:0] dp, dn;

  always_comb begin
    vmax = v[0];
    vmin = v[0];
    for (int p = 1; p < N_PHASE; p++) begin
      if (v[p] > vmax) vmax = v[p];
      if (v[p] < vmin) vmin = v[p];
    end
    for (int p = 0; p < N_PHASE; p++) begin
      dp    = 19'(v[p]) - 19'(vmin);
      dn    = 19'(v[p]) - 19'(vmax);
      vp[p] = 18'(dp >>> 1);
      vn[p] = 18'(dn >>> 1);
    end
  end
endmodule
