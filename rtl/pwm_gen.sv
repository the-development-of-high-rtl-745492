// pwm_gen: three-level PWM comparator for the three legs (12 raw gates).
//
// Per leg:  T1 = lp > cnt          (positive wave vs positive carrier)
//           T2 = (ln > cnt) | T1   (negative wave vs negative carrier)
//           B1 = !T1,  B2 = !T2
// T1/B1 and T2/B2 are complementary pairs; the leg is at P with T1,T2 on,
// at the neutral point M with T2,B1 on and at N with B1,B2 on. Forcing T2 on
// whenever T1 is on is this design's guard: it keeps the illegal state
// (T1 on, T2 off) out even if the two waves ever ask for it, which they do
// not while v_ip - v_in <= 1. Outputs are registered (one clock latency)
// and carry no dead time yet.
module pwm_gen
  import npc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cnt,
  input  logic [15:0] lp  [N_PHASE],
  input  logic [15:0] ln  [N_PHASE],
  output leg_gates_t  leg [N_PHASE]
);
  logic t1 [N_PHASE];
  logic t2 [N_PHASE];
  always_comb begin
    for (int p = 0; p < N_PHASE; p++) begin
      t1[p] = lp[p] > cnt;
      t2[p] = (ln[p] > cnt) || t1[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PHASE; p++) leg[p] <= '{t1: 1'b0, t2: 1'b0, b1: 1'b1, b2: 1'b1};
    end else begin
      for (int p = 0; p < N_PHASE; p++) begin
        leg[p] <= '{t1: t1[p], t2: t2[p], b1: !t1[p], b2: !t2[p]};
      end
    end
  end
endmodule
