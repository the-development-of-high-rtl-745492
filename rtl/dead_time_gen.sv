// dead_time_gen: dead time insertion for the six complementary gate pairs.
//
// For each pair (T1/B1 and T2/B2 of every leg) the switch that is to turn
// off does so one clock after its raw command changes, and the switch that
// is to turn on follows t_dt clocks later (at least one clock), so the two
// are never on together. t_dt is the dead time set by the DSP (dead time
// register). While 'en' is low every gate is off. Outputs are registered.
module dead_time_gen
  import npc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] t_dt,
  input  leg_gates_t  raw  [N_PHASE],
  output leg_gates_t  gate [N_PHASE]
);
  // Pair index: 2*p for T1/B1, 2*p+1 for T2/B2. 'hi' is the upper switch.
  logic        last [2*N_PHASE];
  logic [15:0] cnt  [2*N_PHASE];
  logic        hi   [2*N_PHASE];
  logic        lo   [2*N_PHASE];

  logic        r    [2*N_PHASE];
  always_comb begin
    for (int p = 0; p < N_PHASE; p++) begin
      r[2*p]   = raw[p].t1;
      r[2*p+1] = raw[p].t2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2*N_PHASE; k++) begin
        last[k] <= 1'b0;
        cnt[k]  <= '0;
        hi[k]   <= 1'b0;
        lo[k]   <= 1'b0;
      end
    end else begin
      for (int k = 0; k < 2*N_PHASE; k++) begin
        if (r[k] != last[k]) begin
          last[k] <= r[k];
          cnt[k]  <= 16'd1;
          hi[k]   <= 1'b0;
          lo[k]   <= 1'b0;
        end else if (cnt[k] < t_dt) begin
          cnt[k]  <= cnt[k] + 16'd1;
        end else begin
          hi[k]   <= last[k];
          lo[k]   <= !last[k];
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < N_PHASE; p++) begin
      gate[p].t1 = en && hi[2*p];
      gate[p].b1 = en && lo[2*p];
      gate[p].t2 = en && hi[2*p+1];
      gate[p].b2 = en && lo[2*p+1];
    end
  end
endmodule
