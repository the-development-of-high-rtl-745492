// mod_latch: latch between the interrupt block and the PWM generator.
//
// On each DSP synchronous pulse it takes the latest modulation waves of the
// interrupt block and the carrier peak set by the DSP, and converts the
// waves into compare levels in carrier counts:
//   lp_i = v_ip * peak / 2^14                 (0 .. peak, positive carrier)
//   ln_i = peak + v_in * peak / 2^14          (0 .. peak, negative carrier
//                                              shifted up by one peak)
// Between pulses the outputs hold, so the PWM only ever sees a complete set
// of six waves from one interrupt. Products are truncated (arithmetic shift).
// Latching on the synchronous signal follows the original system; the
// scaling into counts is this design's choice. Latency: one clock.
module mod_latch
  import npc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync_pulse,
  input  q14_t        vp     [N_PHASE],
  input  q14_t        vn     [N_PHASE],
  input  logic [15:0] peak_in,
  output logic [15:0] peak,
  output logic [15:0] lp     [N_PHASE],
  output logic [15:0] ln     [N_PHASE]
);
  logic signed [33:0] pk;
  logic signed [33:0] mp [N_PHASE];
  logic signed [33:0] mn [N_PHASE];

  always_comb begin
    pk = 34'($signed({1'b0, peak_in}));
    for (int p = 0; p < N_PHASE; p++) begin
      mp[p] = 34'(vp[p]) * pk;
      mn[p] = 34'(vn[p]) * pk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak <= '0;
      for (int p = 0; p < N_PHASE; p++) begin
        lp[p] <= '0;
        ln[p] <= '0;
      end
    end else if (sync_pulse) begin
      peak <= peak_in;
      for (int p = 0; p < N_PHASE; p++) begin
        lp[p] <= 16'(mp[p] >>> Q);
        ln[p] <= 16'(pk + (mn[p] >>> Q));
      end
    end
  end
endmodule
