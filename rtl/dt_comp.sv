// dt_comp: dead time compensation offset, one value per phase.
//
// The offset magnitude is
//   dU_DT = (T_DT + T_ON + T_OFF) * U_peak / T_SS
// where T_DT is the dead time, T_ON/T_OFF the IGBT switching times (all in
// FPGA clocks), U_peak the peak of the carrier (1.0 in Q14, so 16384) and
// T_SS the interrupt period in FPGA clocks (parameter TSS). The magnitude is
// computed by a shared 32-bit serial divider: a 'start' pulse samples the
// times and currents, and 'done' pulses 33 clocks later with the outputs
// valid until the next start. Each phase receives +dU_DT when its current is
// positive, -dU_DT when negative and 0 when it is exactly zero; applying the
// offset with the sign of the phase current, and saturating the magnitude to
// 0.5, are this design's choices.
module dt_comp
  import npc_pkg::*;
#(
  parameter int unsigned TSS = CLK_HZ / INT_HZ
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] t_dt,
  input  logic [15:0] t_on,
  input  logic [15:0] t_off,
  input  sample_t     i_abc [N_PHASE],
  output q14_t        du_mag,
  output q14_t        du_abc [N_PHASE],
  output logic        done
);
  localparam logic [15:0] MAG_MAX = 16'(ONE_Q14 / 2);

  logic [17:0] t_sum;
  logic [31:0] num;
  logic [31:0] quo, rem_unused;
  logic        div_done, div_busy;
  sample_t     i_q [N_PHASE];

  assign t_sum = 18'(t_dt) + 18'(t_on) + 18'(t_off);
  assign num   = 32'(t_sum) << Q;

  udiv #(.W(32)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .num   (num),
    .den   (32'(TSS)),
    .busy  (div_busy),
    .done  (div_done),
    .quo   (quo),
    .rem   (rem_unused)
  );

  logic [15:0] mag;
  assign mag = (quo > 32'(MAG_MAX)) ? MAG_MAX : quo[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      du_mag <= '0;
      done   <= 1'b0;
      for (int p = 0; p < N_PHASE; p++) begin
        i_q[p]    <= '0;
        du_abc[p] <= '0;
      end
    end else begin
      done <= div_done;
      if (start && !div_busy) begin
        for (int p = 0; p < N_PHASE; p++) i_q[p] <= i_abc[p];
      end
      if (div_done) begin
        du_mag <= q14_t'(mag);
        for (int p = 0; p < N_PHASE; p++) begin
          if (i_q[p] > 0)      du_abc[p] <= q14_t'(mag);
          else if (i_q[p] < 0) du_abc[p] <= -q14_t'(mag);
          else                 du_abc[p] <= '0;
        end
      end
    end
  end
endmodule
