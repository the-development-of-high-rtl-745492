// interrupt_block: the "software DSP" of the FPGA. On every interrupt tick it
// runs, in this order, the steps of one control period:
//   1. 2r/3r     - alpha/beta reference to phase references   (inv_clarke)
//   2. dead time compensation offset added to each phase      (dt_comp)
//   3. zero sequence / carrier-based SVM split into v_ip, v_in (zero_seq)
//   4. NPPB offset added to both v_ip and v_in                 (nppb)
// and then saturates v_ip to [0, 1] and v_in to [-1, 0] (Q14), the ranges
// of the positive and negative carriers. The oscillation-suppression step
// that sits between 1 and 2 in the original software is not included.
//
// Timing: a 'tick' pulse while idle samples all inputs; 'done' pulses
// 36 clocks later (33 for the serial divider of the dead time compensation,
// then one registered stage for each of the steps 1-2, 3 and 4). The
// outputs hold until the next 'done'. Ticks that arrive while busy are
// dropped. vs is v_ip + v_in, the phase voltage reference actually applied,
// fed back to the DSP for its voltage estimate. n_int counts completed
// interrupts. Sequencing the steps as registered stages is this design's
// choice; the steps and their order are those of the original system.
module interrupt_block
  import npc_pkg::*;
#(
  parameter int unsigned TSS = CLK_HZ / INT_HZ   // interrupt period in clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  q14_t        alpha,
  input  q14_t        beta,
  input  sample_t     i_abc [N_PHASE],
  input  sample_t     udc1,
  input  sample_t     udc2,
  input  logic [15:0] kp,
  input  logic [15:0] t_dt,
  input  logic [15:0] t_on,
  input  logic [15:0] t_off,
  output q14_t        vp_o  [N_PHASE],
  output q14_t        vn_o  [N_PHASE],
  output q14_t        vs_o  [N_PHASE],
  output logic        busy,
  output logic        done,
  output logic [15:0] n_int
);
  typedef enum logic [2:0] {S_IDLE, S_DT, S_ABC, S_ZSEQ, S_NPPB} state_t;
  state_t state;

  q14_t               alpha_q, beta_q;
  sample_t            udc1_q, udc2_q;
  logic [15:0]        kp_q;
  logic signed [17:0] va, vb, vc;
  logic signed [17:0] v_q   [N_PHASE];
  logic signed [17:0] vp_c  [N_PHASE];
  logic signed [17:0] vn_c  [N_PHASE];
  logic signed [17:0] vp_q  [N_PHASE];
  logic signed [17:0] vn_q  [N_PHASE];
  logic signed [17:0] off_c [N_PHASE];
  q14_t               du_abc [N_PHASE];
  q14_t               du_mag;
  logic               dt_start, dt_done;

  assign dt_start = (state == S_IDLE) && tick;
  assign busy     = (state != S_IDLE);

  inv_clarke u_clarke (.alpha(alpha_q), .beta(beta_q), .va(va), .vb(vb), .vc(vc));

  dt_comp #(.TSS(TSS)) u_dt (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (dt_start),
    .t_dt   (t_dt),
    .t_on   (t_on),
    .t_off  (t_off),
    .i_abc  (i_abc),
    .du_mag (du_mag),
    .du_abc (du_abc),
    .done   (dt_done)
  );

  zero_seq u_zs (.v(v_q), .vp(vp_c), .vn(vn_c));

  nppb u_np (.vp(vp_q), .vn(vn_q), .udc1(udc1_q), .udc2(udc2_q), .kp(kp_q), .off(off_c));

  // Step 4 result: offset added, saturated to the carrier ranges.
  q14_t p_s [N_PHASE];
  q14_t n_s [N_PHASE];
  always_comb begin
    for (int p = 0; p < N_PHASE; p++) begin
      p_s[p] = sat_q14(20'(vp_q[p]) + 20'(off_c[p]), 20'sd0, 20'(ONE_Q14));
      n_s[p] = sat_q14(20'(vn_q[p]) + 20'(off_c[p]), -20'(ONE_Q14), 20'sd0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      alpha_q <= '0;
      beta_q  <= '0;
      udc1_q  <= '0;
      udc2_q  <= '0;
      kp_q    <= '0;
      done    <= 1'b0;
      n_int   <= '0;
      for (int p = 0; p < N_PHASE; p++) begin
        v_q[p]  <= '0;
        vp_q[p] <= '0;
        vn_q[p] <= '0;
        vp_o[p] <= '0;
        vn_o[p] <= '0;
        vs_o[p] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (tick) begin
          alpha_q <= alpha;
          beta_q  <= beta;
          udc1_q  <= udc1;
          udc2_q  <= udc2;
          kp_q    <= kp;
          state   <= S_DT;
        end
        S_DT: if (dt_done) state <= S_ABC;
        S_ABC: begin
          v_q[0] <= va + 18'(du_abc[0]);
          v_q[1] <= vb + 18'(du_abc[1]);
          v_q[2] <= vc + 18'(du_abc[2]);
          state  <= S_ZSEQ;
        end
        S_ZSEQ: begin
          vp_q  <= vp_c;
          vn_q  <= vn_c;
          state <= S_NPPB;
        end
        S_NPPB: begin
          for (int p = 0; p < N_PHASE; p++) begin
            vp_o[p] <= p_s[p];
            vn_o[p] <= n_s[p];
            vs_o[p] <= p_s[p] + n_s[p];
          end
          n_int <= n_int + 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
