// inv_clarke: two-phase (alpha/beta) to three-phase (a/b/c) transform, the
// "2r/3r" step of the interrupt block.
//
//   va = alpha
//   vb = -alpha/2 + (sqrt(3)/2) * beta
//   vc = -alpha/2 - (sqrt(3)/2) * beta
//
// Purely combinational. Inputs are signed Q14; outputs are 18-bit signed Q14
// so that a full-scale beta cannot overflow. sqrt(3)/2 is the constant
// 28378/2^15; products are truncated towards minus infinity (arithmetic
// shift). The transform is the textbook one; the fixed-point widths and the
// rounding are this design's choice.
module inv_clarke
  import npc_pkg::*;
(
  input  q14_t               alpha,
  input  q14_t               beta,
  output logic signed [17:0] va,
  output logic signed [17:0] vb,
  output logic signed [17:0] vc
);
  localparam logic signed [16:0] K_SQRT3_2 = 17'sd28378;

  logic signed [32:0] kb;
  logic signed [17:0] kb_q14;
  logic signed [17:0] half_a;

  always_comb begin
    kb     = 33'(beta) * 33'(K_SQRT3_2);
    kb_q14 = 18'(kb >>> 15);
    half_a = 18'(alpha) >>> 1;
    va     = 18'(alpha);
    vb     = -half_a + kb_q14;
    vc     = -half_a - kb_q14;
  end
endmodule
