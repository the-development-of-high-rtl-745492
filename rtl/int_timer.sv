// int_timer: frequency divider that produces the interrupt of the interrupt
// block. 'tick' is a one-clock pulse every DIV clocks of the FPGA clock
// (DIV = 50 MHz / 2 kHz = 25000 by default), the first one DIV clocks after
// reset. The counter runs freely; it is not tied to the DSP synchronous
// signal.
module int_timer
  import npc_pkg::*;
#(
  parameter int unsigned DIV = CLK_HZ / INT_HZ
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
