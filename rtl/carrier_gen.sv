// carrier_gen: triangular carrier counter shared by all three legs.
//
// The count runs 0, 1, ..., peak-1, peak-1, ..., 1, 0, 0, 1, ... so one
// carrier period is 2*peak clocks and every value appears twice per period.
// With this shape a compare level L in 0..peak gives a pulse of exactly 2*L
// clocks per period (L/peak duty) for a comparator that is on while
// L > cnt; such a pulse is centred on the valley of the triangle.
// The positive carrier is cnt itself (0..1); the negative carrier is
// cnt - peak (-1..0), i.e. the two are level-shifted and in phase.
// 'clear' (the DSP synchronous pulse) restarts the count at 0, rising.
// A peak of 0 holds the counter at 0. The carrier frequency is
// f_clk / (2*peak): 1 kHz for peak = 25000 at 50 MHz. 'valley' pulses when
// the count turns from falling to rising.
module carrier_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [15:0] peak,
  output logic [15:0] cnt,
  output logic        up,
  output logic        valley
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      up     <= 1'b1;
      valley <= 1'b0;
    end else begin
      valley <= 1'b0;
      if (clear || peak == 16'd0) begin
        cnt <= '0;
        up  <= 1'b1;
      end else if (up) begin
        if (cnt >= peak - 16'd1) up <= 1'b0;
        else                     cnt <= cnt + 16'd1;
      end else begin
        if (cnt == 16'd0) begin
          up     <= 1'b1;
          valley <= 1'b1;
        end else begin
          cnt <= cnt - 16'd1;
        end
      end
    end
  end
endmodule
