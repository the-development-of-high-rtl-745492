// udiv: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on 'start' loads num and den; W clocks later 'done' pulses for one
// clock with quo = num / den and rem = num % den. 'busy' is high in between.
// A start while busy is ignored. Division by zero returns an all-ones
// quotient. Helper of the dead time compensation.
module udiv #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo,
  output logic [W-1:0] rem
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  n_q, d_q;
  logic [W:0]    r_q;
  logic [CW-1:0] cnt_q;
  logic [W:0]    trial;

  assign trial = {r_q[W-1:0], n_q[W-1]} - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q   <= '0;
      d_q   <= '0;
      r_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          n_q   <= num;
          d_q   <= den;
          r_q   <= '0;
          cnt_q <= CW'(W);
          busy  <= 1'b1;
        end
      end else begin
        // Shift in the next dividend bit, subtract if it fits.
        if (!trial[W]) begin
          r_q <= trial;
          n_q <= {n_q[W-2:0], 1'b1};
        end else begin
          r_q <= {r_q[W-1:0], n_q[W-1]};
          n_q <= {n_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = n_q;
  assign rem = r_q[W-1:0];
endmodule
