// tb_int_timer: checks that the interrupt tick is a single-clock pulse with
// a period of exactly DIV clocks (DIV reduced to 37 for speed).
module tb_int_timer;
  localparam int DIV = 37;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0, last = -1, cyc = 0, nticks = 0;

  int_timer #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      nticks++;
      if (last >= 0) begin
        checks++;
        if (cyc - last != DIV) begin
          failures++;
          $display("FAIL tick interval %0d", cyc - last);
        end
      end
      last = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (DIV * 50 + 3) @(posedge clk);
    checks++;
    if (nticks != 50) begin
      failures++;
      $display("FAIL %0d ticks in %0d clocks", nticks, DIV * 50 + 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
