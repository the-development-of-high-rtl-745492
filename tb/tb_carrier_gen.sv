// tb_carrier_gen: checks the triangular count against an independent
// step model (0..peak-1, peak-1..0), the 2*peak period, the valley pulse,
// restart on clear, a peak change and a zero peak.
module tb_carrier_gen;
  logic clk = 0, rst_n = 0, clear = 0, up, valley;
  logic [15:0] peak, cnt;
  int checks = 0, failures = 0, n_valley = 0, last_valley = -1, cyc = 0;
  int m_cnt, m_dir;  // model: current value and direction (+1/-1)

  carrier_gen dut (.clk(clk), .rst_n(rst_n), .clear(clear), .peak(peak), .cnt(cnt), .up(up),
                   .valley(valley));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model step: stay one extra clock at each end
  task automatic model_step(input int pk);
    if (pk == 0) begin m_cnt = 0; m_dir = 1; end
    else if (m_dir > 0) begin
      if (m_cnt >= pk - 1) m_dir = -1; else m_cnt++;
    end else begin
      if (m_cnt == 0) m_dir = 1; else m_cnt--;
    end
  endtask

  task automatic run(input int pk, input int clocks);
    peak = 16'(pk);
    for (int k = 0; k < clocks; k++) begin
      @(negedge clk);
      model_step(pk);
      cyc++;
      checks++;
      if (int'(cnt) != m_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL pk=%0d cnt %0d exp %0d", pk, cnt, m_cnt);
      end
      if (valley) begin
        n_valley++;
        if (last_valley >= 0 && pk > 0) begin
          checks++;
          if (cyc - last_valley != 2 * pk) begin failures++; $display("FAIL period %0d", cyc - last_valley); end
        end
        last_valley = cyc;
      end
    end
  endtask

  initial begin
    peak = 16'd10;
    m_cnt = 0; m_dir = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(10, 200);
    // clear in the middle of a falling slope
    @(negedge clk);
    cyc++;
    clear = 1; model_step(10);
    @(negedge clk) clear = 0;
    cyc++;
    m_cnt = 0; m_dir = 1; last_valley = -1;
    checks++;
    if (cnt != 0 || !up) begin failures++; $display("FAIL clear: cnt %0d", cnt); end
    run(10, 100);
    last_valley = -1;
    run(7, 150);
    last_valley = -1;
    run(0, 20);
    m_cnt = 0; m_dir = 1;
    run(3, 40);
    checks++;
    if (n_valley < 20) begin failures++; $display("FAIL only %0d valleys", n_valley); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
