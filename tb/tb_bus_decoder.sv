// tb_bus_decoder: exercises the DSP bus slave with a bus-cycle model.
// Checks reset values, write/read-back of every register through 8-bit
// cycles, that the outputs to the logic follow, that a low-byte write alone
// leaves a register unchanged (atomic 16-bit update), feedback registers,
// d_oe, and that each rising edge of the synchronous input gives exactly one
// sync pulse, three clocks later.
module tb_bus_decoder;
  import npc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs_n = 1, rd_n = 1, we_n = 1, sync_in = 0;
  logic [12:0] addr = '0;
  logic [7:0] d_to_fpga = '0, d_from_fpga;
  logic d_oe, sync_pulse, pwm_en;
  q14_t alpha, beta;
  sample_t i_abc [N_PHASE], udc1, udc2;
  logic [15:0] kp, t_dt, t_on, t_off, peak, status;
  q14_t vs [N_PHASE];
  int checks = 0, failures = 0, n_sync = 0;

  bus_decoder dut (
    .clk(clk), .rst_n(rst_n), .cs_n(cs_n), .rd_n(rd_n), .we_n(we_n), .addr(addr),
    .d_i(d_to_fpga), .d_o(d_from_fpga), .d_oe(d_oe), .sync_in(sync_in), .sync_pulse(sync_pulse),
    .alpha(alpha), .beta(beta), .i_abc(i_abc), .udc1(udc1), .udc2(udc2), .kp(kp), .t_dt(t_dt),
    .t_on(t_on), .t_off(t_off), .peak(peak), .pwm_en(pwm_en), .vs(vs), .status(status));

  `include "dsp_bus_tasks.svh"

  always #5 clk = ~clk;
  always @(posedge clk) if (sync_pulse) n_sync++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] out_of(input logic [12:0] a);
    case (a)
      A_UALFA: return alpha;
      A_UBETA: return beta;
      A_IA:    return i_abc[0];
      A_IB:    return i_abc[1];
      A_IC:    return i_abc[2];
      A_UDC1:  return udc1;
      A_UDC2:  return udc2;
      A_KP:    return kp;
      A_TDT:   return t_dt;
      A_TON:   return t_on;
      A_TOFF:  return t_off;
      A_PEAK:  return peak;
      A_CTRL:  return {15'd0, pwm_en};
      default: return 16'hdead;
    endcase
  endfunction

  initial begin
    logic [12:0] regs [13];
    logic [15:0] vals [13];
    logic [15:0] rd;
    int lat;
    regs = '{A_UALFA, A_UBETA, A_IA, A_IB, A_IC, A_UDC1, A_UDC2, A_KP, A_TDT, A_TON, A_TOFF, A_PEAK, A_CTRL};
    vs[0] = 16'sd1234; vs[1] = -16'sd4321; vs[2] = 16'sd7; status = 16'h5a3c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    expect16("peak rst", peak, 16'd25000);
    expect16("tdt rst",  t_dt, 16'd500);
    expect16("ton rst",  t_on, 16'd50);
    expect16("toff rst", t_off, 16'd100);
    expect16("kp rst",   kp, 16'd256);
    expect16("en rst",   {15'd0, pwm_en}, 16'd0);
    // write every register, check outputs, read back
    for (int r = 0; r < 13; r++) begin
      vals[r] = (regs[r] == A_CTRL) ? 16'd1 : 16'($urandom);
      bus_wr16(regs[r], vals[r]);
    end
    for (int r = 0; r < 13; r++) begin
      expect16($sformatf("out %h", regs[r]), out_of(regs[r]), vals[r]);
      bus_rd16(regs[r], rd);
      expect16($sformatf("readback %h", regs[r]), rd, vals[r]);
    end
    // atomic update: a lone low-byte write does not change the register
    bus_wr8(A_UALFA, 8'h11);
    expect16("atomic lo", alpha, vals[0]);
    bus_wr8(A_UALFA | 13'd1, 8'h22);
    expect16("atomic hi", alpha, 16'h2211);
    // feedback registers
    bus_rd16(A_UAS, rd);    expect16("uas", rd, 16'(vs[0]));
    bus_rd16(A_UBS, rd);    expect16("ubs", rd, 16'(vs[1]));
    bus_rd16(A_UCS, rd);    expect16("ucs", rd, 16'(vs[2]));
    bus_rd16(A_STATUS, rd); expect16("status", rd, status);
    // d_oe only while reading
    checks++;
    if (d_oe) failures++;
    // synchronous signal: one pulse per rising edge, 3 clocks after it
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) sync_in = 1;
      lat = 0;
      while (!sync_pulse) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL sync latency %0d", lat); end
      repeat (10) @(negedge clk);
      sync_in = 0;
      repeat (10) @(negedge clk);
    end
    checks++;
    if (n_sync != 5) begin failures++; $display("FAIL %0d sync pulses", n_sync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
