// Bus-cycle tasks of a DSP model for the 8-bit data / 13-bit address bus.
// Expects in the including module: clk, cs_n, rd_n, we_n, addr, d_to_fpga,
// d_from_fpga, d_oe. Every strobe is held for STROBE clocks (wait states)
// and followed by GAP idle clocks.
localparam int STROBE = 8;
localparam int GAP    = 4;

task automatic bus_wr8(input logic [12:0] a, input logic [7:0] d);
  @(negedge clk);
  addr = a; d_to_fpga = d;
  cs_n = 0; we_n = 0;
  repeat (STROBE) @(negedge clk);
  we_n = 1; cs_n = 1;
  repeat (GAP) @(negedge clk);
endtask

task automatic bus_rd8(input logic [12:0] a, output logic [7:0] d);
  @(negedge clk);
  addr = a;
  cs_n = 0; rd_n = 0;
  repeat (STROBE) @(negedge clk);
  d = d_from_fpga;
  if (!d_oe) $display("ERROR: d_oe low during read");
  rd_n = 1; cs_n = 1;
  repeat (GAP) @(negedge clk);
endtask

task automatic bus_wr16(input logic [12:0] a, input logic [15:0] d);
  bus_wr8(a, d[7:0]);
  bus_wr8(a | 13'd1, d[15:8]);
endtask

task automatic bus_rd16(input logic [12:0] a, output logic [15:0] d);
  logic [7:0] lo, hi;
  bus_rd8(a, lo);
  bus_rd8(a | 13'd1, hi);
  d = {hi, lo};
endtask
