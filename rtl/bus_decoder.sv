// bus_decoder: slave side of the bidirectional DSP bus (8-bit data, 13-bit
// address) and the register file that connects the DSP to the FPGA logic.
//
// The DSP's strobes (cs_n, rd_n, we_n) and its synchronous signal are
// asynchronous to the FPGA clock and pass through two-flop synchronisers.
// A write is committed when the synchronised write strobe (cs_n and we_n
// both low) ends; address and data are sampled on every clock while it is
// active. 16-bit registers are written low byte (even address) first; the
// high-byte write (odd address) commits both bytes at once, so the logic
// never sees half of a new value. A read that starts on an even address
// snapshots the whole 16-bit register into a read buffer; the odd address
// then returns its high byte. Read data therefore appear four FPGA clocks
// after the read strobe falls, so the DSP must hold the strobe that long
// (wait states). d_oe is the enable of the external tri-state pad.
// sync_pulse is a one-clock pulse on each rising edge of the synchronous
// signal; it clears the carrier and latches the modulation.
// The bus widths and the signals carried are the original system's; the
// strobes, register map (npc_pkg), byte order and reset values are this
// design's choices.
module bus_decoder
  import npc_pkg::*;
#(
  parameter logic [15:0] PEAK_RST = 16'(CLK_HZ / (2 * PWM_HZ)),
  parameter logic [15:0] TDT_RST  = 16'd500,   // 10 us at 50 MHz
  parameter logic [15:0] TON_RST  = 16'd50,    // 1 us
  parameter logic [15:0] TOFF_RST = 16'd100,   // 2 us
  parameter logic [15:0] KP_RST   = 16'd256    // 1.0 in Q8.8
) (
  input  logic              clk,
  input  logic              rst_n,
  // DSP pins
  input  logic              cs_n,
  input  logic              rd_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] d_i,
  output logic [DATA_W-1:0] d_o,
  output logic              d_oe,
  input  logic              sync_in,
  // to the FPGA logic
  output logic              sync_pulse,
  output q14_t              alpha,
  output q14_t              beta,
  output sample_t           i_abc [N_PHASE],
  output sample_t           udc1,
  output sample_t           udc2,
  output logic [15:0]       kp,
  output logic [15:0]       t_dt,
  output logic [15:0]       t_on,
  output logic [15:0]       t_off,
  output logic [15:0]       peak,
  output logic              pwm_en,
  // feedback to the DSP
  input  q14_t              vs    [N_PHASE],
  input  logic [15:0]       status
);
  logic [1:0] s_cs, s_rd, s_we;            // two-flop synchronisers
  logic [2:0] s_sync;                      // [0],[1] synchroniser, [2] history
  logic       wr_act, wr_act_d, rd_act, rd_act_d, rd_act_dd;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] data_q;
  logic [7:0]        lo_hold;
  logic [15:0]       rd_buf;
  logic [15:0]       rd_val;
  logic [15:0]       ctrl;
  logic [15:0]       w;

  assign w = {data_q, lo_hold};

  assign wr_act = !s_cs[1] && !s_we[1];
  assign rd_act = !s_cs[1] && !s_rd[1];
  assign pwm_en = ctrl[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cs   <= '1;
      s_rd   <= '1;
      s_we   <= '1;
      s_sync <= '0;
    end else begin
      s_cs   <= {s_cs[0],     cs_n};
      s_rd   <= {s_rd[0],     rd_n};
      s_we   <= {s_we[0],     we_n};
      s_sync <= {s_sync[1:0], sync_in};
    end
  end

  assign sync_pulse = s_sync[1] && !s_sync[2];

  // Register read multiplexer (16-bit view).
  always_comb begin
    unique case ({addr_q[ADDR_W-1:1], 1'b0})
      A_UALFA:  rd_val = alpha;
      A_UBETA:  rd_val = beta;
      A_IA:     rd_val = i_abc[0];
      A_IB:     rd_val = i_abc[1];
      A_IC:     rd_val = i_abc[2];
      A_UDC1:   rd_val = udc1;
      A_UDC2:   rd_val = udc2;
      A_KP:     rd_val = kp;
      A_TDT:    rd_val = t_dt;
      A_TON:    rd_val = t_on;
      A_TOFF:   rd_val = t_off;
      A_PEAK:   rd_val = peak;
      A_CTRL:   rd_val = ctrl;
      A_UAS:    rd_val = vs[0];
      A_UBS:    rd_val = vs[1];
      A_UCS:    rd_val = vs[2];
      A_STATUS: rd_val = status;
      default:  rd_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act_d <= 1'b0;
      rd_act_d <= 1'b0;
      rd_act_dd <= 1'b0;
      addr_q   <= '0;
      data_q   <= '0;
      lo_hold  <= '0;
      rd_buf   <= '0;
      alpha    <= '0;
      beta     <= '0;
      udc1     <= '0;
      udc2     <= '0;
      kp       <= KP_RST;
      t_dt     <= TDT_RST;
      t_on     <= TON_RST;
      t_off    <= TOFF_RST;
      peak     <= PEAK_RST;
      ctrl     <= '0;
      for (int p = 0; p < N_PHASE; p++) i_abc[p] <= '0;
    end else begin
      wr_act_d <= wr_act;
      rd_act_d <= rd_act;
      rd_act_dd <= rd_act_d;
      if (wr_act || rd_act) begin
        addr_q <= addr;
        data_q <= d_i;
      end
      // Read strobe started: snapshot the addressed 16-bit register.
      if (rd_act_d && !rd_act_dd && !addr_q[0]) rd_buf <= rd_val;
      // Write strobe ended: commit.
      if (wr_act_d && !wr_act) begin
        if (!addr_q[0]) begin
          lo_hold <= data_q;
        end else begin
          unique case ({addr_q[ADDR_W-1:1], 1'b0})
            A_UALFA: alpha    <= q14_t'(w);
            A_UBETA: beta     <= q14_t'(w);
            A_IA:    i_abc[0] <= sample_t'(w);
            A_IB:    i_abc[1] <= sample_t'(w);
            A_IC:    i_abc[2] <= sample_t'(w);
            A_UDC1:  udc1     <= sample_t'(w);
            A_UDC2:  udc2     <= sample_t'(w);
            A_KP:    kp       <= w;
            A_TDT:   t_dt     <= w;
            A_TON:   t_on     <= w;
            A_TOFF:  t_off    <= w;
            A_PEAK:  peak     <= w;
            A_CTRL:  ctrl     <= w;
            default: ;
          endcase
        end
      end
    end
  end

  assign d_o  = addr[0] ? rd_buf[15:8] : rd_buf[7:0];
  assign d_oe = !cs_n && !rd_n;
endmodule
