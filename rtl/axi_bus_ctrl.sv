// axi_bus_ctrl: AXI4-Lite interconnect joining MC master channel sets to SC
// slave channel sets (the SoC uses one master and three slaves).
//
// How it works. For every master there is a read status register and a
// write status register, each holding {active, slave_id}. A master that is
// not active and raises raddr_valid (waddr_valid for writes) is decoded and
// becomes active in that same cycle: the status register is set for the
// following cycles and the decoded slave is used at once. While a master is
// active, its read (write) channels are wired straight through to the
// selected slave, in both directions. Status is released when the master's
// rdat_ready meets the slave's rdat_valid (wres_ready meets wres_valid), so
// the connection ends at the next clock edge. Every slave input that no
// active master drives is held at zero. There is no arbiter: two masters
// active on the same slave at once are not supported (an assertion checks
// this), as in the described controller, which is meant for one master.
//
// Decode: the slave index is the byte addr[SEL_LSB +: 8]; an index of SC or
// above selects slave SC-1 (partial decode). Interrupts: slave k's interrupt
// bits [7:0] appear at bits [8k+7:8k] of every master's interrupt word.
// Both the decode and the interrupt mapping are this design's choice; the
// status registers, the activation/release rules and the channel wiring
// follow the described controller.
module axi_bus_ctrl
  import axi4l_pkg::*;
#(
  parameter int unsigned MC      = 1,   // masters
  parameter int unsigned SC      = 3,   // slaves (at most 4)
  parameter int unsigned SEL_LSB = 12   // lowest address bit of the slave index
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ch_m_t m_ch_m [MC],   // master-driven half of each master channel set
  output ch_s_t m_ch_s [MC],   // to the masters
  output ch_m_t s_ch_m [SC],   // to the slaves
  input  ch_s_t s_ch_s [SC]    // slave-driven half of each slave channel set
);

  localparam int unsigned SW = (SC > 1) ? $clog2(SC) : 1;   // used bits of a slave index

  typedef struct packed {
    logic [7:0] slave_id;
    logic       active;
  } master_status_t;

  master_status_t r_stat_q [MC], w_stat_q [MC];
  master_status_t r_stat_d [MC], w_stat_d [MC];
  logic [7:0]     r_sid [MC], w_sid [MC];
  logic           r_act [MC], w_act [MC];
  logic [31:0]    intr_all;

  function automatic logic [7:0] decode_addr(input logic [31:0] addr);
    logic [7:0] idx;
    idx = 8'(addr >> SEL_LSB);
    if (idx >= 8'(SC)) idx = 8'(SC - 1);
    return idx;
  endfunction

  always_comb begin
    intr_all = '0;
    for (int k = 0; k < SC && k < 4; k++)
      intr_all[8*k +: 8] = s_ch_s[k].intr[7:0];
  end

  always_comb begin
    for (int k = 0; k < SC; k++) s_ch_m[k] = '0;   // reset all channel sinks
    for (int i = 0; i < MC; i++) begin
      m_ch_s[i]      = '0;
      m_ch_s[i].intr = intr_all;
      r_stat_d[i]    = r_stat_q[i];
      w_stat_d[i]    = w_stat_q[i];

      // read channels
      r_sid[i] = r_stat_q[i].slave_id;
      r_act[i] = r_stat_q[i].active;
      if (!r_act[i] && m_ch_m[i].raddr_valid) begin
        r_sid[i]    = decode_addr(m_ch_m[i].raddr);
        r_act[i]    = 1'b1;
        r_stat_d[i] = '{slave_id: r_sid[i], active: 1'b1};
      end else if (r_act[i] && m_ch_m[i].rdat_ready && s_ch_s[r_sid[i][SW-1:0]].rdat_valid) begin
        r_stat_d[i] = '0;
      end
      if (r_act[i]) begin
        s_ch_m[r_sid[i][SW-1:0]].raddr       = m_ch_m[i].raddr;
        s_ch_m[r_sid[i][SW-1:0]].raddr_valid = m_ch_m[i].raddr_valid;
        s_ch_m[r_sid[i][SW-1:0]].rdat_ready  = m_ch_m[i].rdat_ready;
        m_ch_s[i].raddr_ready        = s_ch_s[r_sid[i][SW-1:0]].raddr_ready;
        m_ch_s[i].rdata              = s_ch_s[r_sid[i][SW-1:0]].rdata;
        m_ch_s[i].rresp              = s_ch_s[r_sid[i][SW-1:0]].rresp;
        m_ch_s[i].rdat_valid         = s_ch_s[r_sid[i][SW-1:0]].rdat_valid;
      end

      // write channels
      w_sid[i] = w_stat_q[i].slave_id;
      w_act[i] = w_stat_q[i].active;
      if (!w_act[i] && m_ch_m[i].waddr_valid) begin
        w_sid[i]    = decode_addr(m_ch_m[i].waddr);
        w_act[i]    = 1'b1;
        w_stat_d[i] = '{slave_id: w_sid[i], active: 1'b1};
      end else if (w_act[i] && m_ch_m[i].wres_ready && s_ch_s[w_sid[i][SW-1:0]].wres_valid) begin
        w_stat_d[i] = '0;
      end
      if (w_act[i]) begin
        s_ch_m[w_sid[i][SW-1:0]].waddr       = m_ch_m[i].waddr;
        s_ch_m[w_sid[i][SW-1:0]].waddr_valid = m_ch_m[i].waddr_valid;
        s_ch_m[w_sid[i][SW-1:0]].wdata       = m_ch_m[i].wdata;
        s_ch_m[w_sid[i][SW-1:0]].wstrb       = m_ch_m[i].wstrb;
        s_ch_m[w_sid[i][SW-1:0]].wdat_valid  = m_ch_m[i].wdat_valid;
        s_ch_m[w_sid[i][SW-1:0]].wres_ready  = m_ch_m[i].wres_ready;
        m_ch_s[i].waddr_ready        = s_ch_s[w_sid[i][SW-1:0]].waddr_ready;
        m_ch_s[i].wdat_ready         = s_ch_s[w_sid[i][SW-1:0]].wdat_ready;
        m_ch_s[i].wresp              = s_ch_s[w_sid[i][SW-1:0]].wresp;
        m_ch_s[i].wres_valid         = s_ch_s[w_sid[i][SW-1:0]].wres_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MC; i++) begin
        r_stat_q[i] <= '0;
        w_stat_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < MC; i++) begin
        r_stat_q[i] <= r_stat_d[i];
        w_stat_q[i] <= w_stat_d[i];
      end
    end
  end

  // No two masters may be connected to the same slave's read (write) side.
  for (genvar i = 0; i < MC; i++) begin : g_chk
    for (genvar j = i + 1; j < MC; j++) begin : g_pair
      a_no_r_share: assert property (@(posedge clk) disable iff (!rst_n)
          !(r_act[i] && r_act[j] && r_sid[i] == r_sid[j]));
      a_no_w_share: assert property (@(posedge clk) disable iff (!rst_n)
          !(w_act[i] && w_act[j] && w_sid[i] == w_sid[j]));
    end
  end

endmodule
