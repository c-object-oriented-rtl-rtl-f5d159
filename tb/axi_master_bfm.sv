// axi_master_bfm: behavioural AXI4-Lite master for the testbenches.
//
// Drives the master half of one channel set and offers two tasks, read and
// write, each doing one complete transfer and returning the data, the
// response and the number of clock cycles from the first valid to the
// accepted response. Outputs change just after the falling clock edge; a
// handshake is taken as happening at a rising edge when valid and ready were
// both high during the preceding half cycle. The read task raises raddr_valid
// and rdat_ready together; the write task raises waddr_valid, wdat_valid and
// wres_ready together, and each valid is dropped after its handshake.
module axi_master_bfm
  import axi4l_pkg::*;
(
  input  logic  clk,
  output ch_m_t m,
  input  ch_s_t s
);

  initial m = '0;

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output resp_e resp, output int cycles);
    bit a_done, a_hs, d_hs;
    @(negedge clk);
    m.raddr       = addr;
    m.raddr_valid = 1'b1;
    m.rdat_ready  = 1'b1;
    a_done = 0;
    cycles = 0;
    forever begin
      #1;
      a_hs = m.raddr_valid && s.raddr_ready;
      d_hs = m.rdat_ready && s.rdat_valid;
      if (d_hs) begin
        data = s.rdata;
        resp = s.rresp;
      end
      @(negedge clk);
      cycles++;
      if (a_hs) begin
        m.raddr_valid = 1'b0;
        a_done = 1;
      end
      if (d_hs) begin
        m.rdat_ready = 1'b0;
        break;
      end
    end
    if (!a_done) m.raddr_valid = 1'b0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output resp_e resp, output int cycles);
    bit a_hs, w_hs, r_hs;
    @(negedge clk);
    m.waddr       = addr;
    m.waddr_valid = 1'b1;
    m.wdata       = data;
    m.wstrb       = strb;
    m.wdat_valid  = 1'b1;
    m.wres_ready  = 1'b1;
    cycles = 0;
    forever begin
      #1;
      a_hs = m.waddr_valid && s.waddr_ready;
      w_hs = m.wdat_valid && s.wdat_ready;
      r_hs = m.wres_ready && s.wres_valid;
      if (r_hs) resp = s.wresp;
      @(negedge clk);
      cycles++;
      if (a_hs) m.waddr_valid = 1'b0;
      if (w_hs) m.wdat_valid = 1'b0;
      if (r_hs) begin
        m.wres_ready  = 1'b0;
        m.waddr_valid = 1'b0;
        m.wdat_valid  = 1'b0;
        break;
      end
    end
  endtask

endmodule
