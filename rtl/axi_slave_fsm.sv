// axi_slave_fsm: the AXI4-Lite slave state machines that every peripheral of
// the SoC shares. A peripheral instantiates it and answers two combinational
// device calls: a read call (dev_rd_*) and a write call (dev_wr_*).
//
// How it works. All slave-side bus outputs come from registers, so every
// response appears one cycle after the state machine decides on it.
//   Read:  R_INIT waits for raddr_valid, latches the address and raises
//          raddr_ready for one cycle (state R_ADDR). In R_ADDR the device read
//          call is made every cycle (dev_rd_req) until it answers dev_rd_ok;
//          the data are then registered with an OK response and rdat_valid.
//          Once the master shows rdat_ready the machine moves to R_END, which
//          drops rdat_valid, waits until the master has released raddr_valid,
//          sets interrupt bit 0 and returns to R_INIT.
//   Write: W_INIT waits for waddr_valid, latches the address and raises
//          waddr_ready (W_ADDR). In W_ADDR the device write call is made while
//          wdat_valid is high until it answers dev_wr_ok; wdat_ready is then
//          raised for one cycle (W_RESP). W_RESP registers an OK response
//          with wres_valid and moves on once wres_ready is seen (W_END).
//          W_END drops wres_valid, waits for the master to release
//          waddr_valid and wdat_valid, sets interrupt bit 1 and returns.
//   A device takes a read or write as done in the cycle where req and ok are
//   both high (that is when it may pop a buffer or start a transfer).
//   The interrupt word is a register: each cycle it takes the bits raised
//   by the two machines plus dev_intr from the device.
//
// Timing: with a device that answers at once, rdat_valid rises 2 cycles after
// the cycle in which raddr_valid is first seen, and wres_valid 3 cycles after
// waddr_valid; a device that answers late adds its wait cycles.
//
// The read machine (its states, the one-cycle address ready, the hold of the
// data while rdat_valid is up, the release check and interrupt bit 0) follows
// the described design. The write machine is not spelled out there; it is
// this design's mirror image of the read machine, with interrupt bit 1.
module axi_slave_fsm
  import axi4l_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ch_m_t       axi_m,        // from the bus
  output ch_s_t       axi_s,        // to the bus
  // device read call
  output logic        dev_rd_req,
  output logic [31:0] dev_rd_addr,
  input  logic        dev_rd_ok,
  input  logic [31:0] dev_rd_data,
  // device write call
  output logic        dev_wr_req,
  output logic [31:0] dev_wr_addr,
  output logic [31:0] dev_wr_data,
  output logic [3:0]  dev_wr_strb,
  input  logic        dev_wr_ok,
  // extra interrupt bits raised by the device this cycle
  input  logic [31:0] dev_intr
);

  typedef enum logic [2:0] {R_INIT, R_ADDR, R_END} r_state_e;
  typedef enum logic [2:0] {W_INIT, W_ADDR, W_RESP, W_END} w_state_e;

  r_state_e    r_state;
  w_state_e    w_state;
  logic [31:0] raddr_q, waddr_q;
  logic        ra_end, wa_end;
  logic [31:0] intr_q;

  // registered channel outputs
  logic        raddr_ready_q, waddr_ready_q, wdat_ready_q;
  logic [31:0] rdata_q;
  logic        rdat_valid_q, wres_valid_q;
  resp_e       rresp_q, wresp_q;

  logic [31:0] nxt_intr;

  assign axi_s.raddr_ready = raddr_ready_q;
  assign axi_s.waddr_ready = waddr_ready_q;
  assign axi_s.rdata       = rdata_q;
  assign axi_s.rresp       = rresp_q;
  assign axi_s.rdat_valid  = rdat_valid_q;
  assign axi_s.wdat_ready  = wdat_ready_q;
  assign axi_s.wresp       = wresp_q;
  assign axi_s.wres_valid  = wres_valid_q;
  assign axi_s.intr        = intr_q;

  // device calls
  assign dev_rd_addr = raddr_q;
  assign dev_rd_req  = (r_state == R_ADDR) && !rdat_valid_q;
  assign dev_wr_addr = waddr_q;
  assign dev_wr_data = axi_m.wdata;
  assign dev_wr_strb = axi_m.wstrb;
  assign dev_wr_req  = (w_state == W_ADDR) && axi_m.wdat_valid;

  always_comb begin
    nxt_intr = dev_intr;
    if (r_state == R_END && (ra_end || !axi_m.raddr_valid))
      nxt_intr[0] = 1'b1;
    if (w_state == W_END && (wa_end || !axi_m.waddr_valid) && !axi_m.wdat_valid)
      nxt_intr[1] = 1'b1;
  end

  // read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state       <= R_INIT;
      raddr_q       <= '0;
      ra_end        <= 1'b0;
      raddr_ready_q <= 1'b0;
      rdata_q       <= '0;
      rresp_q       <= RSP_OK;
      rdat_valid_q  <= 1'b0;
    end else begin
      unique case (r_state)
        R_INIT: begin
          if (axi_m.raddr_valid) begin
            raddr_q       <= axi_m.raddr;
            raddr_ready_q <= 1'b1;
            ra_end        <= 1'b0;
            r_state       <= R_ADDR;
          end
        end
        R_ADDR: begin
          raddr_ready_q <= 1'b0;
          if (!axi_m.raddr_valid) ra_end <= 1'b1;
          if (rdat_valid_q || dev_rd_ok) begin
            if (!rdat_valid_q) rdata_q <= dev_rd_data;
            rresp_q      <= RSP_OK;
            rdat_valid_q <= 1'b1;
            if (axi_m.rdat_ready) r_state <= R_END;
          end
        end
        R_END: begin
          rdat_valid_q <= 1'b0;
          if (ra_end || !axi_m.raddr_valid) r_state <= R_INIT;
        end
        default: r_state <= R_INIT;
      endcase
    end
  end

  // write channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_state       <= W_INIT;
      waddr_q       <= '0;
      wa_end        <= 1'b0;
      waddr_ready_q <= 1'b0;
      wdat_ready_q  <= 1'b0;
      wresp_q       <= RSP_OK;
      wres_valid_q  <= 1'b0;
    end else begin
      unique case (w_state)
        W_INIT: begin
          if (axi_m.waddr_valid) begin
            waddr_q       <= axi_m.waddr;
            waddr_ready_q <= 1'b1;
            wa_end        <= 1'b0;
            w_state       <= W_ADDR;
          end
        end
        W_ADDR: begin
          waddr_ready_q <= 1'b0;
          if (!axi_m.waddr_valid) wa_end <= 1'b1;
          if (dev_wr_req && dev_wr_ok) begin
            wdat_ready_q <= 1'b1;
            w_state      <= W_RESP;
          end
        end
        W_RESP: begin
          wdat_ready_q <= 1'b0;
          if (!axi_m.waddr_valid) wa_end <= 1'b1;
          wresp_q      <= RSP_OK;
          wres_valid_q <= 1'b1;
          if (axi_m.wres_ready) w_state <= W_END;
        end
        W_END: begin
          wres_valid_q <= 1'b0;
          if ((wa_end || !axi_m.waddr_valid) && !axi_m.wdat_valid) w_state <= W_INIT;
        end
        default: w_state <= W_INIT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) intr_q <= '0;
    else        intr_q <= nxt_intr;
  end

  // Once rdat_valid is up it stays up, with the same data, until R_END.
  a_rdat_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (rdat_valid_q && r_state == R_ADDR) |=> (rdat_valid_q && $stable(rdata_q)));
  // The write response stays up until the master has been seen ready.
  a_wres_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (wres_valid_q && w_state == W_RESP) |=> wres_valid_q);

endmodule
