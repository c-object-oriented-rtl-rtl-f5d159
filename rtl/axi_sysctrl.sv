// axi_sysctrl: system control peripheral (timer and GPIO) on the AXI4-Lite
// bus (slave 2 of the SoC).
//
// How it works. The peripheral is a file of 16 32-bit registers; a bus read
// of address a returns register (a >> 2) & 15 and is always answered at
// once, a bus write stores the strobed bytes of wdata in that register. The
// common slave state machines (axi_slave_fsm) handle the bus. Some registers
// have hardware behaviour:
//   reg 0  PORTA input, sampled into the register every cycle (read only)
//   reg 1  timer control: bit 0 enable, bit 1 interrupt enable
//   reg 2  timer count, counts up by one per cycle while enabled
//   reg 3  timer compare value: when the count equals it the count restarts
//          at 0 and bit 0 of reg 4 is set; with the interrupt enabled, bit 2
//          of this slave's interrupt word is raised for one cycle
//   reg 4  timer status; bit 0 is set by the timer, written by the bus
//   reg 5..15 general-purpose registers
// The 16-entry register file, its address decode and the single-cycle read
// follow the described device read; the assignment of registers to the
// timer and the port, and the interrupt bit, are this design's choices.
module axi_sysctrl
  import axi4l_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ch_m_t       axi_m,
  output ch_s_t       axi_s,
  input  logic [31:0] porta
);

  localparam int unsigned R_PORTA = 0, R_TCTRL = 1, R_TCNT = 2, R_TCMP = 3, R_TSTAT = 4;

  logic        rd_req, wr_req;
  logic [31:0] rd_addr, rd_data, wr_addr, wr_data;
  logic [3:0]  wr_strb;
  logic [31:0] timer_intr;

  axi_slave_fsm u_fsm (
    .clk, .rst_n, .axi_m, .axi_s,
    .dev_rd_req(rd_req), .dev_rd_addr(rd_addr), .dev_rd_ok(1'b1), .dev_rd_data(rd_data),
    .dev_wr_req(wr_req), .dev_wr_addr(wr_addr), .dev_wr_data(wr_data), .dev_wr_strb(wr_strb),
    .dev_wr_ok(1'b1), .dev_intr(timer_intr)
  );

  logic [31:0] regs [16];
  logic [3:0]  wr_idx;
  logic        hit;

  assign rd_data = regs[rd_addr[5:2]];
  assign wr_idx  = wr_addr[5:2];
  assign hit     = regs[R_TCTRL][0] && (regs[R_TCNT] == regs[R_TCMP]);

  always_comb begin
    timer_intr    = '0;
    timer_intr[2] = hit && regs[R_TCTRL][1];
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++)
      if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 16; r++) regs[r] <= '0;
    end else begin
      for (int r = 1; r < 16; r++)
        if (wr_req && wr_idx == 4'(r)) regs[r] <= merge(regs[r], wr_data, wr_strb);
      regs[R_PORTA] <= porta;
      // timer (the bus write of the same cycle loses to it)
      if (regs[R_TCTRL][0]) regs[R_TCNT] <= hit ? 32'd0 : regs[R_TCNT] + 32'd1;
      if (hit) regs[R_TSTAT][0] <= 1'b1;
    end
  end

  logic unused;
  assign unused = ^{rd_req, rd_addr[31:6], rd_addr[1:0], wr_addr[31:6], wr_addr[1:0]};

endmodule
