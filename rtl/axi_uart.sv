// axi_uart: UART peripheral on the AXI4-Lite bus (slave 0 of the SoC).
//
// How it works. The common slave state machines (axi_slave_fsm) handle the
// bus; this module answers their device read and write calls:
//   read,  (addr & 7) != 0 : status word, answered at once
//   read,  (addr & 7) == 0 : the oldest byte of the receive buffer. The call
//                            is answered only when the UART is activated
//                            and the buffer is not empty, so the bus read
//                            waits until a byte arrives; answering pops it.
//   write, (addr & 7) != 0 : control word, bit 0 = activated
//   write, (addr & 7) == 0 : byte to transmit. The call waits while the
//                            transmitter is busy; while the UART is not
//                            activated the byte is accepted and dropped.
// Status word: bit 0 activated, bit 1 receive buffer not empty, bit 2
// transmitter busy, bit 3 receive overflow (a byte arrived while the buffer
// was full and was lost; cleared by a control write), bits [15:8] number of
// bytes in the receive buffer.
// Received bytes are stored only while activated. The receive buffer is a
// RX_DEPTH-entry circular buffer with read and write pointers.
//
// The read behaviour (status on non-zero low address bits, data from the
// receive buffer only when activated and not empty, otherwise wait) follows
// the described device read. The write side, the status and control bits,
// the frame format (8N1), the bit period CLK_DIV and the buffer depth are
// this design's choices.
module axi_uart
  import axi4l_pkg::*;
#(
  parameter int unsigned CLK_DIV  = 16,  // clock cycles per UART bit
  parameter int unsigned RX_DEPTH = 16   // receive buffer entries (power of 2)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ch_m_t axi_m,
  output ch_s_t axi_s,
  input  logic  uart_rx,
  output logic  uart_tx
);

  localparam int unsigned AW = $clog2(RX_DEPTH);

  logic        rd_req, rd_ok, wr_req, wr_ok;
  logic [31:0] rd_addr, rd_data, wr_addr, wr_data;
  logic [3:0]  wr_strb;

  axi_slave_fsm u_fsm (
    .clk, .rst_n, .axi_m, .axi_s,
    .dev_rd_req(rd_req), .dev_rd_addr(rd_addr), .dev_rd_ok(rd_ok), .dev_rd_data(rd_data),
    .dev_wr_req(wr_req), .dev_wr_addr(wr_addr), .dev_wr_data(wr_data), .dev_wr_strb(wr_strb),
    .dev_wr_ok(wr_ok), .dev_intr('0)
  );

  // UART state
  logic          activated, overflow;
  logic [7:0]    rx_buf [RX_DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   count;
  logic          not_empty, full;

  logic       tx_start, tx_busy;
  logic       rx_valid, rx_ferr;
  logic [7:0] rx_byte;

  uart_tx #(.CLK_DIV(CLK_DIV)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(wr_data[7:0]), .busy(tx_busy), .tx(uart_tx)
  );
  uart_rx #(.CLK_DIV(CLK_DIV)) u_rx (
    .clk, .rst_n, .rx(uart_rx), .valid(rx_valid), .data(rx_byte), .frame_err(rx_ferr)
  );

  assign not_empty = (count != '0);
  assign full      = (count == (AW+1)'(RX_DEPTH));

  // device read call
  logic rd_status, rd_pop;
  assign rd_status = (rd_addr[2:0] != 3'd0);
  always_comb begin
    rd_ok   = 1'b0;
    rd_data = '0;
    if (rd_status) begin
      rd_ok   = 1'b1;
      rd_data = {16'd0, 8'((count)), 4'd0, overflow, tx_busy, not_empty, activated};
    end else if (activated && not_empty) begin
      rd_ok   = 1'b1;
      rd_data = {24'd0, rx_buf[rp]};
    end
  end
  assign rd_pop = rd_req && rd_ok && !rd_status;

  // device write call
  logic wr_ctrl;
  assign wr_ctrl  = (wr_addr[2:0] != 3'd0);
  assign wr_ok    = wr_ctrl || !activated || !tx_busy;
  assign tx_start = wr_req && !wr_ctrl && activated && !tx_busy;

  logic push;
  assign push = rx_valid && activated && !full;

  always_ff @(posedge clk) begin
    if (push) rx_buf[wp] <= rx_byte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      activated <= 1'b0;
      overflow  <= 1'b0;
      rp        <= '0;
      wp        <= '0;
      count     <= '0;
    end else begin
      if (wr_req && wr_ok && wr_ctrl) begin
        activated <= wr_data[0];
        overflow  <= 1'b0;
      end else if (rx_valid && activated && full) begin
        overflow <= 1'b1;
      end
      if (push)   wp <= wp + 1'b1;
      if (rd_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(rd_pop);
    end
  end

  // A byte with a bad stop bit is dropped.
  logic unused;
  assign unused = ^{rx_ferr, wr_strb, rd_addr[31:3], wr_addr[31:3], wr_data[31:8]};

endmodule
