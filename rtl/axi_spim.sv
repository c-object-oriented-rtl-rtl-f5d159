// axi_spim: SPI master peripheral on the AXI4-Lite bus (slave 1 of the SoC).
//
// How it works. The common slave state machines (axi_slave_fsm) handle the
// bus; this module answers their device read and write calls:
//   read,  (addr & 6) != 0 : status word, answered at once
//   read,  (addr & 6) == 0 : when activated, runs one SPI byte transfer that
//                            sends IO_READ_DATA and answers with the byte
//                            received; the call stays unanswered (the bus
//                            read waits) until the transfer has finished.
//                            Address bit 0 = 1 releases the chip select
//                            after this byte. Not activated: never answered.
//   write, (addr & 6) != 0 : control word, bit 0 = activated
//   write, (addr & 6) == 0 : when activated, starts one SPI byte transfer
//                            sending wdata[7:0] (address bit 0 as above);
//                            the call waits while the engine is busy. The
//                            byte received meanwhile is kept as last_rx.
//                            Not activated: accepted and dropped.
// Status word: bit 0 activated, bit 1 engine busy, bit 2 chip select
// asserted, bits [15:8] last byte received.
//
// The read behaviour (status on (addr & 6) != 0, a receive transfer with
// address bit 0 passed along when activated, the read waiting while the
// receive is stalled, no answer when not activated) follows the described
// device read. The meaning of address bit 0 (chip-select release), the
// write side, the status/control bits and the value of IO_READ_DATA are this
// design's choices.
module axi_spim
  import axi4l_pkg::*;
#(
  parameter int unsigned HALF_DIV     = 4,     // clock cycles per SCK half period
  parameter logic [7:0]  IO_READ_DATA = 8'hFF  // byte sent during a read transfer
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ch_m_t axi_m,
  output ch_s_t axi_s,
  output logic  spi_sck,
  output logic  spi_mosi,
  input  logic  spi_miso,
  output logic  spi_cs_n
);

  logic        rd_req, rd_ok, wr_req, wr_ok;
  logic [31:0] rd_addr, rd_data, wr_addr, wr_data;
  logic [3:0]  wr_strb;

  axi_slave_fsm u_fsm (
    .clk, .rst_n, .axi_m, .axi_s,
    .dev_rd_req(rd_req), .dev_rd_addr(rd_addr), .dev_rd_ok(rd_ok), .dev_rd_data(rd_data),
    .dev_wr_req(wr_req), .dev_wr_addr(wr_addr), .dev_wr_data(wr_data), .dev_wr_strb(wr_strb),
    .dev_wr_ok(wr_ok), .dev_intr('0)
  );

  logic       activated;
  logic       rx_pending, rx_done;   // a read transfer is running / has finished
  logic [7:0] last_rx;

  logic       start, busy, done, release_cs;
  logic [7:0] tx_byte, rx_byte;

  spi_master_core #(.HALF_DIV(HALF_DIV)) u_core (
    .clk, .rst_n, .start, .tx_data(tx_byte), .release_cs, .busy, .done,
    .rx_data(rx_byte), .sck(spi_sck), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n)
  );

  logic rd_status, wr_ctrl, rd_start, wr_start;
  assign rd_status = (rd_addr[2:1] != 2'd0);
  assign wr_ctrl   = (wr_addr[2:1] != 2'd0);

  // read transfer is started when the engine is free; write has priority
  assign wr_start = wr_req && !wr_ctrl && activated && !busy;
  assign rd_start = rd_req && !rd_status && activated && !busy && !rx_pending && !rx_done
                    && !wr_start;
  assign start      = wr_start || rd_start;
  assign tx_byte    = wr_start ? wr_data[7:0] : IO_READ_DATA;
  assign release_cs = wr_start ? wr_addr[0] : rd_addr[0];

  always_comb begin
    rd_ok   = 1'b0;
    rd_data = '0;
    if (rd_status) begin
      rd_ok   = 1'b1;
      rd_data = {16'd0, last_rx, 5'd0, !spi_cs_n, busy, activated};
    end else if (activated && rx_done) begin
      rd_ok   = 1'b1;
      rd_data = {24'd0, last_rx};
    end
  end

  assign wr_ok = wr_ctrl || !activated || wr_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      activated  <= 1'b0;
      rx_pending <= 1'b0;
      rx_done    <= 1'b0;
      last_rx    <= '0;
    end else begin
      if (wr_req && wr_ctrl) activated <= wr_data[0];
      if (rd_start) rx_pending <= 1'b1;
      if (done) begin
        last_rx <= rx_byte;
        if (rx_pending) begin
          rx_pending <= 1'b0;
          rx_done    <= 1'b1;
        end
      end
      if (rd_req && rd_ok && !rd_status) rx_done <= 1'b0;
    end
  end

  logic unused;
  assign unused = ^{wr_strb, rd_addr[31:3], wr_addr[31:3], wr_data[31:8]};

endmodule
