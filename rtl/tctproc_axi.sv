// tctproc_axi: SoC top. One AXI4-Lite bus with one master channel set and
// three slaves: the UART (slave 0), the SPI master (slave 1) and the system
// control block with timer and GPIO (slave 2), joined by axi_bus_ctrl.
//
// How it works. The bus controller connects the master channel set to the
// slave selected by address bits [19:12] (0x0000_0xxx UART, 0x0000_1xxx SPI,
// 0x0000_2xxx SYSCTRL; higher indices alias to SYSCTRL) for the duration of
// one read or one write; read and write may target different slaves at the
// same time. Every slave raises interrupt bit 0 on a finished read and bit 1
// on a finished write; SYSCTRL adds bit 2 for its timer. The master sees the
// three slaves' interrupt bytes at bits [7:0], [15:8] and [23:16] of m_intr
// (inside m_ch_s).
//
// The master channel (m_ch_m in, m_ch_s out) is a port: the processor that
// drives it in the full system, a 4-stage pipelined RISC core, is outside
// this RTL. The UART and SPI pins and the 32-bit PORTA input are ports too.
// Block set, bus shape (one master, three slaves) and slave order follow
// the described SoC; the address map is this design's choice.
module tctproc_axi
  import axi4l_pkg::*;
#(
  parameter int unsigned UART_CLK_DIV  = 16,  // clock cycles per UART bit
  parameter int unsigned UART_RX_DEPTH = 16,  // UART receive buffer entries
  parameter int unsigned SPI_HALF_DIV  = 4    // clock cycles per SCK half period
) (
  input  logic        clk,
  input  logic        rst_n,
  // master channel set 0 (processor side)
  input  ch_m_t       m_ch_m,
  output ch_s_t       m_ch_s,
  // UART pins
  input  logic        uart_rx,
  output logic        uart_tx,
  // SPI pins
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_cs_n,
  // GPIO port A
  input  logic [31:0] porta
);

  localparam int unsigned MC = 1, SC = 3;

  ch_m_t m_m [MC];
  ch_s_t m_s [MC];
  ch_m_t s_m [SC];
  ch_s_t s_s [SC];

  assign m_m[0] = m_ch_m;
  assign m_ch_s = m_s[0];

  axi_uart #(.CLK_DIV(UART_CLK_DIV), .RX_DEPTH(UART_RX_DEPTH)) u_uart (
    .clk, .rst_n, .axi_m(s_m[0]), .axi_s(s_s[0]), .uart_rx, .uart_tx
  );

  axi_spim #(.HALF_DIV(SPI_HALF_DIV)) u_spim (
    .clk, .rst_n, .axi_m(s_m[1]), .axi_s(s_s[1]),
    .spi_sck, .spi_mosi, .spi_miso, .spi_cs_n
  );

  axi_sysctrl u_sysctrl (
    .clk, .rst_n, .axi_m(s_m[2]), .axi_s(s_s[2]), .porta
  );

  axi_bus_ctrl #(.MC(MC), .SC(SC), .SEL_LSB(12)) u_bus (
    .clk, .rst_n, .m_ch_m(m_m), .m_ch_s(m_s), .s_ch_m(s_m), .s_ch_s(s_s)
  );

endmodule
