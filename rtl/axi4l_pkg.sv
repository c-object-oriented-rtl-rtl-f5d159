// axi4l_pkg: types shared by every block on the SoC's AXI4-Lite bus.
//
// One AXI4-Lite channel set (read address, read data, write address, write
// data, write response) is split into the half driven by the master side
// (ch_m_t) and the half driven by the slave side (ch_s_t). The slave half
// also carries a 32-bit interrupt word, which is not part of AXI but travels
// with the channel set on this bus. All fields are plain wires: a module
// decides itself whether it drives them from registers.
//
// The field list and widths (32-bit addresses and data, 4-bit strobe, 2-bit
// response, 32-bit interrupt word) follow the channel structure of the
// design; the response encoding is the standard AXI one.
package axi4l_pkg;

  typedef enum logic [1:0] {
    RSP_OK     = 2'b00,
    RSP_EXOKAY = 2'b01,
    RSP_SLVERR = 2'b10,
    RSP_DECERR = 2'b11
  } resp_e;

  // Signals driven by the master side of a channel set.
  typedef struct packed {
    logic [31:0] raddr;        // read address
    logic        raddr_valid;
    logic [31:0] waddr;        // write address
    logic        waddr_valid;
    logic        rdat_ready;   // master accepts read data
    logic [31:0] wdata;        // write data
    logic [3:0]  wstrb;        // byte strobes of wdata
    logic        wdat_valid;
    logic        wres_ready;   // master accepts write response
  } ch_m_t;

  // Signals driven by the slave side of a channel set.
  typedef struct packed {
    logic        raddr_ready;
    logic        waddr_ready;
    logic [31:0] rdata;
    resp_e       rresp;
    logic        rdat_valid;
    logic        wdat_ready;
    resp_e       wresp;
    logic        wres_valid;
    logic [31:0] intr;         // interrupt word (not an AXI signal)
  } ch_s_t;

endpackage
