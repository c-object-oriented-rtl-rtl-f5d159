// tb_axi_spim: self-checking test of the SPI master peripheral through its
// AXI4-Lite port, with a behavioural SPI slave on its pins (the slave
// answers byte n of the run with 0x5A + n).
// Checks: writes while not activated produce no SPI traffic; written bytes
// reach the slave in order, MSB first; a write made while the engine is
// busy waits for it (about 16*HALF_DIV cycles); address bit 0 releases the
// chip select after the byte; a read sends 0xFF, waits for the transfer and
// returns the byte the slave sent; the status word (busy, chip select,
// last byte received).
module tb_axi_spim;
  import axi4l_pkg::*;

  localparam int HD = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t axi_m;
  ch_s_t axi_s;
  logic  sck, mosi, miso, cs_n;

  axi_master_bfm bfm (.clk, .m(axi_m), .s(axi_s));
  axi_spim #(.HALF_DIV(HD)) dut (
    .clk, .rst_n, .axi_m, .axi_s, .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso), .spi_cs_n(cs_n)
  );
  spi_x_model sx (.sck, .mosi, .cs_n, .miso);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [31:0] d;
    resp_e r;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // not activated
    bfm.write(32'h0, 32'hC3, 4'hF, r, cyc);
    repeat (20 * HD) @(posedge clk);
    check(sx.received.size() == 0 && cs_n == 1'b1, "traffic while not activated");

    bfm.write(32'h4, 32'h1, 4'hF, r, cyc);
    bfm.read(32'h4, d, r, cyc);
    check(d[0] == 1'b1 && d[1] == 1'b0, $sformatf("status after activate %h", d));

    // a two-byte frame written: first keeps CS, second releases it
    bfm.write(32'h0, 32'h9F, 4'hF, r, cyc);
    check(cyc == 4, $sformatf("first write cycles %0d", cyc));
    check(cs_n == 1'b0, "chip select asserted during frame");
    bfm.write(32'h1, 32'h3C, 4'hF, r, cyc);
    check(cyc >= 16 * HD - 4 && cyc <= 16 * HD + 6, $sformatf("busy write took %0d cycles", cyc));
    repeat (18 * HD) @(posedge clk);
    check(sx.received.size() == 2, $sformatf("slave got %0d bytes", sx.received.size()));
    if (sx.received.size() == 2)
      check(sx.received[0] == 8'h9F && sx.received[1] == 8'h3C,
            $sformatf("slave bytes %h %h", sx.received[0], sx.received[1]));
    check(cs_n == 1'b1 && sx.frames == 1, "chip select released after byte with bit 0");
    bfm.read(32'h4, d, r, cyc);
    check(d[15:8] == 8'h5B, $sformatf("last rx in status %h", d));

    // reads: keep CS, then release
    bfm.read(32'h0, d, r, cyc);
    check(d[7:0] == 8'h5C, $sformatf("read 1 got %h", d));
    check(cyc >= 16 * HD && cyc <= 16 * HD + 8, $sformatf("read took %0d cycles", cyc));
    check(cs_n == 1'b0, "chip select held after read at addr 0");
    bfm.read(32'h1, d, r, cyc);
    check(d[7:0] == 8'h5D, $sformatf("read 2 got %h", d));
    repeat (4) @(posedge clk);
    check(cs_n == 1'b1 && sx.frames == 2, "chip select released after read at addr 1");
    check(sx.received.size() == 4 && sx.received[2] == 8'hFF && sx.received[3] == 8'hFF,
          "read sends 0xFF");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
