// tb_tctproc_axi: end-to-end test of the SoC at its default parameters.
// The testbench plays the processor on master channel set 0 and runs a small
// program against the three peripherals, with a serial partner on the UART
// pins and an SPI slave on the SPI pins (as the external models of the
// system's software environment do):
//   1. activate UART and SPI, start the timer with its interrupt enabled;
//   2. the serial partner sends a message; each byte is read from the UART
//      (the first read waits for its arrival), sent to the SPI slave, the
//      slave's reply is read back over SPI, and byte XOR reply is written to
//      the UART transmitter (writes wait while it is busy);
//   3. PORTA is read at its own address and at an aliased one, while a UART
//      write runs at the same time;
//   4. more bytes than the receive buffer holds arrive: overflow is checked;
//   5. random traffic to the system control registers, overlapped with
//      status reads and control writes of the other two slaves.
// Each mechanism (read wait, transmit wait, SPI receive wait, chip-select
// release, timer interrupt, receive overflow, read and write on different
// slaves at once, aliased decode, read/write-done interrupts per slave) is
// counted, and a mechanism that never happened counts as a failure.
module tb_tctproc_axi;
  import axi4l_pkg::*;

  localparam int UDIV = 16, DEPTH = 16;   // the top's defaults
  localparam logic [31:0] UART = 32'h0000_0000, SPI = 32'h0000_1000, SYS = 32'h0000_2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t       m_ch_m;
  ch_s_t       m_ch_s;
  logic        urx, utx, sck, mosi, miso, cs_n;
  logic [31:0] porta;

  axi_master_bfm cpu (.clk, .m(m_ch_m), .s(m_ch_s));

  tctproc_axi dut (
    .clk, .rst_n, .m_ch_m, .m_ch_s, .uart_rx(urx), .uart_tx(utx),
    .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso), .spi_cs_n(cs_n), .porta
  );

  uart_x_model #(.CLK_DIV(UDIV)) ux (.clk, .rx_line(utx), .tx_line(urx));
  spi_x_model sx (.sck, .mosi, .cs_n, .miso);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, from the master port and the pins
  int n_rd_wait = 0, n_tx_wait = 0, n_spi_wait = 0, n_cs_rel = 0, n_timer_int = 0;
  int n_overflow = 0, n_parallel = 0, n_alias = 0;
  int n_done_int [3];
  int r_busy = 0, w_busy = 0;     // cycles the current read / write has been open
  logic [31:0] r_addr, w_addr;
  initial foreach (n_done_int[k]) n_done_int[k] = 0;

  always @(posedge clk) if (rst_n) begin
    if (m_ch_m.raddr_valid || m_ch_m.rdat_ready) r_busy <= r_busy + 1; else r_busy <= 0;
    if (m_ch_m.waddr_valid || m_ch_m.wres_ready) w_busy <= w_busy + 1; else w_busy <= 0;
    if (m_ch_m.raddr_valid) r_addr <= m_ch_m.raddr;
    if (m_ch_m.waddr_valid) w_addr <= m_ch_m.waddr;
    if (m_ch_m.rdat_ready && r_busy == 6 && r_addr[19:12] == 0) n_rd_wait++;
    if (m_ch_m.rdat_ready && r_busy == 6 && r_addr[19:12] == 1) n_spi_wait++;
    if (m_ch_m.wres_ready && w_busy == 6 && w_addr[19:12] == 0) n_tx_wait++;
    if ((m_ch_m.rdat_ready || m_ch_m.raddr_valid) && (m_ch_m.wres_ready || m_ch_m.waddr_valid)
        && r_busy == 1 && r_addr[19:12] != w_addr[19:12]) n_parallel++;
    if (m_ch_s.intr[18]) n_timer_int++;
    for (int k = 0; k < 3; k++) if (m_ch_s.intr[8*k +: 2] != 0) n_done_int[k]++;
  end
  always @(posedge cs_n) if (rst_n) n_cs_rel++;

  initial begin
    logic [31:0] d;
    resp_e r;
    int cyc;
    byte unsigned msg [] = '{8'h43, 8'h32, 8'h52, 8'h54, 8'h4C};
    byte unsigned exp_tx [$], exp_spi [$];
    byte unsigned reply;
    porta = 32'hCAFE_0001;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. set up
    cpu.write(UART + 4, 32'h1, 4'hF, r, cyc);
    cpu.write(SPI + 4, 32'h1, 4'hF, r, cyc);
    cpu.write(SYS + 12, 32'd99, 4'hF, r, cyc);
    cpu.write(SYS + 4, 32'h3, 4'hF, r, cyc);
    check(r == RSP_OK, "setup write response");

    // 2. message loop
    fork
      begin
        repeat (30) @(posedge clk);
        foreach (msg[i]) ux.send(msg[i]);
      end
      begin
        foreach (msg[i]) begin
          cpu.read(UART, d, r, cyc);
          check(d[7:0] == msg[i], $sformatf("uart rx byte %0d = %h exp %h", i, d[7:0], msg[i]));
          cpu.write(SPI + 0, 32'(d[7:0]), 4'hF, r, cyc);
          exp_spi.push_back(d[7:0]);
          cpu.read(SPI + 1, d, r, cyc);               // read reply, end of frame
          exp_spi.push_back(8'hFF);
          reply = 8'h5A + 8'(2 * i + 1);
          check(d[7:0] == reply, $sformatf("spi reply %0d = %h exp %h", i, d[7:0], reply));
          cpu.write(UART, 32'(msg[i] ^ reply), 4'hF, r, cyc);
          exp_tx.push_back(msg[i] ^ reply);
        end
      end
    join
    repeat (12 * UDIV) @(posedge clk);
    check(ux.received.size() == exp_tx.size(), $sformatf("uart tx count %0d", ux.received.size()));
    foreach (exp_tx[i]) if (i < ux.received.size())
      check(ux.received[i] == exp_tx[i], $sformatf("uart tx %0d = %h exp %h", i, ux.received[i], exp_tx[i]));
    check(sx.received.size() == exp_spi.size(), $sformatf("spi count %0d", sx.received.size()));
    foreach (exp_spi[i]) if (i < sx.received.size())
      check(sx.received[i] == exp_spi[i], $sformatf("spi byte %0d = %h exp %h", i, sx.received[i], exp_spi[i]));
    check(sx.frames == msg.size(), $sformatf("spi frames %0d", sx.frames));

    // 3. port A, aliased decode, read and write at once
    porta = 32'h0BAD_F00D;
    fork
      cpu.read(SYS, d, r, cyc);
      cpu.write(UART, 32'h21, 4'hF, r, cyc);
    join
    check(d == 32'h0BAD_F00D, $sformatf("porta %h", d));
    cpu.read(32'h0000_5000, d, r, cyc);
    n_alias += (d == 32'h0BAD_F00D);
    check(d == 32'h0BAD_F00D, "aliased slave index reaches SYSCTRL");
    cpu.read(SYS + 16, d, r, cyc);
    check(d[0] == 1'b1, "timer status bit");

    // 4. receive overflow
    for (int i = 0; i < DEPTH + 1; i++) ux.send(8'(i));
    repeat (UDIV) @(posedge clk);
    cpu.read(UART + 4, d, r, cyc);
    n_overflow += d[3];
    check(d[3] && d[15:8] == DEPTH, $sformatf("overflow status %h", d));
    for (int i = 0; i < DEPTH; i++) begin
      cpu.read(UART, d, r, cyc);
      check(d[7:0] == 8'(i), $sformatf("buffered byte %0d = %h", i, d[7:0]));
    end

    // 5. random mixed traffic: general-purpose registers of the system
    //    control block against a model, overlapped with status reads of the
    //    UART and SPI (read and write always aimed at different slaves)
    begin
      logic [31:0] gp [16], d2, v, st;
      int idx, k;
      resp_e r2;
      int cyc2;
      for (int i = 5; i < 16; i++) begin
        cpu.write(SYS + 32'(i << 2), 32'(i) * 32'h0101_0101, 4'hF, r, cyc);
        gp[i] = 32'(i) * 32'h0101_0101;
      end
      for (int t = 0; t < 300; t++) begin
        idx = 5 + ($urandom % 11);
        k   = $urandom % 3;
        if (k == 0) begin
          v = $urandom;
          fork
            cpu.write(SYS + 32'(idx << 2), v, 4'hF, r, cyc);
            cpu.read((t % 2) ? UART + 4 : SPI + 4, d2, r2, cyc2);
          join
          gp[idx] = v;
          check(cyc == 4 && cyc2 == 3, $sformatf("overlapped cycles %0d %0d", cyc, cyc2));
          check(d2[0] == 1'b1, $sformatf("activated bit in status %h", d2));
        end else if (k == 1) begin
          fork
            cpu.read(SYS + 32'(idx << 2), d, r, cyc);
            cpu.write(SPI + 4, 32'h1, 4'hF, r2, cyc2);
          join
          check(d == gp[idx], $sformatf("gp reg %0d = %h exp %h", idx, d, gp[idx]));
        end else begin
          v = $urandom;
          st = 32'($urandom % 16);
          cpu.write(SYS + 32'(idx << 2), v, st[3:0], r, cyc);
          for (int b = 0; b < 4; b++) if (st[b]) gp[idx][8*b +: 8] = v[8*b +: 8];
          cpu.read(SYS + 32'(idx << 2), d, r, cyc);
          check(d == gp[idx], $sformatf("strobed gp reg %0d = %h exp %h", idx, d, gp[idx]));
        end
      end
    end

    // mechanisms
    check(n_rd_wait > 0, "read waiting for UART data never happened");
    check(n_tx_wait > 0, "write waiting for the transmitter never happened");
    check(n_spi_wait > 0, "read waiting for an SPI transfer never happened");
    check(n_cs_rel >= 5, "chip-select release never happened");
    check(n_timer_int > 0, "timer interrupt never happened");
    check(n_overflow > 0, "receive overflow never happened");
    check(n_parallel > 0, "simultaneous read and write never happened");
    check(n_alias > 0, "aliased decode never happened");
    for (int k = 0; k < 3; k++) check(n_done_int[k] > 0, $sformatf("no done interrupt from slave %0d", k));
    $display("mechanisms: rd_wait=%0d tx_wait=%0d spi_wait=%0d cs_release=%0d timer_int=%0d overflow=%0d parallel=%0d alias=%0d",
             n_rd_wait, n_tx_wait, n_spi_wait, n_cs_rel, n_timer_int, n_overflow, n_parallel, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
