// tb_axi_uart: self-checking test of the UART peripheral through its
// AXI4-Lite port, with a behavioural serial partner on its pins.
// Checks: bytes received while not activated are ignored; writes to the data
// register appear on the TX line in order and a write made while the
// transmitter is busy waits for it (about one frame, 10*CLK_DIV cycles);
// a data read made before any byte has arrived waits for the byte; bytes
// are read back in arrival order; the buffer fill count and not-empty bit of
// the status word; the overflow bit when more than RX_DEPTH bytes arrive
// unread, and that the first RX_DEPTH bytes survive.
module tb_axi_uart;
  import axi4l_pkg::*;

  localparam int DIV = 8, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t axi_m;
  ch_s_t axi_s;
  logic  rx, tx;

  axi_master_bfm bfm (.clk, .m(axi_m), .s(axi_s));
  axi_uart #(.CLK_DIV(DIV), .RX_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .axi_m, .axi_s, .uart_rx(rx), .uart_tx(tx)
  );
  uart_x_model #(.CLK_DIV(DIV)) ux (.clk, .rx_line(tx), .tx_line(rx));

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
    int cyc, max_wr;
    byte unsigned msg[6] = '{8'h48, 8'h65, 8'h6C, 8'h6C, 8'h6F, 8'h0A};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // not activated: incoming bytes are dropped
    bfm.read(32'h4, d, r, cyc);
    check(d[0] == 1'b0 && d[1] == 1'b0, $sformatf("reset status %h", d));
    ux.send(8'h11);
    repeat (2 * DIV) @(posedge clk);
    bfm.read(32'h4, d, r, cyc);
    check(d[1] == 1'b0 && d[15:8] == 0, $sformatf("byte stored while inactive, status %h", d));

    // activate
    bfm.write(32'h4, 32'h1, 4'hF, r, cyc);
    bfm.read(32'h4, d, r, cyc);
    check(d[0] == 1'b1, "activated bit");
    check(cyc == 3, $sformatf("status read cycles %0d", cyc));

    // transmit a message
    max_wr = 0;
    foreach (msg[i]) begin
      bfm.write(32'h0, 32'(msg[i]), 4'hF, r, cyc);
      if (cyc > max_wr) max_wr = cyc;
    end
    check(max_wr >= 10 * DIV - 4 && max_wr <= 10 * DIV + 8,
          $sformatf("busy-transmitter write took %0d cycles", max_wr));
    repeat (12 * DIV) @(posedge clk);
    check(ux.received.size() == 6, $sformatf("received %0d bytes", ux.received.size()));
    foreach (msg[i]) if (i < ux.received.size())
      check(ux.received[i] == msg[i], $sformatf("tx byte %0d = %h", i, ux.received[i]));
    check(ux.frame_errors == 0, "tx frame errors");

    // a read before the byte arrives waits for it
    fork
      begin
        repeat (5) @(posedge clk);
        ux.send(8'hA7);
      end
      bfm.read(32'h0, d, r, cyc);
    join
    check(d[7:0] == 8'hA7, $sformatf("waiting read got %h", d));
    check(cyc > 9 * DIV, $sformatf("waiting read took only %0d cycles", cyc));

    // three bytes buffered, read in order
    ux.send(8'h01); ux.send(8'h02); ux.send(8'h03);
    repeat (DIV) @(posedge clk);
    bfm.read(32'h4, d, r, cyc);
    check(d[15:8] == 3 && d[1] == 1'b1, $sformatf("status with 3 bytes %h", d));
    for (int i = 1; i <= 3; i++) begin
      bfm.read(32'h0, d, r, cyc);
      check(d[7:0] == 8'(i), $sformatf("buffered byte %0d = %h", i, d));
      check(cyc == 3, $sformatf("buffered read cycles %0d", cyc));
    end
    bfm.read(32'h4, d, r, cyc);
    check(d[1] == 1'b0 && d[3] == 1'b0, $sformatf("status after drain %h", d));

    // overflow
    for (int i = 0; i < DEPTH + 2; i++) ux.send(8'h80 + 8'(i));
    repeat (DIV) @(posedge clk);
    bfm.read(32'h4, d, r, cyc);
    check(d[3] == 1'b1 && d[15:8] == DEPTH, $sformatf("overflow status %h", d));
    for (int i = 0; i < DEPTH; i++) begin
      bfm.read(32'h0, d, r, cyc);
      check(d[7:0] == 8'h80 + 8'(i), $sformatf("kept byte %0d = %h", i, d));
    end
    bfm.write(32'h4, 32'h1, 4'hF, r, cyc);
    bfm.read(32'h4, d, r, cyc);
    check(d[3] == 1'b0, "overflow cleared by control write");

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
