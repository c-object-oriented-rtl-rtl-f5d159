// uart_x_model: behavioural serial partner of the UART for the testbenches
// (8 data bits, no parity, one stop bit, CLK_DIV clock cycles per bit).
// It decodes every frame on the line it listens to (rx_line) and stores the
// bytes in a queue, and its send task injects a frame onto tx_line.
module uart_x_model #(
  parameter int unsigned CLK_DIV = 16
) (
  input  logic clk,
  input  logic rx_line,     // the DUT's transmit pin
  output logic tx_line      // the DUT's receive pin
);

  byte unsigned received[$];
  int           frame_errors = 0;

  initial tx_line = 1'b1;

  task automatic send(input byte unsigned b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      tx_line = frame[i];
      repeat (CLK_DIV) @(posedge clk);
    end
    tx_line = 1'b1;
  endtask

  initial begin
    byte unsigned b;
    forever begin
      @(negedge rx_line);
      repeat (CLK_DIV / 2) @(posedge clk);
      if (rx_line == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CLK_DIV) @(posedge clk);
          b[i] = rx_line;
        end
        repeat (CLK_DIV) @(posedge clk);
        if (rx_line == 1'b1) received.push_back(b);
        else frame_errors++;
      end
    end
  end

endmodule
