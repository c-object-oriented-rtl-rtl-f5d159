// uart_tx: serial transmitter of the UART, 8 data bits, no parity, one stop
// bit, least significant bit first, line idle high.
//
// A one-cycle start pulse with a byte loads a 10-bit frame (start bit, data,
// stop bit) into a shift register; each bit is held for CLK_DIV clock
// cycles. busy is high from the cycle after start until the stop bit has
// been held, so a frame takes 10*CLK_DIV cycles. The frame format and the
// bit period as a parameter are this design's choices.
module uart_tx #(
  parameter int unsigned CLK_DIV = 16   // clock cycles per bit
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);

  logic [9:0]  shreg;
  logic [3:0]  bits_left;
  logic [15:0] cnt;

  assign busy = (bits_left != 4'd0);
  assign tx   = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (!busy) begin
      if (start) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= 16'(CLK_DIV - 1);
      end
    end else if (cnt != 16'd0) begin
      cnt <= cnt - 16'd1;
    end else begin
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
      cnt       <= 16'(CLK_DIV - 1);
    end
  end

endmodule
