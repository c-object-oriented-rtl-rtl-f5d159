// uart_rx: serial receiver of the UART, 8 data bits, no parity, one stop
// bit, least significant bit first.
//
// The line is passed through two flip-flops. A falling edge while idle
// starts a frame; the start bit is re-checked half a bit period later and
// every following bit is sampled one bit period (CLK_DIV cycles) after the
// previous one, i.e. in the middle of the bit. When the stop bit has been
// sampled high, valid pulses for one cycle with the byte; a low stop bit
// raises frame_err for one cycle instead. The frame format and the
// mid-bit sampling are this design's choices.
module uart_rx #(
  parameter int unsigned CLK_DIV = 16   // clock cycles per bit
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e      state;
  logic [1:0]  sync;
  logic [15:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  assign data = shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          cnt   <= 16'(CLK_DIV / 2 - 1);
        end
        START: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else if (sync[1]) state <= IDLE;          // glitch, not a start bit
          else begin
            state <= DATA;
            bitn  <= 3'd0;
            cnt   <= 16'(CLK_DIV - 1);
          end
        end
        DATA: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else begin
            shreg <= {sync[1], shreg[7:1]};
            cnt   <= 16'(CLK_DIV - 1);
            if (bitn == 3'd7) state <= STOP;
            bitn  <= bitn + 3'd1;
          end
        end
        STOP: begin
          if (cnt != 16'd0) cnt <= cnt - 16'd1;
          else begin
            state <= IDLE;
            if (sync[1]) valid     <= 1'b1;
            else         frame_err <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
