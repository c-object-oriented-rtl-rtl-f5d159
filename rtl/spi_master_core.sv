// spi_master_core: byte-wide SPI master engine, mode 0 (SCK idle low, data
// sampled on the rising edge and changed on the falling edge), most
// significant bit first.
//
// A one-cycle start with a byte asserts cs_n (if not already low), puts bit
// 7 on MOSI and then produces 8 SCK pulses, each half period lasting
// HALF_DIV clock cycles. MISO is shifted in on each rising edge. After the
// last falling edge, done pulses for one cycle with the received byte in
// rx_data, and cs_n is released if the start came with release = 1,
// otherwise it stays low for the next byte of the frame. A transfer takes
// 16*HALF_DIV cycles from start to done. Mode, bit order, byte width, the
// chip select and the clock divider are this design's choices.
module spi_master_core #(
  parameter int unsigned HALF_DIV = 4   // clock cycles per SCK half period
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_data,
  input  logic       release_cs,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_data,
  output logic       sck,
  output logic       mosi,
  input  logic       miso,
  output logic       cs_n
);

  logic [7:0]  shreg;
  logic [4:0]  edges_left;    // SCK edges still to produce
  logic [15:0] cnt;
  logic        rel_q;

  assign busy = (edges_left != 5'd0);
  assign mosi = shreg[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      edges_left <= '0;
      cnt        <= '0;
      rel_q      <= 1'b0;
      sck        <= 1'b0;
      cs_n       <= 1'b1;
      done       <= 1'b0;
      rx_data    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          shreg      <= tx_data;
          edges_left <= 5'd16;
          cnt        <= 16'(HALF_DIV - 1);
          rel_q      <= release_cs;
          cs_n       <= 1'b0;
        end
      end else if (cnt != 16'd0) begin
        cnt <= cnt - 16'd1;
      end else begin
        cnt        <= 16'(HALF_DIV - 1);
        edges_left <= edges_left - 5'd1;
        sck        <= ~sck;
        if (!sck) begin
          rx_data <= {rx_data[6:0], miso};     // rising edge: sample
        end else begin
          shreg <= {shreg[6:0], 1'b0};         // falling edge: next bit
          if (edges_left == 5'd1) begin
            done <= 1'b1;
            if (rel_q) cs_n <= 1'b1;
          end
        end
      end
    end
  end

endmodule
