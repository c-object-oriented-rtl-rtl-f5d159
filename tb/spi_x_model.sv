// spi_x_model: behavioural SPI slave for the testbenches (mode 0, most
// significant bit first, 8-bit bytes). While cs_n is low it shifts MOSI in
// on each rising SCK edge and drives MISO from its reply byte, changing it on
// each falling edge. Every completed byte goes into a queue; the reply to
// byte n of the run is reply_base + n.
module spi_x_model (
  input  logic sck,
  input  logic mosi,
  input  logic cs_n,
  output logic miso
);

  byte unsigned received[$];
  byte unsigned reply_base = 8'h5A;
  int           nbytes     = 0;
  int           frames     = 0;   // frames ended by cs_n with at least one byte
  int           frame_bytes = 0;

  logic [7:0] out_sh, in_sh;
  int         bitn = 0;

  assign miso = out_sh[7];

  initial out_sh = 8'h00;

  always @(negedge cs_n) begin
    out_sh = reply_base + 8'(nbytes);
    bitn   = 0;
  end
  always @(posedge cs_n) begin
    if (frame_bytes > 0) frames++;
    frame_bytes = 0;
  end

  always @(posedge sck) if (!cs_n) begin
    in_sh = {in_sh[6:0], mosi};
    bitn++;
    if (bitn == 8) begin
      received.push_back(in_sh);
      nbytes++;
      frame_bytes++;
      bitn = 0;
    end
  end

  always @(negedge sck) if (!cs_n) begin
    if (bitn == 0) out_sh = reply_base + 8'(nbytes);   // next byte of the frame
    else           out_sh = {out_sh[6:0], 1'b0};
  end

endmodule
