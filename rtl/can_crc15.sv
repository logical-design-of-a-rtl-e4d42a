// can_crc15: serial CRC-15 of the CAN protocol.
//
// One register bit per polynomial degree; each enabled clock shifts in one
// unstuffed frame bit (start of frame up to the end of the data field). The
// generator polynomial is x^15+x^14+x^10+x^8+x^7+x^4+x^3+1 (0x4599), the one
// the CAN 2.0 specification fixes; the document only states that the CRC is
// 15 bits wide. The register is cleared by 'clear' (one cycle, before the
// start-of-frame bit) and 'crc' is valid the cycle after the last bit.
module can_crc15 #(
  parameter logic [14:0] POLY = 15'h4599   // CAN CRC-15 generator, x^15 implied
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,   // start a new frame
  input  logic        en,      // shift in 'din' this cycle
  input  logic        din,
  output logic [14:0] crc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       crc <= '0;
    else if (clear)   crc <= '0;
    else if (en) begin
      if (din ^ crc[14]) crc <= {crc[13:0], 1'b0} ^ POLY;
      else               crc <= {crc[13:0], 1'b0};
    end
  end
endmodule
