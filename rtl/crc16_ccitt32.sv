// crc16_ccitt32: one 32-bit word of the CCITT-16 CRC (polynomial x^16+x^12+x^5+1,
// 0x1021), most significant bit first. Purely combinational: crc_out is the CRC
// register after shifting data in. The Arctic NIC starts each packet at 16'hFFFF and
// appends the final value as the packet's last word; the receiver recomputes it over
// the same words and compares. The polynomial is the standard one the document names;
// the start value, bit order and word-at-a-time form are this design's choices.
module crc16_ccitt32 (
  input  logic [15:0] crc_in,
  input  logic [31:0] data,
  output logic [15:0] crc_out
);
  always_comb begin
    logic [15:0] c;
    c = crc_in;
    for (int i = 31; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    crc_out = c;
  end
endmodule
