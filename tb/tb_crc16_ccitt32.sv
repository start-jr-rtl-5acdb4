// tb_crc16_ccitt32: checks the word-wide CCITT-16 CRC against a byte-at-a-time
// reference written independently here, and against the published check value of
// CRC-16/CCITT (start 0xFFFF) for the ASCII string "12345678", 0xA12B.
module tb_crc16_ccitt32;
  logic [15:0] crc_in, crc_out;
  logic [31:0] data;
  int checks = 0, failures = 0;

  crc16_ccitt32 dut (.crc_in, .data, .crc_out);

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction

  function automatic logic [15:0] ref_word(input logic [15:0] c, input logic [31:0] w);
    for (int i = 3; i >= 0; i--) c = ref_byte(c, w[8*i +: 8]);
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known value
    crc_in = 16'hFFFF; data = "1234"; #1;
    crc_in = crc_out;  data = "5678"; #1;
    checks++;
    if (crc_out !== 16'hA12B) begin failures++; $display("check value: got %h", crc_out); end
    // random words against the byte reference
    for (int n = 0; n < 2000; n++) begin
      crc_in = 16'($urandom);
      data   = $urandom;
      #1;
      checks++;
      if (crc_out !== ref_word(crc_in, data)) begin
        failures++;
        if (failures < 5) $display("crc(%h,%h) = %h expected %h", crc_in, data, crc_out, ref_word(crc_in, data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
