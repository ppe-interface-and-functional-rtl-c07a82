// tb_crc_pkg -- reference CRC16 for the testbenches, written byte-wise:
// CRC-16-CCITT (polynomial 0x1021, initial value 0xFFFF, no reflection,
// no final xor) over the bytes of each 32-bit word, most significant byte
// first. It must agree with the bit-serial word update used by the RTL.
package tb_crc_pkg;
  function automatic logic [15:0] ref_crc_byte(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction

  function automatic logic [15:0] ref_crc(input logic [31:0] words [$]);
    logic [15:0] c;
    c = 16'hFFFF;
    foreach (words[i])
      for (int b = 3; b >= 0; b--) c = ref_crc_byte(c, words[i][b*8 +: 8]);
    return c;
  endfunction
endpackage
