// 32-bit CRC over 16-bit words, one word per clock.
//
// Both link interfaces protect each frame with a 32-bit CRC that the receiver
// recomputes.  This block folds one 16-bit word per enabled clock into the
// CRC register, most significant bit first, with the generator polynomial
// 0x04C11DB7 (the Ethernet polynomial), no bit reflection and no final
// inversion; init loads 0xFFFFFFFF.  The 32-bit width and the word-serial use
// follow the card description; the polynomial, initial value and bit order
// are this design's choices.
//
// Timing: crc reflects a word on the clock edge that takes it (init wins
// over en).
module crc32_16
  import blm_pkg::*;
(
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  word_t       d,
  output logic [31:0] crc
);
  always_ff @(posedge clk) begin
    if (init)    crc <= 32'hFFFF_FFFF;
    else if (en) crc <= crc32_word(crc, d);
  end
endmodule
