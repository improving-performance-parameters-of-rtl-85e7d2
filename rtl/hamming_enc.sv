// Hamming (12,8) encoder.
//
// The 8-bit data word is placed at code word positions 3,5,6,7,9,10,11,12
// (data[7] at position 3 ... data[0] at position 12) and four even parity
// bits are formed at the power-of-two positions:
//   P3 (position 1) = XOR of positions 3,5,7,9,11
//   P2 (position 2) = XOR of positions 3,6,7,10,11
//   P1 (position 4) = XOR of positions 5,6,7,12
//   P0 (position 8) = XOR of positions 9,10,11,12
// Bit placement, parity equations and the P3..P0 naming follow the document's
// worked example (data 10110011 gives code word 101101100011).
// Purely combinational, no clock.
module hamming_enc
  import hdlc_edac_pkg::*;
(
  input  word_t     data,     // data word, MSB first
  output parity_t   parity,   // {P3,P2,P1,P0}
  output codeword_t codeword  // codeword[p] = bit at position p (1..12)
);

  codeword_t c;

  always_comb begin
    c     = '0;
    c[3]  = data[7];
    c[5]  = data[6];
    c[6]  = data[5];
    c[7]  = data[4];
    c[9]  = data[3];
    c[10] = data[2];
    c[11] = data[1];
    c[12] = data[0];
    c[1]  = c[3] ^ c[5] ^ c[7] ^ c[9] ^ c[11];
    c[2]  = c[3] ^ c[6] ^ c[7] ^ c[10] ^ c[11];
    c[4]  = c[5] ^ c[6] ^ c[7] ^ c[12];
    c[8]  = c[9] ^ c[10] ^ c[11] ^ c[12];
  end

  assign codeword = c;
  assign parity   = {c[1], c[2], c[4], c[8]};

endmodule
