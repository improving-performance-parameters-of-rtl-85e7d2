// Hamming (12,8) decoder and single-error corrector.
//
// Four check bits are recomputed over the received 12-bit code word:
//   C0 = XOR of positions 1,3,5,7,9,11
//   C1 = XOR of positions 2,3,6,7,10,11
//   C2 = XOR of positions 4,5,6,7,12
//   C3 = XOR of positions 8,9,10,11,12
// The syndrome C = {C3,C2,C1,C0} is 0 for an error-free word; otherwise it is
// the position of the single bit in error, which is toggled (document,
// Section 3.1). A syndrome of 13..15 names no position of a 12-bit word and
// can only come from several errors: this design then leaves the word
// unchanged and raises `uncorrectable` (the document does not treat that case).
// Double errors that alias to a valid position are miscorrected, as the
// document notes for the basic Hamming code. Combinational.
module hamming_dec
  import hdlc_edac_pkg::*;
(
  input  codeword_t  codeword,      // received word, index = position 1..12
  output logic [3:0] syndrome,      // {C3,C2,C1,C0}
  output word_t      data,          // corrected data word
  output logic       error,         // syndrome != 0
  output logic       uncorrectable  // syndrome > 12
);

  // Positions of data bits 7..0 in the code word.
  localparam int unsigned DATA_POS [WORD_W] = '{12, 11, 10, 9, 7, 6, 5, 3};

  always_comb begin
    syndrome[0] = codeword[1] ^ codeword[3] ^ codeword[5] ^ codeword[7] ^ codeword[9] ^ codeword[11];
    syndrome[1] = codeword[2] ^ codeword[3] ^ codeword[6] ^ codeword[7] ^ codeword[10] ^ codeword[11];
    syndrome[2] = codeword[4] ^ codeword[5] ^ codeword[6] ^ codeword[7] ^ codeword[12];
    syndrome[3] = codeword[8] ^ codeword[9] ^ codeword[10] ^ codeword[11] ^ codeword[12];

    error         = (syndrome != 4'd0);
    uncorrectable = (syndrome > 4'(CODE_W));

    // Toggle the bit the syndrome points at. A parity-bit position needs no
    // action because only the data bits leave the decoder.
    for (int i = 0; i < WORD_W; i++) begin
      data[i] = codeword[DATA_POS[i]] ^ (syndrome == 4'(DATA_POS[i]));
    end
  end

endmodule
