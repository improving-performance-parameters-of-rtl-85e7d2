// Receive-side Hamming parity calculator: decodes and corrects a whole frame.
//
// The 64 received data bits and 32 received parity bits are regrouped into
// eight 12-bit code words (parity nibble {P3,P2,P1,P0} at positions 1,2,4,8,
// data at 3,5,6,7,9..12) and each goes through a hamming_dec. A non-zero
// syndrome toggles the bit it points at, so one error per word, eight per
// frame, is corrected. Per word the module reports whether an error was seen
// and whether its syndrome named no position (13..15). Combinational; the
// caller registers the result into the receive RAM.
module hamming_corrector
  import hdlc_edac_pkg::*;
(
  input  logic [DATA_BITS-1:0]   rx_data,      // received data field
  input  logic [PARITY_BITS-1:0] rx_parity,    // received parity field
  output logic [DATA_BITS-1:0]   data,         // corrected data, word 0 in MSB byte
  output logic [WORDS-1:0]       word_error,   // bit w: word w had a non-zero syndrome
  output logic [WORDS-1:0]       word_uncorr,  // bit w: word w syndrome named no position
  output logic [4*WORDS-1:0]     syndromes     // word w syndrome at [4*WORDS-1-4w -: 4]
);

  for (genvar w = 0; w < WORDS; w++) begin : g_dec
    word_t     d;
    parity_t   p;
    codeword_t cw;

    assign d = rx_data[DATA_BITS-1-w*WORD_W -: WORD_W];
    assign p = rx_parity[PARITY_BITS-1-w*PAR_W -: PAR_W];
    assign cw = {d[0], d[1], d[2], d[3], p[0], d[4], d[5], d[6], p[1], d[7], p[2], p[3]};

    hamming_dec u_dec (
      .codeword      (cw),
      .syndrome      (syndromes[4*WORDS-1-4*w -: 4]),
      .data          (data[DATA_BITS-1-w*WORD_W -: WORD_W]),
      .error         (word_error[w]),
      .uncorrectable (word_uncorr[w])
    );
  end

endmodule
