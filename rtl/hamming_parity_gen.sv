// Transmit-side Hamming parity calculator with parity storage.
//
// Eight hamming_enc instances work on the eight RAM words in parallel. When
// `calc` is high the 32 parity bits are captured into the parity storage
// register on the rising clock edge; `parity` is that register, valid from
// the cycle after `calc`. Word w's nibble {P3,P2,P1,P0} sits at
// parity[31-4w -: 4], matching the data layout (word 0 most significant).
// The per-word (12,8) code and the parity storage follow the document; doing
// all eight words in one cycle is this design's choice.
module hamming_parity_gen
  import hdlc_edac_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   calc,   // capture parity of `data`
  input  logic [DATA_BITS-1:0]   data,   // RAM contents, word 0 in the MSB byte
  output logic [PARITY_BITS-1:0] parity  // parity storage
);

  logic [PARITY_BITS-1:0] parity_next;

  for (genvar w = 0; w < WORDS; w++) begin : g_enc
    codeword_t unused_cw;
    hamming_enc u_enc (
      .data     (data[DATA_BITS-1-w*WORD_W -: WORD_W]),
      .parity   (parity_next[PARITY_BITS-1-w*PAR_W -: PAR_W]),
      .codeword (unused_cw)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    parity <= '0;
    else if (calc) parity <= parity_next;
  end

endmodule
