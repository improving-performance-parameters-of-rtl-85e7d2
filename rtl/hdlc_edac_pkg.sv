// Shared constants and types of the HDLC link with Hamming-protected payload.
//
// A frame is 122 bits long and is sent most significant bit first:
//   start flag (8) | address (8) | control (2) | data (64) | parity (32) | stop flag (8)
// The field widths, the 2-bit control field (00 by default) and the receive
// address x"01" follow the document. The flag value 01111110 is the standard
// HDLC flag and is this design's choice; the document only says "8 bits".
// Data word w (w = 0..7 of the 8x8 RAM) occupies data[63-8w -: 8], so word 0
// is sent first; its parity nibble {P3,P2,P1,P0} occupies parity[31-4w -: 4].
package hdlc_edac_pkg;

  localparam int unsigned WORDS       = 8;   // RAM depth (8x8 RAM)
  localparam int unsigned WORD_W      = 8;   // RAM word width
  localparam int unsigned PAR_W       = 4;   // Hamming parity bits per word
  localparam int unsigned CODE_W      = WORD_W + PAR_W; // 12-bit code word
  localparam int unsigned ADDR_W      = $clog2(WORDS);
  localparam int unsigned DATA_BITS   = WORDS * WORD_W;  // 64
  localparam int unsigned PARITY_BITS = WORDS * PAR_W;   // 32
  localparam int unsigned FRAME_BITS  = 8 + 8 + 2 + DATA_BITS + PARITY_BITS + 8; // 122

  localparam logic [7:0] HDLC_FLAG    = 8'b0111_1110;
  localparam logic [7:0] DEFAULT_ADDR = 8'h01;
  localparam logic [1:0] DEFAULT_CTRL = 2'b00;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [PAR_W-1:0]  parity_t;   // {P3,P2,P1,P0} = positions {1,2,4,8}
  typedef logic [CODE_W:1]   codeword_t; // index = bit position 1..12

  // Frame as it sits in the transmit shift register: bit 121 goes out first.
  typedef struct packed {
    logic [7:0]             start_flag;
    logic [7:0]             address;
    logic [1:0]             control;
    logic [DATA_BITS-1:0]   data;
    logic [PARITY_BITS-1:0] parity;
    logic [7:0]             stop_flag;
  } hdlc_frame_t;

endpackage
