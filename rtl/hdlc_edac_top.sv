// HDLC link with Hamming (12,8) protection of an 8x8 RAM image.
//
// Transmit side: an 8x8 RAM written and read through w_tx/r_tx while
// tx_rx_en is low; a parity calculator that stores four Hamming parity bits
// per RAM word (32 bits); and a frame generator that sends the 122-bit frame
// {flag, address, control, 64 data, 32 parity, flag} MSB first when tx_rx_en
// is high. Receive side: a frame receiver on the same clock, a corrector
// that fixes one bit error in each of the eight 12-bit code words (up to
// eight per frame), and a second 8x8 RAM that takes the corrected words and
// can then be read and written through w_rx/r_rx while tx_rx_en is low.
// The structure follows the document's Fig. 1. Between the two sides the line
// passes through an XOR with `chan_err`, so a test can flip any frame bit in
// transit; this error-injection input is this design's addition.
// RAM access (both sides): write when w=1, r=0 and tx_rx_en=0; read when
// w=0, r=1 and tx_rx_en=0; read data appears on the next clock.
// Timing: with tx_rx_en high, parity is captured one cycle after it is seen,
// bits go out for 122 cycles, and the receive RAM holds the corrected data
// one cycle after the last bit, when rx_done rises.
module hdlc_edac_top
  import hdlc_edac_pkg::*;
#(
  parameter logic [7:0] RX_OWN_ADDR = DEFAULT_ADDR
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tx_rx_en,
  // transmit RAM
  input  logic                   w_tx,
  input  logic                   r_tx,
  input  logic [ADDR_W-1:0]      waddr_tx,
  input  logic [ADDR_W-1:0]      raddr_tx,
  input  logic [WORD_W-1:0]      din_tx,
  output logic [WORD_W-1:0]      dout_tx,
  // frame
  input  logic [7:0]             tx_addr,      // address sent in the frame
  input  logic                   chan_err,     // flips the line bit in this cycle
  output logic                   tx_line,      // transmitter output
  output logic [6:0]             tx_count,
  output logic                   tx_done,
  // receive RAM
  input  logic                   w_rx,
  input  logic                   r_rx,
  input  logic [ADDR_W-1:0]      waddr_rx,
  input  logic [ADDR_W-1:0]      raddr_rx,
  input  logic [WORD_W-1:0]      din_rx,
  output logic [WORD_W-1:0]      dout_rx,
  // receive status
  output logic [7:0]             rx_addr,      // address of the last good frame
  output logic [1:0]             rx_ctrl,      // control field of the last good frame
  output logic [6:0]             rx_count,
  output logic                   rx_done,      // corrected frame stored
  output logic                   rx_addr_err,  // pulse: frame for another address
  output logic                   rx_stop_err,  // pulse: bad stop flag, frame dropped
  output logic [WORDS-1:0]       rx_word_error,  // words corrected in the last frame
  output logic [WORDS-1:0]       rx_word_uncorr, // words whose syndrome named no bit
  output logic [PARITY_BITS-1:0] rx_syndromes    // syndrome {C3..C0} per word, word 0 first
);

  logic [DATA_BITS-1:0]   tx_ram_contents;
  logic [PARITY_BITS-1:0] tx_parity;
  logic                   tx_calc;
  logic                   tx_busy;
  logic                   line;

  logic [DATA_BITS-1:0]   rx_data;
  logic [PARITY_BITS-1:0] rx_parity;
  logic                   rx_frame_valid;
  logic [DATA_BITS-1:0]   rx_corrected;
  logic [WORDS-1:0]       dec_error;
  logic [WORDS-1:0]       dec_uncorr;
  logic [PARITY_BITS-1:0] dec_syndromes;

  // ---------------- transmitter ----------------
  ram8x8 #(.DEPTH(WORDS), .WIDTH(WORD_W)) u_ram_tx (
    .clk, .rst_n,
    .we        (w_tx && !r_tx && !tx_rx_en),
    .waddr     (waddr_tx),
    .wdata     (din_tx),
    .re        (r_tx && !w_tx && !tx_rx_en),
    .raddr     (raddr_tx),
    .rdata     (dout_tx),
    .load      (1'b0),
    .load_data ('0),
    .contents  (tx_ram_contents)
  );

  hamming_parity_gen u_pgen (
    .clk, .rst_n,
    .calc   (tx_calc),
    .data   (tx_ram_contents),
    .parity (tx_parity)
  );

  hdlc_frame_tx u_ftx (
    .clk, .rst_n,
    .tx_rx_en,
    .tx_addr,
    .data   (tx_ram_contents),
    .parity (tx_parity),
    .calc   (tx_calc),
    .tx     (tx_line),
    .busy   (tx_busy),
    .count  (tx_count),
    .done   (tx_done)
  );

  // ---------------- channel ----------------
  assign line = tx_line ^ (chan_err && tx_busy);

  // ---------------- receiver ----------------
  hdlc_frame_rx #(.OWN_ADDR(RX_OWN_ADDR)) u_frx (
    .clk, .rst_n,
    .en          (tx_rx_en),
    .rx          (line),
    .rx_addr     (rx_addr),
    .rx_ctrl     (rx_ctrl),
    .data        (rx_data),
    .parity      (rx_parity),
    .frame_valid (rx_frame_valid),
    .addr_err    (rx_addr_err),
    .stop_err    (rx_stop_err),
    .count       (rx_count)
  );

  hamming_corrector u_corr (
    .rx_data     (rx_data),
    .rx_parity   (rx_parity),
    .data        (rx_corrected),
    .word_error  (dec_error),
    .word_uncorr (dec_uncorr),
    .syndromes   (dec_syndromes)
  );

  // The corrector works on the receiver's held fields; its result is written
  // into the RAM in the cycle frame_valid is high.
  ram8x8 #(.DEPTH(WORDS), .WIDTH(WORD_W)) u_ram_rx (
    .clk, .rst_n,
    .we        (w_rx && !r_rx && !tx_rx_en),
    .waddr     (waddr_rx),
    .wdata     (din_rx),
    .re        (r_rx && !w_rx && !tx_rx_en),
    .raddr     (raddr_rx),
    .rdata     (dout_rx),
    .load      (rx_frame_valid),
    .load_data (rx_corrected),
    .contents  ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_done        <= 1'b0;
      rx_word_error  <= '0;
      rx_word_uncorr <= '0;
      rx_syndromes   <= '0;
    end else if (!tx_rx_en) begin
      rx_done <= 1'b0;
    end else if (rx_frame_valid) begin
      rx_done        <= 1'b1;
      rx_word_error  <= dec_error;
      rx_word_uncorr <= dec_uncorr;
      rx_syndromes   <= dec_syndromes;
    end
  end

endmodule
