// End-to-end test of the HDLC link at its default parameters.
// The transmit RAM is filled through w_tx and read back through r_tx; frames
// are sent with tx_rx_en, the testbench flips chosen frame bits on the line
// through chan_err, and the receive RAM is read back through r_rx and
// compared with what was written on the transmit side. Mechanisms counted
// (each must happen at least once): clean frame, single-bit correction in
// every word of one frame (eight errors), correction of a parity bit,
// address mismatch, bad stop flag, uncorrectable word (syndrome above 12),
// user write and read of the receive RAM. The cycle count from tx_rx_en to
// tx_done (125) and to rx_done (126) is checked on every frame.
module tb_hdlc_edac_top;
  import hamming_ref_pkg::*;

  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, tx_rx_en = 0;
  logic         w_tx = 0, r_tx = 0, w_rx = 0, r_rx = 0;
  logic [2:0]   waddr_tx = 0, raddr_tx = 0, waddr_rx = 0, raddr_rx = 0;
  logic [7:0]   din_tx = 0, din_rx = 0, dout_tx, dout_rx;
  logic [7:0]   tx_addr = 8'h01;
  logic         chan_err;
  logic         tx_line, tx_done, rx_done, rx_addr_err, rx_stop_err;
  logic [6:0]   tx_count, rx_count;
  logic [7:0]   rx_addr, rx_word_error, rx_word_uncorr;
  logic [1:0]   rx_ctrl;
  logic [31:0]  rx_syndromes;

  logic [121:0] flipmask = '0;   // frame bits to flip on the line (index 121 = first bit)

  hdlc_edac_top dut (.*);

  always #5 clk = ~clk;

  // Frame bit b is on the line while tx_count == 122 - b.
  assign chan_err = (tx_count != 0) && flipmask[7'd122 - tx_count];

  int n_clean = 0, n_corrected_bits = 0, n_full_frames = 0, n_parity_fix = 0;
  int n_addr_err = 0, n_stop_err = 0, n_uncorr = 0, n_rx_user = 0;

  logic [7:0] tx_img [8];  // what the transmit RAM holds
  logic [7:0] rx_img [8];  // what the receive RAM should hold

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] flat(input logic [7:0] img [8]);
    logic [63:0] f;
    for (int i = 0; i < 8; i++) f[63-8*i -: 8] = img[i];
    return f;
  endfunction

  task automatic write_tx(input int a, input logic [7:0] v);
    @(negedge clk) w_tx = 1; waddr_tx = 3'(a); din_tx = v;
    @(negedge clk) w_tx = 0;
    tx_img[a] = v;
  endtask

  task automatic read_tx(input int a, output logic [7:0] v);
    @(negedge clk) r_tx = 1; raddr_tx = 3'(a);
    @(negedge clk) r_tx = 0;
    v = dout_tx;
  endtask

  task automatic read_rx(input int a, output logic [7:0] v);
    @(negedge clk) r_rx = 1; raddr_rx = 3'(a);
    @(negedge clk) r_rx = 0;
    v = dout_rx;
  endtask

  task automatic check_rx_ram(input string what);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) begin
      read_rx(i, v);
      check(v == rx_img[i], $sformatf("%s: rx word %0d = %h, want %h", what, i, v, rx_img[i]));
    end
  endtask

  // Send one frame. expect_ok: the receiver should store it.
  task automatic send_frame(input logic [7:0] addr, input logic [121:0] flips,
                            input bit expect_ok, input string what);
    int cycles, tx_cycles, rx_cycles;
    bit saw_addr_err, saw_stop_err;
    tx_addr = addr;
    flipmask = flips;
    cycles = 0; tx_cycles = 0; rx_cycles = 0;
    saw_addr_err = 0; saw_stop_err = 0;
    @(negedge clk) tx_rx_en = 1;
    while (cycles < 160) begin
      @(posedge clk) #1;
      cycles++;
      if (tx_done && tx_cycles == 0) tx_cycles = cycles;
      if (rx_done && rx_cycles == 0) rx_cycles = cycles;
      if (rx_addr_err) saw_addr_err = 1;
      if (rx_stop_err) saw_stop_err = 1;
    end
    check(tx_cycles == 125, $sformatf("%s: tx_done after %0d cycles", what, tx_cycles));
    if (expect_ok) begin
      check(rx_done && rx_cycles == 126, $sformatf("%s: rx_done after %0d cycles", what, rx_cycles));
      check(rx_addr == addr, $sformatf("%s: received address %h", what, rx_addr));
      check(rx_ctrl == 2'b00, $sformatf("%s: received control %b", what, rx_ctrl));
    end else begin
      check(!rx_done, $sformatf("%s: frame must not be stored", what));
    end
    if (saw_addr_err) n_addr_err++;
    if (saw_stop_err) n_stop_err++;
    @(negedge clk) tx_rx_en = 0;
    flipmask = '0;
    @(negedge clk);
    check(!tx_done && !rx_done, "done flags clear with tx_rx_en low");
  endtask

  initial begin
    logic [7:0]   v;
    logic [121:0] flips;
    logic [7:0]   emask;
    logic [31:0]  esyn;
    int           pos [8];

    for (int i = 0; i < 8; i++) begin
      tx_img[i] = '0;
      rx_img[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. fill the transmit RAM and read it back; word 0 is the document's example
    write_tx(0, 8'b1011_0011);
    for (int i = 1; i < 8; i++) write_tx(i, 8'($urandom));
    for (int i = 0; i < 8; i++) begin
      read_tx(i, v);
      check(v == tx_img[i], $sformatf("tx RAM word %0d = %h, want %h", i, v, tx_img[i]));
    end

    // 2. clean frame
    send_frame(8'h01, '0, 1, "clean frame");
    check(rx_word_error == 0 && rx_word_uncorr == 0 && rx_syndromes == 0, "clean frame: no syndrome");
    for (int i = 0; i < 8; i++) rx_img[i] = tx_img[i];
    check_rx_ram("clean frame");
    n_clean++;

    // 3. eight errors, one in every word, then random error patterns
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 8; i++) write_tx(i, 8'($urandom));
      emask = (n == 0) ? 8'hFF : 8'($urandom);
      flips = '0;
      esyn = '0;
      for (int w = 0; w < 8; w++) begin
        pos[w] = (n == 1) ? 1 << (w % 4) : 1 + ($urandom % 12);  // frame 1: parity bits only
        if (emask[w]) begin
          flips[frame_bit_of(w, pos[w])] = 1'b1;
          esyn[31-4*w -: 4] = 4'(pos[w]);
        end
      end
      send_frame(8'h01, flips, 1, $sformatf("frame %0d with errors", n));
      check(rx_word_error == emask, $sformatf("frame %0d: error mask %b want %b", n, rx_word_error, emask));
      check(rx_syndromes == esyn, $sformatf("frame %0d: syndromes %h want %h", n, rx_syndromes, esyn));
      check(rx_word_uncorr == 0, "single errors are all correctable");
      for (int i = 0; i < 8; i++) rx_img[i] = tx_img[i];
      check_rx_ram($sformatf("frame %0d", n));
      for (int w = 0; w < 8; w++) begin
        if (emask[w]) begin
          n_corrected_bits++;
          if ((pos[w] & (pos[w] - 1)) == 0) n_parity_fix++;
        end
      end
      if (emask == 8'hFF) n_full_frames++;
    end

    // 4. frame for another station: dropped
    for (int i = 0; i < 8; i++) write_tx(i, 8'($urandom));
    send_frame(8'h5A, '0, 0, "foreign address");
    check_rx_ram("after foreign frame");

    // 5. corrupted stop flag: dropped
    flips = '0;
    flips[2] = 1'b1;
    send_frame(8'h01, flips, 0, "bad stop flag");
    check_rx_ram("after bad stop flag");

    // 6. two errors in word 5 at positions 7 and 9 give syndrome 14: left as received
    flips = '0;
    flips[frame_bit_of(5, 7)] = 1'b1;
    flips[frame_bit_of(5, 9)] = 1'b1;
    send_frame(8'h01, flips, 1, "double error");
    check(rx_word_uncorr == 8'b0010_0000 && rx_syndromes[31-20 -: 4] == 4'd14,
          $sformatf("double error flagged: uncorr %b", rx_word_uncorr));
    for (int i = 0; i < 8; i++) rx_img[i] = tx_img[i];
    rx_img[5][3] = ~rx_img[5][3];  // position 7 = data bit 4, position 9 = data bit 3
    rx_img[5][4] = ~rx_img[5][4];
    check_rx_ram("double error");
    if (rx_word_uncorr != 0) n_uncorr++;

    // 7. user access to the receive RAM
    @(negedge clk) w_rx = 1; waddr_rx = 3'd6; din_rx = 8'hC3;
    @(negedge clk) w_rx = 0;
    rx_img[6] = 8'hC3;
    check_rx_ram("receive RAM user write");
    n_rx_user++;

    $display("clean=%0d corrected_bits=%0d eight_error_frames=%0d parity_fixes=%0d addr_err=%0d stop_err=%0d uncorrectable=%0d rx_user=%0d",
             n_clean, n_corrected_bits, n_full_frames, n_parity_fix, n_addr_err, n_stop_err, n_uncorr, n_rx_user);
    check(n_clean > 0, "clean frame happened");
    check(n_corrected_bits > 0, "correction happened");
    check(n_full_frames > 0, "eight corrections in one frame happened");
    check(n_parity_fix > 0, "parity-bit correction happened");
    check(n_addr_err > 0, "address mismatch happened");
    check(n_stop_err > 0, "bad stop flag happened");
    check(n_uncorr > 0, "uncorrectable word happened");
    check(n_rx_user > 0, "receive RAM user access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
