// Frame corrector: random data words with their reference parity, and up to
// one flipped bit per 12-bit code word (data or parity, any position). All
// eight words must come back corrected, with the right error mask and
// syndromes. Also one word with two flipped bits whose syndrome names no
// position (uncorrectable) and one whose syndrome aliases to a position.
module tb_hamming_corrector;
  import hamming_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] rx_data, data;
  logic [31:0] rx_parity, syndromes;
  logic [7:0]  word_error, word_uncorr;

  hamming_corrector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  good;
    logic [121:0] fr;
    logic [7:0]   emask;
    logic [31:0]  esyn;
    int errs_fixed = 0;
    for (int n = 0; n < 500; n++) begin
      good = {$urandom, $urandom};
      fr = ref_frame(8'h01, 2'b00, good, ref_parity64(good));
      emask = (n == 0) ? 8'hFF : 8'($urandom);
      esyn = '0;
      for (int w = 0; w < 8; w++) begin
        if (emask[w]) begin
          int pos;
          pos = 1 + ($urandom % 12);
          fr[frame_bit_of(w, pos)] = ~fr[frame_bit_of(w, pos)];
          esyn[31-4*w -: 4] = 4'(pos);
          errs_fixed++;
        end
      end
      rx_data = fr[103:40];
      rx_parity = fr[39:8];
      #1;
      check(data == good, $sformatf("frame %0d corrected data %h want %h", n, data, good));
      check(word_error == emask, $sformatf("frame %0d error mask %b", n, word_error));
      check(syndromes == esyn, $sformatf("frame %0d syndromes %h want %h", n, syndromes, esyn));
      check(word_uncorr == 0, "no uncorrectable word");
    end
    // two errors in word 3 at positions 5 and 9: syndrome 12, miscorrected
    good = {$urandom, $urandom};
    fr = ref_frame(8'h01, 2'b00, good, ref_parity64(good));
    fr[frame_bit_of(3, 5)] = ~fr[frame_bit_of(3, 5)];
    fr[frame_bit_of(3, 9)] = ~fr[frame_bit_of(3, 9)];
    rx_data = fr[103:40]; rx_parity = fr[39:8]; #1;
    check(syndromes[31-12 -: 4] == 4'd12 && word_error == 8'b0000_1000 && word_uncorr == 0,
          "double error aliasing to position 12");
    // two errors in word 6 at positions 6 and 9: syndrome 15, uncorrectable
    fr = ref_frame(8'h01, 2'b00, good, ref_parity64(good));
    fr[frame_bit_of(6, 6)] = ~fr[frame_bit_of(6, 6)];
    fr[frame_bit_of(6, 9)] = ~fr[frame_bit_of(6, 9)];
    rx_data = fr[103:40]; rx_parity = fr[39:8]; #1;
    check(syndromes[31-24 -: 4] == 4'd15 && word_uncorr == 8'b0100_0000 &&
          data[63-48 -: 8] == fr[103-48 -: 8], "double error with syndrome 15 left as received");
    $display("corrected %0d single-bit errors", errs_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
