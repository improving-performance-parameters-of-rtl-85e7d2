// Hamming (12,8) decoder: every data word with no error, every single-bit
// error (syndrome = position, data restored) and every double error
// (syndrome = XOR of the positions, uncorrectable when above 12), plus the
// document's examples (error in bit 2 -> 0010, bit 6 -> 0110).
// Example code words are written position 1 first and bit-reversed into the
// [12:1] vector with a streaming operator.
module tb_hamming_dec;
  import hdlc_edac_pkg::*;
  import hamming_ref_pkg::*;

  int checks = 0, failures = 0;
  codeword_t  codeword;
  logic [3:0] syndrome;
  word_t      data;
  logic       error, uncorrectable;

  hamming_dec dut (.codeword, .syndrome, .data, .error, .uncorrectable);

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
    codeword = {<<{12'b1011_0110_0011}}; #1;
    check(syndrome == 4'b0000 && !error && data == 8'b1011_0011, "example, no error");
    codeword = {<<{12'b1111_0110_0011}}; #1;
    check(syndrome == 4'b0010 && error && data == 8'b1011_0011, "example, error in bit 2");
    codeword = {<<{12'b1011_0010_0011}}; #1;
    check(syndrome == 4'b0110 && error && data == 8'b1011_0011, "example, error in bit 6");

    for (int v = 0; v < 256; v++) begin
      logic [12:1] good;
      good = ref_encode(8'(v));
      codeword = good; #1;
      check(syndrome == 0 && !error && !uncorrectable && data == 8'(v),
            $sformatf("clean word %h", v));
      for (int p = 1; p <= 12; p++) begin
        codeword = good;
        codeword[p] = ~codeword[p];
        #1;
        check(syndrome == 4'(p) && error && !uncorrectable && data == 8'(v),
              $sformatf("word %h error at %0d: syn %0d data %h", v, p, syndrome, data));
        for (int q = p + 1; q <= 12; q++) begin
          codeword = good;
          codeword[p] = ~codeword[p];
          codeword[q] = ~codeword[q];
          #1;
          check(syndrome == 4'(p ^ q) && error && (uncorrectable == ((p ^ q) > 12)),
                $sformatf("word %h errors at %0d,%0d", v, p, q));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
