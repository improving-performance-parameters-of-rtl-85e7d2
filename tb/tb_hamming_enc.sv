// Exhaustive check of the Hamming (12,8) encoder against the reference model,
// plus the worked example 10110011 -> 101101100011.
// Code words are written position 1 first, as in the document, and bit-
// reversed into the [12:1] vector with a streaming operator.
module tb_hamming_enc;
  import hdlc_edac_pkg::*;
  import hamming_ref_pkg::*;

  int checks = 0, failures = 0;
  word_t     data;
  parity_t   parity;
  codeword_t codeword;

  hamming_enc dut (.data, .parity, .codeword);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 8'b1011_0011;
    #1;
    check(codeword == {<<{12'b1011_0110_0011}}, $sformatf("example code word %b", codeword));
    check(parity == 4'b1010, $sformatf("example parity %b", parity));
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #1;
      check(codeword == ref_encode(data), $sformatf("code word of %h: %b", data, codeword));
      check(parity == ref_parity(data), $sformatf("parity of %h: %b", data, parity));
      check(ref_syndrome(codeword) == 4'd0, "code word is not even");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
