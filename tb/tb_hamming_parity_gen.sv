// Transmit parity calculator: the parity storage takes the parity of all
// eight words on the edge where calc is high, one cycle of latency, and keeps
// it while calc is low, even when the RAM image changes.
module tb_hamming_parity_gen;
  import hamming_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, calc = 0;
  logic [63:0] data = 0;
  logic [31:0] parity;

  hamming_parity_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_par;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(parity == 0, "parity storage cleared by reset");
    // document example word 10110011 -> parity 1010 in word 0
    @(negedge clk) data = {8'b1011_0011, 56'd0}; calc = 1;
    @(negedge clk) calc = 0;
    check(parity[31:28] == 4'b1010 && parity[27:0] == 0, $sformatf("example parity %h", parity));
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      data = {$urandom, $urandom};
      calc = 1;
      expect_par = ref_parity64(data);
      @(negedge clk);
      calc = 0;
      check(parity == expect_par, $sformatf("parity of %h: %h want %h", data, parity, expect_par));
      data = ~data;
      @(negedge clk);
      check(parity == expect_par, "parity storage holds without calc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
