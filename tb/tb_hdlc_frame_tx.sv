// HDLC frame generator: one calc pulse, then the 122 frame bits MSB first
// with count running 1..122, then done. Checks every bit against the
// reference frame, the counter value of every bit, the cycle count from
// tx_rx_en to done (125: calc, load, 122 bits, plus the edge that samples tx_rx_en), that no second frame starts while tx_rx_en stays
// high, that a new frame follows a low-high cycle of tx_rx_en, and that
// dropping tx_rx_en mid-frame stops the line.
module tb_hdlc_frame_tx;
  import hamming_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, tx_rx_en = 0;
  logic [7:0]  tx_addr = 0;
  logic [63:0] data = 0;
  logic [31:0] parity = 0;
  logic        calc, tx, busy, done;
  logic [6:0]  count;

  hdlc_frame_tx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(input int n);
    logic [121:0] want, got;
    int cycles, calcs, nbits;
    tx_addr = 8'($urandom);
    data    = {$urandom, $urandom};
    parity  = $urandom;
    want    = ref_frame(tx_addr, 2'b00, data, parity);
    cycles = 0; calcs = 0; nbits = 0;
    @(negedge clk) tx_rx_en = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
      if (calc) calcs++;
      if (busy) begin
        check(count == 7'(nbits + 1), $sformatf("frame %0d bit %0d count %0d", n, nbits + 1, count));
        got[121 - nbits] = tx;
        nbits++;
      end else begin
        check(tx == 1'b1, "line idles at 1");
      end
      #1;
    end
    check(nbits == 122, $sformatf("frame %0d has %0d bits", n, nbits));
    check(got == want, $sformatf("frame %0d bits %h want %h", n, got, want));
    check(calcs == 1, $sformatf("frame %0d calc pulses %0d", n, calcs));
    check(cycles == 125, $sformatf("frame %0d took %0d cycles", n, cycles));
    check(count == 0, "counter back to 0 after frame");
    // no second frame while tx_rx_en stays high
    repeat (150) begin
      @(posedge clk) #1;
      check(!busy && done && tx, "idle with done while tx_rx_en stays high");
    end
    @(negedge clk) tx_rx_en = 0;
    @(negedge clk);
    check(!done, "done cleared when tx_rx_en drops");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send_and_check(0);
    send_and_check(1);
    // abort in the middle
    @(negedge clk) tx_rx_en = 1;
    repeat (40) @(negedge clk);
    check(busy, "busy mid-frame");
    tx_rx_en = 0;
    @(negedge clk);
    check(!busy && count == 0 && tx && !done, "abandoned frame leaves line idle");
    send_and_check(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
