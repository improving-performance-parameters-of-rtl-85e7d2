// HDLC frame receiver: frames are serialized by the testbench, MSB first,
// separated by idle ones and near-flag patterns. Good frames must raise
// frame_valid right after the edge that samples the last bit, with the
// fields intact; a frame for another address must raise addr_err and nothing
// else; a bad stop flag must raise stop_err; a frame cut by en going low must
// produce nothing, and the next frame must still be received.
module tb_hdlc_frame_rx;
  import hamming_ref_pkg::*;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, en = 0, rx = 1;
  logic [7:0]   rx_addr;
  logic [1:0]   rx_ctrl;
  logic [63:0]  data;
  logic [31:0]  parity;
  logic         frame_valid, addr_err, stop_err;
  logic [6:0]   count;
  int n_valid = 0, n_addr_err = 0, n_stop_err = 0;

  hdlc_frame_rx dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (frame_valid) n_valid++;
    if (addr_err) n_addr_err++;
    if (stop_err) n_stop_err++;
  end

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

  // Drive `nbits` bits of `bits` (from bit nbits-1 down) one per clock.
  task automatic send(input logic [121:0] bits, input int nbits);
    for (int i = nbits - 1; i >= 0; i--) begin
      @(negedge clk) rx = bits[i];
    end
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) @(negedge clk) rx = 1;
    // a pattern close to the flag that must not start a frame
    send(122'b0111_1111_0011_1110, 16);
    @(negedge clk) rx = 1;
  endtask

  initial begin
    logic [121:0] fr;
    logic [63:0]  d;
    logic [31:0]  p;
    int v0, a0, s0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    en = 1;
    for (int n = 0; n < 20; n++) begin
      int kind;
      kind = (n < 3) ? n : $urandom % 3;  // 0 good, 1 wrong address, 2 bad stop
      d = {$urandom, $urandom};
      p = $urandom;
      fr = ref_frame((kind == 1) ? 8'h02 + 8'($urandom % 200) : 8'h01, 2'($urandom), d, p);
      if (kind == 2) fr[3] = ~fr[3];
      idle(1 + $urandom % 5);
      v0 = n_valid; a0 = n_addr_err; s0 = n_stop_err;
      send(fr, 122);
      @(posedge clk) #1;
      check(frame_valid == (kind == 0), $sformatf("frame %0d: frame_valid right after the last bit", n));
      check(stop_err == (kind == 2), $sformatf("frame %0d: stop_err right after the last bit", n));
      @(posedge clk) #1;  // the event counters have now seen the pulses
      if (kind == 1) begin
        check(n_addr_err == a0 + 1 && n_valid == v0 && n_stop_err == s0, $sformatf("frame %0d: address mismatch", n));
      end else if (kind == 2) begin
        check(n_stop_err == s0 + 1 && n_valid == v0, $sformatf("frame %0d: bad stop flag", n));
      end else begin
        check(n_valid == v0 + 1 && n_addr_err == a0 && n_stop_err == s0,
              $sformatf("frame %0d: exactly one frame_valid", n));
        check(data == d && parity == p && rx_addr == 8'h01 && rx_ctrl == fr[105:104],
              $sformatf("frame %0d: fields", n));
      end
      check(count == 0, "receiver back to hunting");
    end
    // en dropped in the middle of a frame: nothing comes out
    v0 = n_valid;
    d = {$urandom, $urandom};
    fr = ref_frame(8'h01, 2'b00, d, 32'h1234_5678);
    idle(3);
    send(fr, 60);
    @(negedge clk) en = 0;
    send(fr, 62);
    @(negedge clk) en = 1;
    check(n_valid == v0 && count == 0, "frame cut by en is dropped");
    idle(2);
    send(fr, 122);
    @(posedge clk) #1;
    check(frame_valid && data == d && parity == 32'h1234_5678, "frame after the cut one");
    $display("valid=%0d addr_err=%0d stop_err=%0d", n_valid, n_addr_err, n_stop_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
