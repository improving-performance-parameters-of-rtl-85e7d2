// 8x8 RAM: reset contents, user writes and registered reads (one-cycle read
// latency), the all-words `contents` view, bulk `load` and its priority over
// a user write, all compared with a shadow array kept by the testbench.
module tb_ram8x8;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        we = 0, re = 0, load = 0;
  logic [2:0]  waddr = 0, raddr = 0;
  logic [7:0]  wdata = 0, rdata;
  logic [63:0] load_data = 0, contents;
  logic [7:0]  shadow [8];

  ram8x8 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [63:0] flat();
    logic [63:0] f;
    for (int i = 0; i < 8; i++) f[63-8*i -: 8] = shadow[i];
    return f;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(contents == 64'd0, "contents after reset");
    // write every word
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1; waddr = 3'(i); wdata = 8'($urandom);
      shadow[i] = wdata;
    end
    @(negedge clk) we = 0;
    check(contents == flat(), "contents after writes");
    // random reads and writes
    for (int n = 0; n < 300; n++) begin
      logic [2:0] ra;
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom);
      re = 1; ra = 3'($urandom); raddr = ra;
      @(posedge clk);
      #1;
      check(rdata == shadow[ra], $sformatf("read %0d got %h want %h", ra, rdata, shadow[ra]));
      if (we) shadow[waddr] = wdata;
      check(contents == flat(), "contents track writes");
    end
    // read data holds while re is low
    @(negedge clk) re = 1; we = 0; raddr = 3;
    @(negedge clk) re = 0; raddr = 5;
    @(negedge clk);
    check(rdata == shadow[3], "rdata holds with re low");
    // bulk load wins over a user write in the same cycle
    @(negedge clk);
    load = 1; load_data = {$urandom, $urandom};
    we = 1; waddr = 2; wdata = ~load_data[47:40];
    for (int i = 0; i < 8; i++) shadow[i] = load_data[63-8*i -: 8];
    @(negedge clk) load = 0; we = 0;
    check(contents == flat(), "bulk load, priority over write");
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) re = 1; raddr = 3'(i);
      @(posedge clk) #1;
      check(rdata == shadow[i], $sformatf("read after load word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
