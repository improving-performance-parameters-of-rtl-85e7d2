// 8x8 RAM: eight words of eight bits, built from registers.
//
// User side (document, Fig. 1): a write port (we, waddr, wdata) and a read
// port (re, raddr, rdata). A write lands on the rising clock edge; a read
// registers mem[raddr] into rdata on the rising edge, so rdata is valid one
// cycle after re. Frame side: `contents` shows all words at once (word 0 in the
// most significant byte) for the transmit frame generator, and `load` writes
// all words at once from `load_data` for the receiver's corrected frame.
// `load` takes priority over a user write in the same cycle. Reset clears the
// array and rdata. The wide frame ports and the reset are this design's
// choices; the document gives only the size and the read/write controls.
module ram8x8 #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   re,
  input  logic [AW-1:0]          raddr,
  output logic [WIDTH-1:0]       rdata,
  input  logic                   load,
  input  logic [DEPTH*WIDTH-1:0] load_data,
  output logic [DEPTH*WIDTH-1:0] contents
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= load_data[(DEPTH-1-i)*WIDTH +: WIDTH];
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) contents[(DEPTH-1-i)*WIDTH +: WIDTH] = mem[i];
  end

endmodule
