// HDLC frame generator (transmit side).
//
// While tx_rx_en is low the generator idles with its counter at 0 and the
// line at 1. When tx_rx_en goes high it first pulses `calc` for one cycle so
// the Hamming parity storage captures the parity of the RAM, then loads the
// 122-bit frame {flag, tx_addr, control 00, data, parity, flag} into a shift
// register and sends it MSB first, one bit per clock, while `count` runs
// 1..122 (document: "count > 0 and count <= 122: transmit"). After bit 122
// the counter returns to 0 and `done` goes high. `done` stays high, and no
// further frame is sent, until tx_rx_en goes low; dropping tx_rx_en in the
// middle of a frame abandons it. These last two rules are this design's
// choice.
// Timing: calc in the cycle after tx_rx_en is seen, first bit two cycles
// after that; frame bit k (k = 1..122) is on `tx` in the cycle with count == k.
module hdlc_frame_tx
  import hdlc_edac_pkg::*;
#(
  parameter logic [1:0] CONTROL = DEFAULT_CTRL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tx_rx_en,
  input  logic [7:0]             tx_addr,  // address field of the frame
  input  logic [DATA_BITS-1:0]   data,     // RAM contents, word 0 in MSB byte
  input  logic [PARITY_BITS-1:0] parity,   // parity storage
  output logic                   calc,     // capture parity of RAM this cycle
  output logic                   tx,       // serial line
  output logic                   busy,     // frame bits on the line
  output logic [6:0]             count,    // 0 idle, 1..122 bit being sent
  output logic                   done      // frame sent
);

  typedef enum logic [2:0] {S_IDLE, S_CALC, S_LOAD, S_SEND, S_DONE} state_t;

  state_t      state;
  hdlc_frame_t shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      shreg <= '0;
      count <= '0;
      done  <= 1'b0;
    end else if (!tx_rx_en) begin
      state <= S_IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: state <= S_CALC;
        S_CALC: state <= S_LOAD;
        S_LOAD: begin
          shreg <= '{start_flag: HDLC_FLAG, address: tx_addr, control: CONTROL,
                     data: data, parity: parity, stop_flag: HDLC_FLAG};
          count <= 7'd1;
          state <= S_SEND;
        end
        S_SEND: begin
          shreg <= shreg << 1;
          if (count == 7'(FRAME_BITS)) begin
            count <= '0;
            done  <= 1'b1;
            state <= S_DONE;
          end else begin
            count <= count + 7'd1;
          end
        end
        S_DONE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign calc = (state == S_CALC);
  assign busy = (state == S_SEND);
  assign tx   = busy ? shreg[FRAME_BITS-1] : 1'b1;

  // The counter only runs while bits are being sent.
  assert property (@(posedge clk) disable iff (!rst_n) (count != 0) |-> busy);
  assert property (@(posedge clk) disable iff (!rst_n) count <= 7'(FRAME_BITS));

endmodule
