// HDLC frame receiver (receive side).
//
// While `en` (tx_rx_en) is high the receiver samples `rx` on every rising
// clock edge. In HUNT it slides the last eight bits past the start flag
// 01111110. After the flag it takes the 8-bit address and compares it with
// OWN_ADDR (x"01" in the document); on a mismatch it pulses addr_err, lets
// the remaining bits of that frame go by unread and then hunts again, so that
// a flag pattern inside the foreign frame's data cannot start a false frame. It then lets the 2 control bits go by, collects the 64 data and
// 32 parity bits, and checks the 8-bit stop flag. With a good stop flag it
// holds the fields on its outputs and pulses frame_valid for one cycle, in the
// cycle after the last bit was sampled; with a bad one it pulses stop_err and
// drops the frame (the document gives no action for a bad stop flag). `count`
// is the number of frame bits taken so far (8 after the start flag, 122 at
// the end) and 0 while hunting. Bit stuffing is not used: the document's frame
// has fixed field lengths, so no flag can be mistaken inside it.
module hdlc_frame_rx
  import hdlc_edac_pkg::*;
#(
  parameter logic [7:0] OWN_ADDR = DEFAULT_ADDR
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   rx,
  output logic [7:0]             rx_addr,     // address field of the last good frame
  output logic [1:0]             rx_ctrl,     // control field of the last good frame
  output logic [DATA_BITS-1:0]   data,        // data field
  output logic [PARITY_BITS-1:0] parity,      // parity field
  output logic                   frame_valid, // one-cycle pulse: fields above are new
  output logic                   addr_err,    // one-cycle pulse: address mismatch
  output logic                   stop_err,    // one-cycle pulse: bad stop flag
  output logic [6:0]             count
);

  typedef enum logic [2:0] {R_HUNT, R_ADDRESS, R_CONTROL, R_DATA, R_PARITY, R_STOP, R_SKIP} rstate_t;

  localparam int unsigned BODY_BITS = FRAME_BITS - 8; // everything after the start flag

  rstate_t              state;
  logic [6:0]           flag_sr;   // last seven bits while hunting
  logic [BODY_BITS-2:0] body;      // bits after the start flag (the last one arrives in body_next)
  logic [BODY_BITS-1:0] body_next;
  logic [7:0]           flag_next;

  assign body_next = {body, rx};
  assign flag_next = {flag_sr, rx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= R_HUNT;
      flag_sr     <= 7'h7F;
      body        <= '0;
      count       <= '0;
      rx_addr     <= '0;
      rx_ctrl     <= '0;
      data        <= '0;
      parity      <= '0;
      frame_valid <= 1'b0;
      addr_err    <= 1'b0;
      stop_err    <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      addr_err    <= 1'b0;
      stop_err    <= 1'b0;
      if (!en) begin
        state   <= R_HUNT;
        flag_sr <= 7'h7F;
        count   <= '0;
      end else begin
        unique case (state)
          R_HUNT: begin
            flag_sr <= flag_next[6:0];
            if (flag_next == HDLC_FLAG) begin
              state <= R_ADDRESS;
              count <= 7'd8;
            end
          end
          R_ADDRESS: begin
            body  <= body_next[BODY_BITS-2:0];
            count <= count + 7'd1;
            if (count == 7'd15) begin
              if (body_next[7:0] == OWN_ADDR) begin
                state <= R_CONTROL;
              end else begin
                addr_err <= 1'b1;
                state    <= R_SKIP;
              end
            end
          end
          R_CONTROL: begin   // the 2-bit control field: a 2-bit delay
            body  <= body_next[BODY_BITS-2:0];
            count <= count + 7'd1;
            if (count == 7'd17) state <= R_DATA;
          end
          R_DATA: begin
            body  <= body_next[BODY_BITS-2:0];
            count <= count + 7'd1;
            if (count == 7'(17 + DATA_BITS)) state <= R_PARITY;
          end
          R_PARITY: begin
            body  <= body_next[BODY_BITS-2:0];
            count <= count + 7'd1;
            if (count == 7'(17 + DATA_BITS + PARITY_BITS)) state <= R_STOP;
          end
          R_STOP: begin
            body  <= body_next[BODY_BITS-2:0];
            count <= count + 7'd1;
            if (count == 7'(FRAME_BITS - 1)) begin
              if (body_next[7:0] == HDLC_FLAG) begin
                rx_addr     <= body_next[BODY_BITS-1 -: 8];
                rx_ctrl     <= body_next[BODY_BITS-9 -: 2];
                data        <= body_next[8 + PARITY_BITS +: DATA_BITS];
                parity      <= body_next[8 +: PARITY_BITS];
                frame_valid <= 1'b1;
              end else begin
                stop_err <= 1'b1;
              end
              state   <= R_HUNT;
              flag_sr <= 7'h7F;
              count   <= '0;
            end
          end
          R_SKIP: begin      // rest of a frame for another address
            count <= count + 7'd1;
            if (count == 7'(FRAME_BITS - 1)) begin
              state   <= R_HUNT;
              flag_sr <= 7'h7F;
              count   <= '0;
            end
          end
          default: state <= R_HUNT;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(frame_valid && (addr_err || stop_err)));

endmodule
