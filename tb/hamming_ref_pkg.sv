// Reference model of the Hamming (12,8) code and of the 122-bit frame, used
// by the testbenches. It is written from the general rule rather than from
// the RTL's equations: data bits fill the non-power-of-two positions 3..12 in
// order, MSB first, and check bit i covers every position whose index has
// bit i set; the parity at position 2^i makes that group even.
package hamming_ref_pkg;

  function automatic logic [12:1] ref_encode(input logic [7:0] d);
    logic [12:1] c;
    int k;
    c = '0;
    k = 7;
    for (int p = 1; p <= 12; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k--;
      end
    end
    for (int i = 0; i < 4; i++) begin
      logic x;
      x = 1'b0;
      for (int p = 1; p <= 12; p++)
        if ((p >> i) & 1) x ^= c[p];
      c[1 << i] = x;  // the parity bit was 0 above, so x is its even-parity value
    end
    return c;
  endfunction

  // {P3,P2,P1,P0} = bits at positions {1,2,4,8}
  function automatic logic [3:0] ref_parity(input logic [7:0] d);
    logic [12:1] c;
    c = ref_encode(d);
    return {c[1], c[2], c[4], c[8]};
  endfunction

  function automatic logic [3:0] ref_syndrome(input logic [12:1] c);
    logic [3:0] s;
    s = '0;
    for (int p = 1; p <= 12; p++)
      if (c[p]) s ^= 4'(p);
    return s;
  endfunction

  function automatic logic [31:0] ref_parity64(input logic [63:0] d);
    logic [31:0] r;
    for (int w = 0; w < 8; w++) r[31-4*w -: 4] = ref_parity(d[63-8*w -: 8]);
    return r;
  endfunction

  // Frame bits, bit 121 sent first.
  function automatic logic [121:0] ref_frame(input logic [7:0] addr, input logic [1:0] ctrl,
                                             input logic [63:0] d, input logic [31:0] par);
    return {8'h7E, addr, ctrl, d, par, 8'h7E};
  endfunction

  // Frame bit index (121..0) of bit `pos` (1..12) of code word `w`.
  function automatic int frame_bit_of(input int w, input int pos);
    int k;
    if ((pos & (pos - 1)) == 0) begin
      // parity: position 1 -> P3 (nibble bit 3), 2 -> bit 2, 4 -> bit 1, 8 -> bit 0
      k = (pos == 1) ? 3 : (pos == 2) ? 2 : (pos == 4) ? 1 : 0;
      return 8 + (31 - 4*w) - (3 - k);
    end
    // data: position order 3,5,6,7,9,10,11,12 -> data bit 7..0
    case (pos)
      3: k = 7;  5: k = 6;  6: k = 5;  7: k = 4;
      9: k = 3; 10: k = 2; 11: k = 1; default: k = 0;
    endcase
    return 40 + (63 - 8*w) - (7 - k);
  endfunction

endpackage
