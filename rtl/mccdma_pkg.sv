// Shared constants and helper functions of the MC-CDMA receiver.
//
// Default sizes: a 64-point radix-4 FFT on 16-bit I/Q samples, four users
// decoded in parallel, one pilot symbol followed by eight data symbols.
// The FFT sizes and radices come from the receiver's design space
// (16/64/256 points, radix 4 or 8); word widths, user count and frame
// layout are this design's own choices.
//
// Functions:
//   walsh_chip(u, k)  - chip k of Walsh-Hadamard (Sylvester) code u:
//                       0 means +1, 1 means -1 (parity of u & k).
//   pilot_chip(k)     - BPSK pilot sign on subcarrier k, taken from the
//                       maximal-length sequence a[n+7] = a[n] ^ a[n+1]
//                       (x^7 + x + 1, state seeded with 1);
//                       0 means +1, 1 means -1.
//   digit_rev(v,n,b)  - FFT output position to subcarrier index: reverses the
//                       order of the b-bit digits of the n-bit value v.
package mccdma_pkg;

  localparam int unsigned DEF_N      = 64;  // FFT points = subcarriers = spreading factor
  localparam int unsigned DEF_RADIX  = 4;   // butterfly radix
  localparam int unsigned DEF_DW     = 16;  // I and Q sample width
  localparam int unsigned DEF_NU     = 4;   // users decoded in parallel
  localparam int unsigned DEF_DSYM   = 8;   // data symbols after each pilot symbol
  localparam int unsigned DEF_WLOG2  = 4;   // SNR window = 2**DEF_WLOG2 data symbols
  localparam int unsigned TWF        = 14;  // fraction bits of twiddle constants

  function automatic logic walsh_chip(input logic [15:0] u, input logic [15:0] k);
    return ^(u & k);
  endfunction

  function automatic logic pilot_chip(input int unsigned k);
    logic [6:0] s;
    logic       b;
    s = 7'd1;
    b = 1'b0;
    for (int unsigned i = 0; i <= k; i++) begin
      b = s[0];
      s = {s[0] ^ s[1], s[6:1]};
    end
    return b;
  endfunction

  // Output position -> subcarrier index of a DIF SDF FFT whose stages take
  // digits of b bits from the top of the n-bit position (the last digit may
  // be narrower when n is not a multiple of b) and place them from the
  // bottom of the index.
  function automatic logic [15:0] digit_rev(input logic [15:0] v, input int unsigned n,
                                            input int unsigned b);
    logic [15:0] r;
    int unsigned top, lo, w;
    r   = '0;
    top = n;
    lo  = 0;
    for (int unsigned d = 0; d < 16; d++) begin
      if (top > 0) begin
        w = (top >= b) ? b : top;
        for (int unsigned j = 0; j < 16; j++)
          if (j < w) r[lo + j] = v[top - w + j];
        top = top - w;
        lo  = lo + w;
      end
    end
    return r;
  endfunction

endpackage
