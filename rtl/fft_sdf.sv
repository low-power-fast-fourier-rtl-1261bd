// Pipelined FFT of the MC-CDMA receiver: a chain of single-path
// delay-feedback (SDF) stages, decimation in frequency.
//
// An N-point transform with radix R uses floor(log_R(N)) stages of radix
// R, stage s with delay buffers of L = N / R^(s+1) words (see sdf_stage),
// and, when N is not a power of R, one last stage of the remaining radix
// (2 or 4) with L = 1. The receiver's design space is 16, 64 and 256 points
// with radix 4 or radix 8: radix 4 needs no extra stage; radix 8 uses
// 8x2 for 16 points, 8x8 for 64 and 8x8x4 for 256. Any power-of-two N of at
// least R is accepted. Each stage divides by its radix, so the output is
//   out[k] = (1/N) * sum_n in[n] * exp(-2*pi*i*n*k/N).
//
// Interface: time-domain samples in (in_re = DR, in_im = DI) one per valid
// cycle, N consecutive valid samples per symbol, the first sample after
// reset starting a symbol. Frequency-domain samples out (out_re = DOR,
// out_im = DOI) in digit-reversed order; out_bin gives the subcarrier
// index of each output and out_sop marks the first output of a symbol.
// Timing: streaming, one sample per cycle; the first output of a symbol
// is valid N-1+S cycles after the cycle in which the symbol's first
// sample is presented, S being the number of stages, when no gaps occur. Because the pipeline only moves on valid inputs, the last symbol
// of a burst comes out while the next symbol (or N padding samples) is
// fed in. The output index port and the scaling are this design's choices.
module fft_sdf
  import mccdma_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned RADIX = DEF_RADIX,
  parameter int unsigned DW    = DEF_DW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
  output logic                    out_valid,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic [$clog2(N)-1:0]    out_bin,
  output logic                    out_sop
);

  localparam int unsigned RW = $clog2(RADIX);
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned NF = NW / RW;              // full-radix stages
  localparam int unsigned RB = NW % RW;              // bits of the last, smaller radix
  localparam int unsigned NS = NF + ((RB > 0) ? 1 : 0);

  if ((RADIX != 4 && RADIX != 8) || (N != (1 << NW)) || (N < RADIX))
  begin : g_bad_size
    $error("fft_sdf: RADIX must be 4 or 8 and N a power of two not below RADIX");
  end

  logic                 v  [NS+1];
  logic signed [DW-1:0] re [NS+1];
  logic signed [DW-1:0] im [NS+1];

  assign v[0]  = in_valid;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    sdf_stage #(
      .R ((s < NF) ? RADIX : (1 << RB)),
      .L ((s < NF) ? (N >> (RW * (s + 1))) : 1),
      .DW(DW)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[s]),
      .in_re    (re[s]),
      .in_im    (im[s]),
      .out_valid(v[s+1]),
      .out_re   (re[s+1]),
      .out_im   (im[s+1])
    );
  end

  // Output position counter; the subcarrier index is its digit reversal.
  logic [NW-1:0] ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt <= '0;
    else if (v[NS]) ocnt <= ocnt + NW'(1);
  end

  assign out_valid = v[NS];
  assign out_re    = re[NS];
  assign out_im    = im[NS];
  assign out_bin   = NW'(digit_rev(16'(ocnt), NW, RW));
  assign out_sop   = (ocnt == '0);

endmodule
