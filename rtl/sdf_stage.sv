// One stage of a single-path delay-feedback (SDF) pipelined FFT,
// decimation in frequency, radix R (4 or 8).
//
// The stage splits each block of R*L consecutive input samples into R
// groups of L (x_p[j] = in[p*L + j]) and produces
//   y_q[j] = (1/R) * sum_p x_p[j] * W_R^(p*q) * W_(R*L)^(q*j),
// emitting y_0 for all j, then y_1, ..., y_(R-1): the R sub-transforms of
// size L that the next stage works on.
//
// How it works: R-1 delay buffers of L words each, addressed by the
// position j inside a group. During phases 0..R-2 the incoming sample is
// written to buffer p while the word it replaces (a result y_(p+1) left
// over from the previous block) goes out. In phase R-1 the R-point
// butterfly combines the R-1 buffered samples with the current one; y_0
// goes out at once and y_1..y_(R-1) are written back into the buffers.
// A single complex multiplier applies the twiddle W_(R*L)^(q*j) on the way
// out. The butterfly divides by R (rounded), so the whole FFT computes
// X[k]/N and cannot grow while |re|,|im| of the input stay below 2^(DW-2).
//
// Interface: one sample per cycle when in_valid is high; the stage only
// moves on valid cycles (a gap in in_valid stalls it). out_* is registered.
// Timing: the output of input block b appears (R-1)*L valid samples plus
// one clock after its first sample; out_valid stays low until the first
// butterfly phase so that the start-up contents of the buffers never leave.
// Word widths, rounding and scaling are this design's choices.
module sdf_stage
  import mccdma_pkg::*;
#(
  parameter int unsigned R  = 4,   // radix
  parameter int unsigned L  = 16,  // group length (delay buffer depth)
  parameter int unsigned DW = 16   // I/Q width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);

  localparam int unsigned RW = $clog2(R);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned CW = TWF + 2;             // constant width, holds +1.0
  localparam int unsigned PW = DW + CW + RW + 1;    // accumulator width

  typedef logic signed [CW-1:0] cst_t;
  typedef cst_t bf_tab_t [R*R];
  typedef cst_t tw_tab_t [R*L];

  // W_R^m and W_(R*L)^m = exp(-2*pi*i*m/M), scaled by 2^TWF (exact for 0, +-1).
  function automatic cst_t cst_cos(input int unsigned m, input int unsigned M);
    return cst_t'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * m / M) * (2.0 ** TWF) + 0.5)));
  endfunction
  function automatic cst_t cst_nsin(input int unsigned m, input int unsigned M);
    return cst_t'($rtoi($floor(-$sin(2.0 * 3.14159265358979323846 * m / M) * (2.0 ** TWF) + 0.5)));
  endfunction
  function automatic bf_tab_t mk_bf_re();
    bf_tab_t t;
    for (int unsigned i = 0; i < R * R; i++) t[i] = cst_cos((i / R) * (i % R) % R, R);
    return t;
  endfunction
  function automatic bf_tab_t mk_bf_im();
    bf_tab_t t;
    for (int unsigned i = 0; i < R * R; i++) t[i] = cst_nsin((i / R) * (i % R) % R, R);
    return t;
  endfunction
  function automatic tw_tab_t mk_tw_re();
    tw_tab_t t;
    for (int unsigned i = 0; i < R * L; i++) t[i] = cst_cos(i, R * L);
    return t;
  endfunction
  function automatic tw_tab_t mk_tw_im();
    tw_tab_t t;
    for (int unsigned i = 0; i < R * L; i++) t[i] = cst_nsin(i, R * L);
    return t;
  endfunction

  localparam bf_tab_t BF_RE = mk_bf_re();  // index p*R + q
  localparam bf_tab_t BF_IM = mk_bf_im();
  localparam tw_tab_t TW_RE = mk_tw_re();  // index q*j
  localparam tw_tab_t TW_IM = mk_tw_im();

  logic signed [DW-1:0] buf_re [R-1][L];
  logic signed [DW-1:0] buf_im [R-1][L];

  logic [LW-1:0] j;
  logic [RW-1:0] ph;
  logic          primed;
  logic          bfly;

  assign bfly = (ph == RW'(R - 1));

  // Rounded arithmetic right shift.
  function automatic logic signed [PW-1:0] rshr(input logic signed [PW-1:0] v,
                                                input int unsigned sh);
    return (v + (PW'(1) <<< (sh - 1))) >>> sh;
  endfunction

  logic signed [DW-1:0] y_re [R];
  logic signed [DW-1:0] y_im [R];

  // R-point butterfly over the buffered samples and the current input.
  always_comb begin
    logic signed [DW-1:0] xr, xi;
    logic signed [PW-1:0] acc_re, acc_im;
    for (int unsigned q = 0; q < R; q++) begin
      acc_re = '0;
      acc_im = '0;
      for (int unsigned p = 0; p < R; p++) begin
        if (p == R - 1) begin
          xr = in_re;
          xi = in_im;
        end else begin
          xr = buf_re[p][j];
          xi = buf_im[p][j];
        end
        acc_re += PW'(xr) * PW'(BF_RE[p*R+q]) - PW'(xi) * PW'(BF_IM[p*R+q]);
        acc_im += PW'(xr) * PW'(BF_IM[p*R+q]) + PW'(xi) * PW'(BF_RE[p*R+q]);
      end
      y_re[q] = DW'(rshr(acc_re, TWF + RW));
      y_im[q] = DW'(rshr(acc_im, TWF + RW));
    end
  end

  // Output selection and twiddle multiplication.
  logic signed [DW-1:0]  pre_re, pre_im;
  logic [RW-1:0]         q_out;
  localparam int unsigned TIW = $clog2(R*L);
  logic [TIW-1:0]        tw_idx;
  logic signed [PW-1:0]  tw_re_prod, tw_im_prod;

  always_comb begin
    if (bfly) begin
      pre_re = y_re[0];
      pre_im = y_im[0];
      q_out  = '0;
    end else begin
      pre_re = buf_re[ph][j];
      pre_im = buf_im[ph][j];
      q_out  = ph + RW'(1);
    end
    tw_idx = TIW'(q_out) * TIW'(j);
    tw_re_prod = PW'(pre_re) * PW'(TW_RE[tw_idx]) - PW'(pre_im) * PW'(TW_IM[tw_idx]);
    tw_im_prod = PW'(pre_re) * PW'(TW_IM[tw_idx]) + PW'(pre_im) * PW'(TW_RE[tw_idx]);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (bfly) begin
        for (int unsigned q = 1; q < R; q++) begin
          buf_re[q-1][j] <= y_re[q];
          buf_im[q-1][j] <= y_im[q];
        end
      end else begin
        buf_re[ph][j] <= in_re;
        buf_im[ph][j] <= in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j         <= '0;
      ph        <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && (primed || bfly);
      if (in_valid) begin
        out_re <= DW'(rshr(tw_re_prod, TWF));
        out_im <= DW'(rshr(tw_im_prod, TWF));
        if (bfly) primed <= 1'b1;
        if (j == LW'(L - 1)) begin
          j  <= '0;
          ph <= (ph == RW'(R - 1)) ? '0 : ph + RW'(1);
        end else begin
          j <= j + LW'(1);
        end
      end
    end
  end

endmodule
