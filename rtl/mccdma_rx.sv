// MC-CDMA receiver for a wireless-sensor-network cluster head.
//
// Several sensor nodes transmit at the same time on the same band: each
// node's BPSK bit is spread over all N subcarriers of an OFDM symbol by
// that node's Walsh-Hadamard code, so the cluster head can separate the
// nodes without a time-slot schedule. The receiver is the two blocks of a
// classic MC-CDMA back end plus an SNR monitor:
//   fft_sdf  - pipelined SDF FFT, time domain to subcarriers
//   combiner - channel estimation on a pilot symbol, maximum-ratio
//              combining, despreading with each user's code, BPSK decision
//   snr_est  - SNR of the decision values over windows of symbols
//
// Interface: baseband I/Q samples after synchronisation and guard removal,
// one per valid cycle, N per symbol, the first after reset starting a
// frame of one pilot symbol and DSYM data symbols. code[u] selects the
// Walsh code of user u. Outputs: the FFT result (for monitoring), a pulse
// when the channel estimate is updated, one set of NU bits and decision
// values per data symbol, and an SNR report every 2^WLOG2 data symbols.
// Timing: without input gaps a data symbol's bits are valid 2N-1+S cycles
// after the cycle in which its first sample is presented (S FFT stages;
// 131 at the default). Since the FFT moves only on valid samples, the last
// symbol of a burst needs N more samples behind it (the next symbol or
// padding) to come out.
// The FFT and combiner structure follows the receiver's description; the
// frame format, codes, widths and SNR method are this design's choices.
module mccdma_rx
  import mccdma_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned RADIX = DEF_RADIX,
  parameter int unsigned DW    = DEF_DW,
  parameter int unsigned NU    = DEF_NU,
  parameter int unsigned DSYM  = DEF_DSYM,
  parameter int unsigned WLOG2 = DEF_WLOG2,
  localparam int unsigned NW   = $clog2(N),
  localparam int unsigned AW   = 2 * DW + 1 + NW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // time-domain input (DR, DI)
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  // user code selection
  input  logic [NW-1:0]        code      [NU],
  // FFT output (DOR, DOI)
  output logic                 fft_valid,
  output logic signed [DW-1:0] fft_re,
  output logic signed [DW-1:0] fft_im,
  output logic [NW-1:0]        fft_bin,
  // combiner
  output logic                 est_valid,
  output logic                 bits_valid,
  output logic [NU-1:0]        bits,
  output logic signed [AW-1:0] acc       [NU],
  // SNR
  output logic                 snr_valid,
  output logic [2*AW-1:0]      sig_pow,
  output logic [2*AW-1:0]      noise_pow,
  output logic signed [15:0]   snr_db
);

  logic fft_sop;

  fft_sdf #(.N(N), .RADIX(RADIX), .DW(DW)) u_fft (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(fft_valid), .out_re(fft_re), .out_im(fft_im),
    .out_bin(fft_bin), .out_sop(fft_sop)
  );

  combiner #(.N(N), .DW(DW), .NU(NU), .DSYM(DSYM)) u_comb (
    .clk, .rst_n,
    .in_valid(fft_valid), .in_re(fft_re), .in_im(fft_im),
    .in_bin(fft_bin), .in_sop(fft_sop), .code,
    .est_valid, .out_valid(bits_valid), .out_acc(acc), .out_bits(bits)
  );

  snr_est #(.NU(NU), .AW(AW), .WLOG2(WLOG2)) u_snr (
    .clk, .rst_n, .in_valid(bits_valid), .in_acc(acc),
    .out_valid(snr_valid), .sig_pow, .noise_pow, .snr_db
  );

endmodule
