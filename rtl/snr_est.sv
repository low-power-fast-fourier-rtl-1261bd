// SNR module of the MC-CDMA receiver: estimates the signal-to-noise ratio
// of the combiner's decision statistics.
//
// Method (moment estimator for BPSK): over a window of M = NU * 2^WLOG2
// decision values a (NU users, 2^WLOG2 data symbols) it accumulates
// sum|a| and sum a^2. Then
//   sig_pow   = (sum|a| / M)^2          mean amplitude squared
//   noise_pow = sum a^2 / M - sig_pow   spread around it
// and snr_db ~ 10*log10(sig_pow / noise_pow) in signed Q8.4 (1/16 dB),
// using a piecewise-linear log2 (leading-one position plus the next four
// bits as fraction) and 10*log10(2) ~ 771/256; its error is below 0.3 dB.
// A noise power of zero reports the largest positive value.
// M is a power of two, so the two divisions are shifts. The estimate
// includes the interference between users that remains after combining.
//
// Interface: in_valid/in_acc take one symbol's NU decision values at a
// time (the combiner's out_valid/out_acc). out_valid pulses for one clock
// when a window closes, two clocks after its last input (one clock of
// accumulation, one of arithmetic); the window then restarts.
// The receiver includes an SNR module; the estimator, window and number
// format here are this design's choices.
module snr_est
  import mccdma_pkg::*;
#(
  parameter int unsigned NU    = DEF_NU,
  parameter int unsigned AW    = 2 * DEF_DW + 1 + $clog2(DEF_N),
  parameter int unsigned WLOG2 = DEF_WLOG2,
  localparam int unsigned PW   = 2 * AW          // power width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] in_acc [NU],
  output logic                 out_valid,
  output logic [PW-1:0]        sig_pow,
  output logic [PW-1:0]        noise_pow,
  output logic signed [15:0]   snr_db
);

  localparam int unsigned ML = $clog2(NU) + WLOG2;   // log2 of window size
  localparam int unsigned SAW = AW + ML;             // sum |a| width
  localparam int unsigned SQW = PW + ML;             // sum a^2 width
  localparam int unsigned LGW = $clog2(PW) + 5;      // log2 in Q.4, unsigned

  if (NU != (1 << $clog2(NU))) begin : g_bad_nu
    $error("snr_est: NU must be a power of two");
  end

  logic [SAW-1:0]   sum_abs;
  logic [SQW-1:0]   sum_sq;
  logic [WLOG2-1:0] wcnt;
  logic             close;      // window complete, compute next clock

  // Sums including the current input.
  logic [SAW-1:0] abs_nxt;
  logic [SQW-1:0] sq_nxt;
  always_comb begin
    abs_nxt = close ? '0 : sum_abs;    // a window restarts after closing
    sq_nxt  = close ? '0 : sum_sq;
    for (int unsigned u = 0; u < NU; u++) begin
      logic [AW-1:0] mag;
      mag     = in_acc[u][AW-1] ? AW'(-in_acc[u]) : AW'(in_acc[u]);
      abs_nxt = abs_nxt + SAW'(mag);
      sq_nxt  = sq_nxt + SQW'(PW'(mag) * PW'(mag));
    end
  end

  // Piecewise-linear log2 in Q.4.
  function automatic logic [LGW-1:0] log2_q4(input logic [PW-1:0] v);
    logic [LGW-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < PW; i++)
      if (v[i])   // four bits below the leading one form the fraction
        r = LGW'(i * 16) + LGW'(4'({v, 4'b0000} >> i));
    return r;
  endfunction

  logic [AW-1:0]       mean_abs;
  logic [PW-1:0]       mean_sq, sp, np;
  logic signed [LGW:0] dlog;
  logic signed [LGW+10:0] db_full;

  always_comb begin
    mean_abs = AW'(sum_abs >> ML);
    mean_sq  = PW'(sum_sq >> ML);
    sp       = PW'(mean_abs) * PW'(mean_abs);
    np       = (mean_sq > sp) ? mean_sq - sp : '0;
    dlog     = $signed({1'b0, log2_q4(sp)}) - $signed({1'b0, log2_q4(np)});
    db_full  = (LGW+11)'(dlog) * (LGW+11)'(771);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_abs   <= '0;
      sum_sq    <= '0;
      wcnt      <= '0;
      close     <= 1'b0;
      out_valid <= 1'b0;
      sig_pow   <= '0;
      noise_pow <= '0;
      snr_db    <= '0;
    end else begin
      out_valid <= close;
      close     <= 1'b0;
      if (close) begin
        sig_pow   <= sp;
        noise_pow <= np;
        snr_db    <= (np == '0) ? 16'sh7fff : 16'(db_full >>> 8);
        sum_abs   <= '0;
        sum_sq    <= '0;
      end
      if (in_valid) begin
        sum_abs <= abs_nxt;
        sum_sq  <= sq_nxt;
        wcnt    <= wcnt + WLOG2'(1);
        close   <= (wcnt == '1);
      end
    end
  end

endmodule
