// Test harness for one configuration of the pipelined FFT.
//
// Drives NF random symbols (plus one padding symbol that pushes the last
// one out of the pipeline) into fft_sdf, with or without random gaps in
// in_valid, and compares every output against a double-precision DFT of
// the same samples, scaled by 1/N, within TOL LSBs. It also checks that
// each symbol produces every subcarrier index once, that out_sop marks the
// first output of each symbol and, without gaps, that the first output
// is valid N-1+S cycles after the cycle in which the first sample is
// presented, S being the number of stages.
module fft_harness #(
  parameter int unsigned N    = 64,
  parameter int unsigned R    = 4,
  parameter int unsigned NF   = 3,
  parameter bit          GAPS = 1'b0,
  parameter int          TOL  = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DW = 16;
  localparam int NS = ($clog2(N) + $clog2(R) - 1) / $clog2(R);   // stages
  localparam real PI = 3.14159265358979323846;

  logic                 in_valid, out_valid, out_sop;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic [$clog2(N)-1:0] out_bin;

  fft_sdf #(.N(N), .RADIX(R), .DW(DW)) dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid, .out_re, .out_im, .out_bin, .out_sop
  );

  int   xr [NF+1][N];
  int   xi [NF+1][N];
  real  ref_re [NF][N];
  real  ref_im [NF][N];
  bit   seen [N];
  int   cyc, first_in_cyc, first_out_cyc, outs;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(24000)) - 12000;
        xi[f][n] = $signed($urandom_range(24000)) - 12000;
      end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        ref_re[f][k] = 0.0; ref_im[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * PI * real'((n * k) % N) / real'(N);
          ref_re[f][k] += (real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a)) / real'(N);
          ref_im[f][k] += (real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a)) / real'(N);
        end
      end
  end

  // Stimulus.
  initial begin
    in_valid = 1'b0; in_re = '0; in_im = '0;
    first_in_cyc = -1;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        while (GAPS && ($urandom_range(3) == 0)) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_re <= DW'(xr[f][n]);
        in_im <= DW'(xi[f][n]);
        if (first_in_cyc < 0) first_in_cyc = cyc + 1;
        @(posedge clk);
      end
    in_valid <= 1'b0;
  end

  // Checker.
  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; outs = 0; first_out_cyc = -1;
      foreach (seen[k]) seen[k] = 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (out_valid && outs < NF * N) begin
        int f, pos;
        real er, ei;
        f = outs / N; pos = outs % N;
        if (outs == 0) begin
          first_out_cyc = cyc;
          if (!GAPS) begin
            checks++;
            if (first_out_cyc - first_in_cyc != N - 1 + NS) begin
              failures++;
              $display("FFT N=%0d R=%0d latency %0d, expected %0d", N, R,
                       first_out_cyc - first_in_cyc, N - 1 + NS);
            end
          end
        end
        checks++;
        if (out_sop != (pos == 0)) begin
          failures++;
          $display("FFT N=%0d R=%0d sop wrong at output %0d", N, R, outs);
        end
        checks++;
        if (seen[out_bin]) begin
          failures++;
          $display("FFT N=%0d R=%0d bin %0d repeated in symbol %0d", N, R, out_bin, f);
        end
        seen[out_bin] = 1'b1;
        er = real'(out_re) - ref_re[f][out_bin];
        ei = real'(out_im) - ref_im[f][out_bin];
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 10)
            $display("FFT N=%0d R=%0d sym %0d bin %0d: got (%0d,%0d) ref (%f,%f)", N, R, f,
                     out_bin, out_re, out_im, ref_re[f][out_bin], ref_im[f][out_bin]);
        end
        if (pos == N - 1) foreach (seen[k]) seen[k] = 1'b0;
        outs++;
        if (outs == NF * N) done <= 1'b1;
      end
    end
  end
endmodule
