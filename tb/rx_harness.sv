// End-to-end harness of the MC-CDMA receiver for one FFT configuration.
//
// Same transmitter, channel and checks as tb_mccdma_rx, for a receiver
// built with N points and radix R. The subcarrier amplitudes are scaled by
// 8/sqrt(N) so that the time-domain samples keep the same level at every
// size, and the user codes are {3, 10, 21, 44} masked to N-1 bits.
// Reports done, checks and failures to its parent.
module rx_harness #(
  parameter int unsigned N = 16,
  parameter int unsigned R = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import mccdma_pkg::*;
  localparam int DW = DEF_DW, NU = DEF_NU;
  localparam real AMP = 8.0 / $sqrt(real'(N));
  localparam int DSYM = DEF_DSYM, WLOG2 = DEF_WLOG2, NFR = 4;
  localparam int NW = $clog2(N), AW = 2 * DW + 1 + NW, NS = (NW + $clog2(R) - 1) / $clog2(R);
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [NW-1:0]        code [NU];
  logic                 fft_valid, est_valid, bits_valid, snr_valid;
  logic signed [DW-1:0] fft_re, fft_im;
  logic [NW-1:0]        fft_bin;
  logic [NU-1:0]        bits;
  logic signed [AW-1:0] acc [NU];
  logic [2*AW-1:0]      sig_pow, noise_pow;
  logic signed [15:0]   snr_db;

  mccdma_rx #(.N(N), .RADIX(R)) dut (.*);

  int  cyc = 0;
  int  n_est = 0, n_sym = 0, n_snr = 0, n_gap = 0, n_zero = 0, n_one = 0;
  int  first_in = -1, first_out = -1;
  bit  sent [NFR*DSYM][NU];
  int  code_i [NU] = '{3 & (N - 1), 10 & (N - 1), 21 & (N - 1), 44 & (N - 1)};

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sgn(input bit b);
    return b ? -1 : 1;
  endfunction

  bit pil [N];
  initial begin
    bit a [N+7];
    for (int i = 0; i < 7; i++) a[i] = (i == 0);
    for (int i = 0; i < N; i++) a[i+7] = a[i] ^ a[i+1];
    for (int i = 0; i < N; i++) pil[i] = a[i];
  end

  // Sends one symbol whose subcarrier values are (fr, fi).
  task automatic send_symbol(input real fr [N], input real fi [N]);
    for (int n = 0; n < N; n++) begin
      real xr, xi;
      xr = 0.0; xi = 0.0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = 2.0 * PI * real'((n * k) % N) / real'(N);
        xr += fr[k] * $cos(a) - fi[k] * $sin(a);
        xi += fr[k] * $sin(a) + fi[k] * $cos(a);
      end
      xr += real'($urandom_range(4)) - 2.0;
      xi += real'($urandom_range(4)) - 2.0;
      if (first_out >= 0 && $urandom_range(15) == 0) begin
        in_valid = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_re = DW'($rtoi(xr + (xr < 0 ? -0.5 : 0.5)));
      in_im = DW'($rtoi(xi + (xi < 0 ? -0.5 : 0.5)));
      if (first_in < 0) first_in = cyc;     // cycle in which the first sample is presented
      @(negedge clk);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (code[u]) code[u] = NW'(code_i[u]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f <= NFR; f++) begin
      real hr [N], hi [N], fr [N], fi [N];
      real g, cph;
      g = 2.0 * PI * real'($urandom_range(999)) / 1000.0;
      cph = 2.0 * PI * real'($urandom_range(999)) / 1000.0;
      for (int k = 0; k < N; k++) begin
        real tr, ti, a;
        a = -2.0 * PI * real'(k) / real'(N);
        tr = 1.0 + 0.2 * $cos(g + a);
        ti = 0.2 * $sin(g + a);
        hr[k] = tr * $cos(cph) - ti * $sin(cph);
        hi[k] = tr * $sin(cph) + ti * $cos(cph);
        fr[k] = AMP * 512.0 * sgn(pil[k]) * hr[k];
        fi[k] = AMP * 512.0 * sgn(pil[k]) * hi[k];
      end
      send_symbol(fr, fi);
      if (f == NFR) break;                 // padding symbol only
      for (int s = 0; s < DSYM; s++) begin
        for (int u = 0; u < NU; u++) sent[f*DSYM+s][u] = bit'($urandom_range(1));
        for (int k = 0; k < N; k++) begin
          int sum;
          sum = 0;
          for (int u = 0; u < NU; u++)
            sum += sgn(sent[f*DSYM+s][u]) * sgn(bit'($countones(code_i[u] & k) % 2));
          fr[k] = AMP * 200.0 * sum * hr[k];
          fi[k] = AMP * 200.0 * sum * hi[k];
        end
        send_symbol(fr, fi);
      end
    end
    in_valid = 1'b0;
    repeat (8) @(negedge clk);

    checks++;
    if (first_out - first_in != N - 1 + NS) begin
      failures++; $display("FFT latency %0d, expected %0d", first_out - first_in, N - 1 + NS);
    end
    checks++;
    if (n_est != NFR) begin failures++; $display("%0d channel estimates, expected %0d", n_est, NFR); end
    checks++;
    if (n_sym != NFR * DSYM) begin failures++; $display("%0d data symbols, expected %0d", n_sym, NFR * DSYM); end
    checks++;
    if (n_snr != NFR * DSYM / (1 << WLOG2)) begin failures++; $display("%0d SNR reports", n_snr); end
    $display("N=%0d R=%0d mechanisms: estimates=%0d data_symbols=%0d snr_reports=%0d input_gaps=%0d zeros=%0d ones=%0d",
             N, R, n_est, n_sym, n_snr, n_gap, n_zero, n_one);
    checks += 6;
    if (n_est == 0)  begin failures++; $display("channel estimation never happened"); end
    if (n_sym == 0)  begin failures++; $display("no data symbol decoded"); end
    if (n_snr == 0)  begin failures++; $display("no SNR report"); end
    if (n_gap == 0)  begin failures++; $display("no input gap"); end
    if (n_zero == 0) begin failures++; $display("no bit decided as 0"); end
    if (n_one == 0)  begin failures++; $display("no bit decided as 1"); end
    done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (fft_valid && first_out < 0) first_out = cyc;
      if (est_valid) n_est++;
      if (bits_valid) begin
        for (int u = 0; u < NU; u++) begin
          checks++;
          if (n_sym >= NFR * DSYM || bits[u] != sent[n_sym][u]) begin
            failures++; $display("symbol %0d user %0d: bit %0d acc %0d", n_sym, u, bits[u], acc[u]);
          end
          if (bits[u]) n_one++; else n_zero++;
        end
        n_sym++;
      end
      if (snr_valid) begin
        n_snr++;
        checks++;
        $display("N=%0d R=%0d SNR report %0d: %0.2f dB", N, R, n_snr, real'(snr_db) / 16.0);
        if (snr_db < 16'sd320) begin failures++; $display("SNR below 20 dB"); end
      end
    end
  end

endmodule
