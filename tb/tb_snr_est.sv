// Self-checking testbench of the SNR estimator.
//
// Sends windows of decision values +-A plus uniform noise for four users
// (A and the noise spread change from window to window, one window is
// noise-free) and checks sig_pow and noise_pow exactly against the moment
// estimator computed here, snr_db against 10*log10(sig_pow/noise_pow)
// within 0.4 dB, the noise-free window's saturated value, and that each
// result appears two clocks after the last value of its window.
module tb_snr_est;
  localparam int NU = 4, AW = 39, WLOG2 = 4, M = NU << WLOG2, NWIN = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0;
  logic signed [AW-1:0] in_acc [NU];
  logic                 out_valid;
  logic [2*AW-1:0]      sig_pow, noise_pow;
  logic signed [15:0]   snr_db;

  snr_est #(.NU(NU), .AW(AW), .WLOG2(WLOG2)) dut (.*);

  int     checks = 0, failures = 0, nres = 0, cyc = 0, last_cyc [NWIN];
  longint e_sp [NWIN], e_np [NWIN];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int amp [NWIN], spread [NWIN];
    amp    = '{400000, 900000, 50000, 1200000, 300000, 700000};
    spread = '{40000, 300000, 0, 6000, 100000, 1000};
    foreach (in_acc[u]) in_acc[u] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int w = 0; w < NWIN; w++) begin
      longint sa, sq, ma;
      sa = 0; sq = 0;
      for (int s = 0; s < (1 << WLOG2); s++) begin
        for (int u = 0; u < NU; u++) begin
          longint a;
          a = longint'(amp[w]) + longint'($urandom_range(2 * spread[w])) - spread[w];
          if ($urandom_range(1)) a = -a;
          in_acc[u] = AW'(a);
          sa += (a < 0) ? -a : a;
          sq += a * a;
        end
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        if (s == (1 << WLOG2) - 1) begin
          last_cyc[w] = cyc;  // number of the edge that took the last value
          ma = sa / M;
          e_sp[w] = ma * ma;
          e_np[w] = (sq / M > e_sp[w]) ? sq / M - e_sp[w] : 0;
        end
        repeat ($urandom_range(6)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (nres != NWIN) begin failures++; $display("%0d results, expected %0d", nres, NWIN); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 3;
      if (nres >= NWIN) begin
        failures++;
      end else begin
        if (cyc != last_cyc[nres] + 1) begin
          failures++; $display("window %0d result at cycle %0d, last input edge %0d", nres, cyc, last_cyc[nres]);
        end
        if (sig_pow != (2*AW)'(e_sp[nres]) || noise_pow != (2*AW)'(e_np[nres])) begin
          failures++; $display("window %0d: sig %0d noise %0d expected %0d %0d", nres, sig_pow, noise_pow, e_sp[nres], e_np[nres]);
        end
        if (e_np[nres] == 0) begin
          if (snr_db != 16'sh7fff) begin failures++; $display("window %0d: snr_db %0d, expected saturation", nres, snr_db); end
        end else begin
          real db;
          db = 10.0 * $log10(real'(e_sp[nres]) / real'(e_np[nres]));
          if (real'(snr_db) / 16.0 - db > 0.4 || db - real'(snr_db) / 16.0 > 0.4) begin
            failures++; $display("window %0d: snr_db %f expected %f", nres, real'(snr_db) / 16.0, db);
          end
        end
      end
      nres++;
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
