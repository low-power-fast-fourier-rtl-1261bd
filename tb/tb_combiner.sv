// Self-checking testbench of the combiner.
//
// Feeds frequency-domain symbols straight into the combiner: per frame a
// random channel (|H| between 0.7 and 1, any phase), one pilot symbol and
// DSYM data symbols carrying four users' Walsh-spread BPSK bits plus a
// little noise, subcarriers in a scrambled order. The expected decision
// statistics are computed here in 64-bit integers from the values sent;
// the decided bits must equal the bits sent, out_valid must follow the
// last subcarrier of a data symbol by one clock and est_valid must pulse
// once per pilot symbol.
module tb_combiner;
  import mccdma_pkg::*;
  localparam int N = 64, DW = 16, NU = 4, DSYM = 8, NFR = 3;
  localparam int NW = $clog2(N), AW = 2 * DW + 1 + NW;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, in_sop = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [NW-1:0]        in_bin = '0;
  logic [NW-1:0]        code [NU];
  logic                 est_valid, out_valid;
  logic signed [AW-1:0] out_acc [NU];
  logic [NU-1:0]        out_bits;

  combiner #(.N(N), .DW(DW), .NU(NU), .DSYM(DSYM)) dut (.*);

  int checks = 0, failures = 0;
  int n_est = 0, n_out = 0;
  longint exp_acc [NFR*DSYM][NU];
  bit     exp_bit [NFR*DSYM][NU];
  int     hr [N], hi [N];          // stored estimate as the block should hold it
  int     last_cyc, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sgn(input bit b);
    return b ? -1 : 1;
  endfunction

  // Pilot sequence written out independently of the package:
  // a[n+7] = a[n] xor a[n+1], a[0..6] = 1,0,0,0,0,0,0.
  bit pil [N];
  initial begin
    bit a [N+7];
    for (int i = 0; i < 7; i++) a[i] = (i == 0);
    for (int i = 0; i < N; i++) a[i+7] = a[i] ^ a[i+1];
    for (int i = 0; i < N; i++) pil[i] = a[i];
  end

  task automatic send(input int re [N], input int im [N]);
    for (int p = 0; p < N; p++) begin
      int k;
      k = (p * 5 + 3) % N;
      in_valid = 1'b1; in_sop = (p == 0);
      in_bin = NW'(k); in_re = DW'(re[k]); in_im = DW'(im[k]);
      @(negedge clk);
      if (p == N - 1) last_cyc = cyc;  // cycle number of the capturing edge
      if ($urandom_range(7) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int code_i [NU];
    code_i = '{1, 6, 13, 40};
    foreach (code[u]) code[u] = NW'(code_i[u]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      real cr [N], ci [N];
      int  yr [N], yi [N];
      for (int k = 0; k < N; k++) begin
        real mag, ph;
        mag = 0.7 + 0.3 * real'($urandom_range(1000)) / 1000.0;
        ph  = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
        cr[k] = mag * $cos(ph); ci[k] = mag * $sin(ph);
        yr[k] = $rtoi(512.0 * cr[k] * sgn(pil[k])) + $signed($urandom_range(8)) - 4;
        yi[k] = $rtoi(512.0 * ci[k] * sgn(pil[k])) + $signed($urandom_range(8)) - 4;
        hr[k] = yr[k] * sgn(pil[k]);
        hi[k] = yi[k] * sgn(pil[k]);
      end
      send(yr, yi);
      for (int s = 0; s < DSYM; s++) begin
        int idx;
        idx = f * DSYM + s;
        foreach (exp_bit[idx][u]) exp_bit[idx][u] = bit'($urandom_range(1));
        for (int k = 0; k < N; k++) begin
          int sum;
          sum = 0;
          for (int u = 0; u < NU; u++)
            sum += sgn(exp_bit[idx][u]) * sgn(bit'($countones(code_i[u] & k) % 2));
          yr[k] = $rtoi(256.0 * cr[k] * sum) + $signed($urandom_range(16)) - 8;
          yi[k] = $rtoi(256.0 * ci[k] * sum) + $signed($urandom_range(16)) - 8;
        end
        for (int u = 0; u < NU; u++) begin
          exp_acc[idx][u] = 0;
          for (int k = 0; k < N; k++)
            exp_acc[idx][u] += longint'(sgn(bit'($countones(code_i[u] & k) % 2))) *
                               (longint'(yr[k]) * hr[k] + longint'(yi[k]) * hi[k]);
        end
        send(yr, yi);
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (n_est != NFR) begin failures++; $display("est_valid pulses %0d, expected %0d", n_est, NFR); end
    checks++;
    if (n_out != NFR * DSYM) begin failures++; $display("out_valid pulses %0d, expected %0d", n_out, NFR * DSYM); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && est_valid) n_est++;
    if (rst_n && out_valid) begin
      checks++;
      if (cyc != last_cyc) begin
        failures++; $display("result %0d late: cycle %0d, last input %0d", n_out, cyc, last_cyc);
      end
      for (int u = 0; u < NU; u++) begin
        checks += 2;
        if (out_acc[u] != AW'(exp_acc[n_out][u])) begin
          failures++; $display("sym %0d user %0d acc %0d expected %0d", n_out, u, out_acc[u], exp_acc[n_out][u]);
        end
        if (out_bits[u] != exp_bit[n_out][u]) begin
          failures++; $display("sym %0d user %0d bit %0d expected %0d", n_out, u, out_bits[u], exp_bit[n_out][u]);
        end
      end
      n_out++;
    end
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
