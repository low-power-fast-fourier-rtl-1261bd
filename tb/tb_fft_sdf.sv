// Self-checking testbench of the pipelined FFT.
//
// Runs the default configuration (64 points, radix 4) with a continuous
// stream and checks its latency, then the other five configurations of the
// design space (16 and 256 points radix 4; 16, 64 and 256 points radix 8,
// the radix-8 ones at 16 and 256 points ending in a radix-2 or radix-4
// stage) and the default again with random input gaps, each against a
// floating-point DFT (see fft_harness).
module tb_fft_sdf;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 7;
  logic done [NH];
  int   chk  [NH];
  int   fail [NH];
  int   checks, failures;

  fft_harness #(.N(64),  .R(4), .NF(3), .GAPS(0))         h0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  fft_harness #(.N(16),  .R(4), .NF(4), .GAPS(0))         h1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  fft_harness #(.N(256), .R(4), .NF(2), .GAPS(0), .TOL(8)) h2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  fft_harness #(.N(64),  .R(8), .NF(3), .GAPS(0))         h3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  fft_harness #(.N(64),  .R(4), .NF(3), .GAPS(1))         h4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  fft_harness #(.N(16),  .R(8), .NF(4), .GAPS(0))         h5 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  fft_harness #(.N(256), .R(8), .NF(2), .GAPS(1), .TOL(8)) h6 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]));

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    repeat (2) @(posedge clk);
    report(0);
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
