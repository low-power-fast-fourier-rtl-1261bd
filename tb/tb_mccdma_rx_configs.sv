// End-to-end test of the MC-CDMA receiver in the other FFT configurations
// of its design space: 16 and 256 points with radix 4, and 16, 64 and 256
// points with radix 8 (see rx_harness; the default 64-point radix-4
// receiver is covered by tb_mccdma_rx). Each receiver gets four frames of
// four users' data over a two-path channel and must decode every bit with
// an SNR of at least 20 dB.
module tb_mccdma_rx_configs;
  localparam int NH = 5;
  logic done [NH];
  int   chk  [NH];
  int   fail [NH];
  int   checks, failures;

  rx_harness #(.N(16),  .R(4)) h0 (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  rx_harness #(.N(256), .R(4)) h1 (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  rx_harness #(.N(16),  .R(8)) h2 (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  rx_harness #(.N(64),  .R(8)) h3 (.done(done[3]), .checks(chk[3]), .failures(fail[3]));
  rx_harness #(.N(256), .R(8)) h4 (.done(done[4]), .checks(chk[4]), .failures(fail[4]));

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
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    report(0);
  end

  initial begin : watchdog
    #2000000;
    $display("watchdog expired");
    report(1);
  end
endmodule
