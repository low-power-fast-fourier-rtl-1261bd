// Combiner of the MC-CDMA receiver: channel estimation, despreading and
// data demodulation of the FFT output.
//
// Frame layout: after reset the receiver expects one pilot symbol followed
// by DSYM data symbols, repeating. A symbol is N consecutive valid FFT
// outputs, in any subcarrier order (in_bin names the subcarrier).
//
// Channel estimation: on the pilot symbol every subcarrier k carries the
// known BPSK value pilot_chip(k) (see mccdma_pkg), so the estimate is the
// received value times that sign, H[k] = Y[k] * (+-1), stored in an N-entry
// memory.
// Despreading and demodulation: each user's BPSK bit is spread over all N
// subcarriers with Walsh-Hadamard code code[u] (chip k = parity of
// code[u] & k). On a data symbol the combiner forms, per subcarrier,
//   z[k] = Re(Y[k] * conj(H[k])) = Yre*Hre + Yim*Him
// (maximum-ratio combining) and adds +-z[k] into one accumulator per
// user. After the last subcarrier of the symbol acc[u] is the decision
// statistic and bit[u] = (acc[u] < 0): bit 0 was sent as +1, bit 1 as -1.
//
// Interface: FFT stream in; out_valid pulses for one clock per data symbol
// with out_acc and out_bits; est_valid pulses once a pilot symbol has been
// stored. Timing: results are registered, one clock after the last
// subcarrier of the symbol enters. The split into estimation, despreading
// and demodulation follows the receiver's description; the pilot-symbol
// frame, Walsh codes, BPSK and maximum-ratio combining are this design's
// choices.
module combiner
  import mccdma_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned DW   = DEF_DW,
  parameter int unsigned NU   = DEF_NU,
  parameter int unsigned DSYM = DEF_DSYM,
  localparam int unsigned NW  = $clog2(N),
  localparam int unsigned AW  = 2 * DW + 1 + NW   // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [NW-1:0]        in_bin,
  input  logic                 in_sop,
  input  logic [NW-1:0]        code     [NU],
  output logic                 est_valid,
  output logic                 out_valid,
  output logic signed [AW-1:0] out_acc  [NU],
  output logic [NU-1:0]        out_bits
);

  localparam int unsigned SW = (DSYM > 0) ? $clog2(DSYM + 1) : 1;

  typedef logic [N-1:0] pilot_t;
  function automatic pilot_t mk_pilot();
    pilot_t p;
    for (int unsigned k = 0; k < N; k++) p[k] = pilot_chip(k);
    return p;
  endfunction
  localparam pilot_t PILOT = mk_pilot();

  logic signed [DW-1:0] h_re [N];
  logic signed [DW-1:0] h_im [N];

  logic [NW-1:0]        scnt;   // subcarrier position inside the symbol
  logic [SW-1:0]        sym;    // 0 = pilot, 1..DSYM = data
  logic                 last;
  logic signed [AW-1:0] acc     [NU];
  logic signed [AW-1:0] acc_nxt [NU];
  logic signed [2*DW:0] z;

  assign last = (scnt == NW'(N - 1));

  // Maximum-ratio combining term and despreading.
  always_comb begin
    z = (2*DW+1)'(in_re) * (2*DW+1)'(h_re[in_bin]) + (2*DW+1)'(in_im) * (2*DW+1)'(h_im[in_bin]);
    for (int unsigned u = 0; u < NU; u++)
      acc_nxt[u] = walsh_chip(16'(code[u]), 16'(in_bin)) ? acc[u] - AW'(z) : acc[u] + AW'(z);
  end

  // Channel estimate memory.
  always_ff @(posedge clk) begin
    if (in_valid && sym == '0) begin
      h_re[in_bin] <= PILOT[in_bin] ? -in_re : in_re;
      h_im[in_bin] <= PILOT[in_bin] ? -in_im : in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt      <= '0;
      sym       <= '0;
      est_valid <= 1'b0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      for (int unsigned u = 0; u < NU; u++) begin
        acc[u]     <= '0;
        out_acc[u] <= '0;
      end
    end else begin
      est_valid <= in_valid && last && (sym == '0);
      out_valid <= in_valid && last && (sym != '0);
      if (in_valid) begin
        scnt <= scnt + NW'(1);
        if (last) sym <= (sym == SW'(DSYM)) ? '0 : sym + SW'(1);
        if (sym != '0) begin
          for (int unsigned u = 0; u < NU; u++) begin
            if (last) begin
              acc[u]      <= '0;
              out_acc[u]  <= acc_nxt[u];
              out_bits[u] <= acc_nxt[u][AW-1];
            end else begin
              acc[u] <= acc_nxt[u];
            end
          end
        end
      end
    end
  end

  // The FFT marks the first output of each symbol; the combiner's own
  // count must agree with it.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (in_sop == (scnt == '0)))
    else $error("combiner: symbol start out of step with the FFT");

endmodule
