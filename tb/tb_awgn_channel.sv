// tb_awgn_channel: statistical check of the channel model at its default
// parameters (R = 7, M = 5, W_T = 18, N_CH = 6, Eb/N0 = -0.45 dB). Random
// bits are sent for 20000 cycles (360000 samples). For every sample the
// level, taken with the sign of the bit sent (negated for a 1), is counted;
// the histogram is compared with the expected probabilities of the clipped,
// quantised LLR 2(1 + n)/sigma^2, which this testbench computes by numerical
// integration of the Gaussian density (independent of the model's erf
// approximation). Each level with an expected count of at least 50 must lie
// within 5 standard deviations (plus 1 % for the table rounding); the mean
// level is checked the same way, and separately for bits 0 and 1 (the
// sign flip). It also checks the output range, that out_valid follows
// in_valid by one cycle and that the output holds while in_valid is low.
module tb_awgn_channel;
  localparam int R = 7, M = 5, W_T = 18, N_CH = 6, NCYC = 20000;
  localparam real EBN0_DB = -0.45;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W_T-1:0] in_bits = '0;
  logic signed [N_CH-1:0] out_llr [W_T];
  always #5 clk = ~clk;
  awgn_channel dut (.*);

  int checks = 0, failures = 0;
  int hist [63];
  longint sum0 = 0, sum1 = 0, n0 = 0, n1 = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // probability that N(mu, s^2) lies in [a, b), Simpson's rule
  function automatic real gprob(real mu, real s, real a, real b);
    real h, acc, x;
    int n;
    if (a < mu - 12.0 * s) a = mu - 12.0 * s;
    if (b > mu + 12.0 * s) b = mu + 12.0 * s;
    if (b <= a) return 0.0;
    n = 2000;
    h = (b - a) / n;
    acc = 0.0;
    for (int i = 0; i <= n; i++) begin
      x = a + i * h;
      acc += ((i == 0 || i == n) ? 1.0 : ((i % 2) ? 4.0 : 2.0)) *
             $exp(-(x - mu) * (x - mu) / (2.0 * s * s));
    end
    return acc * h / 3.0 / (s * $sqrt(2.0 * 3.141592653589793));
  endfunction

  initial begin
    real rc, sig2, mu, s, emean, p, e, var_l;
    for (int v = 0; v < 63; v++) hist[v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid, "out_valid low after reset");
    for (int c = 0; c <= NCYC; c++) begin
      in_valid = (c < NCYC);
      in_bits = W_T'({$urandom, $urandom});
      @(negedge clk);
      if (c == 0) chk(out_valid, "out_valid one cycle after in_valid");
      // the output sampled now belongs to the bits presented in this loop pass
      if (c < NCYC) begin
        for (int i = 0; i < W_T; i++) begin
          int l;
          l = int'(out_llr[i]);
          chk(l >= -31 && l <= 31, $sformatf("level %0d out of range", l));
          if (in_bits[i]) begin sum1 += l; n1++; l = -l; end
          else begin sum0 += l; n0++; end
          hist[l + 31]++;
        end
      end
    end
    // hold while idle
    begin
      logic signed [N_CH-1:0] held [W_T];
      held = out_llr;
      in_valid = 0;
      repeat (3) @(negedge clk);
      chk(!out_valid && held == out_llr, "output holds while idle");
    end
    // expected distribution (sent +1)
    rc   = real'(R) / real'(R + M * ((1 << R) - R));
    sig2 = 1.0 / (2.0 * rc * (10.0 ** (EBN0_DB / 10.0)));
    mu   = 2.0 / sig2 * 64.0;                 // LLR mean in 1/64 units
    s    = 2.0 * $sqrt(sig2) / sig2 * 64.0;   // LLR standard deviation
    emean = 0.0;
    var_l = 0.0;
    for (int v = -31; v <= 31; v++) begin
      real lo, hi;
      lo = (v == -31) ? -1.0e9 : v - 0.5;
      hi = (v == 31) ? 1.0e9 : v + 0.5;
      p = gprob(mu, s, lo, hi);
      emean += p * v;
      var_l += p * v * v;
      e = p * NCYC * W_T;
      if (e >= 50.0) begin
        chk(rabs(real'(hist[v + 31]) - e) <= 5.0 * $sqrt(e) + 0.01 * e,
            $sformatf("level %0d: %0d samples, expected %0.1f", v, hist[v + 31], e));
      end
    end
    var_l -= emean * emean;
    $display("mean level %0.3f (expected %0.3f)", real'(sum0 - sum1) / real'(n0 + n1), emean);
    chk(rabs(real'(sum0 - sum1) / real'(n0 + n1) - emean) <= 5.0 * $sqrt(var_l / real'(n0 + n1)) + 0.01,
        "mean level");
    chk(rabs(real'(sum0) / real'(n0) - emean) <= 5.0 * $sqrt(var_l / real'(n0)) + 0.01, "mean for bit 0");
    chk(rabs(-real'(sum1) / real'(n1) - emean) <= 5.0 * $sqrt(var_l / real'(n1)) + 0.01, "mean for bit 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
