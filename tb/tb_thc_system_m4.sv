// tb_thc_system_m4: the code-length-287235 configuration of the turbo
// Hadamard system (R = 7, K = 585, M = 4, I = 10). The row of 7 + 4*121 = 491
// bits has a prime length, so the transmitter sends a whole row per cycle
// (W_T = 491). One set of four code words runs end to end at Eb/N0 =
// -0.45 dB. Every decided bit is compared with the message bit recorded at
// the source; the decoded bit error rate must be below half the raw channel
// error rate, the decoder must finish within 2*I*M*(K + R + 6) + K cycles of
// its start, and the receive buffer must not overflow.
module tb_thc_system_m4;
  localparam int R = 7, K = 585, M = 4, I = 10, W_T = 491;
  localparam int KW = $clog2(K);

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic msg_valid; logic [R-1:0] msg_bits;
  logic tx_valid; logic [W_T-1:0] tx_bits;
  logic ch_valid; logic signed [5:0] ch_llr [W_T];
  logic out_valid; logic [KW-1:0] out_k; logic [R-1:0] out_bits [M];
  logic dec_busy; logic [$clog2(I*M+1)-1:0] dec_stage;
  logic overflow; logic [15:0] sets_received;

  thc_system #(.M(M), .W_T(W_T)) dut (.*);

  int checks = 0, failures = 0;
  logic [R-1:0] msg [M][K];
  int n_msg = 0, bit_err = 0, raw_err = 0, raw_half = 0, n_raw = 0, done_sets = 0;
  logic [W_T-1:0] tx_prev;
  longint cyc = 0, t_start = 0;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (msg_valid && n_msg < M*K) begin
      msg[n_msg / K][n_msg % K] = msg_bits;
      n_msg++;
    end
    // raw errors: channel output (latency 1) against the bits sent
    if (ch_valid) for (int i = 0; i < W_T; i++) begin
      n_raw++;
      if (ch_llr[i] == 0) raw_half++;
      else if ((ch_llr[i] < 0) != tx_prev[i]) raw_err++;
    end
    tx_prev <= tx_bits;
    if (dut.dec_start) t_start = cyc;
    if (out_valid && done_sets == 0) begin
      for (int c = 0; c < M; c++) begin
        checks++;
        for (int b = 0; b < R; b++)
          if (out_bits[c][b] !== msg[c][out_k][b]) bit_err++;
      end
      if (out_k == KW'(K-1)) begin
        checks++;
        if (cyc - t_start > 2*I*M*(K + R + 6) + K) begin
          failures++; $display("decoder took %0d cycles", cyc - t_start);
        end
        done_sets = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; run = 1;
    repeat (20) @(posedge clk);
    run = 0;
    wait (done_sets == 1);
    repeat (3) @(posedge clk);
    $display("decoded bit errors %0d of %0d, decoder time %0d cycles", bit_err, M*K*R, cyc - t_start);
    $display("raw channel errors %0d (+%0d zero LLRs) of %0d received bits", raw_err, raw_half, n_raw);
    checks++;
    if (real'(bit_err) / real'(M*K*R) >= 0.5 * (real'(raw_err) + 0.5 * real'(raw_half)) / real'(n_raw)) begin
      failures++; $display("decoded bit error rate not below half the raw rate");
    end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
