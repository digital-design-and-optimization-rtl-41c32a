// tb_thc_system: end-to-end test of the turbo Hadamard system at reduced size
// (R = 3, K = 16, M = 3, I = 3, W_T = 2).
//
// Runs NSETS sets of M code words from the LFSR source through encoder,
// transmitter, channel and receiver to the decoder, and compares every
// decided bit with the message bit recorded at the source. It also
// recomputes each transmitted row from the recorded message with its own
// model of the code (SPC, recursive convolutional code, Hadamard code, FIWS
// patterns) and checks the transmitted bits, counts channel LLRs whose sign
// disagrees with the sent bit (errors the decoder must correct), checks the
// decoder time per set against 2*I*M*K plus pipeline overheads, and counts
// the mechanisms of the design: encoder stalls on two full transmit
// buffers, transmit-buffer set swaps, receive-buffer
// set swaps, decoder stages (sub-decoder rotations), iterations and
// corrected channel errors. A mechanism that never happened is a failure.
module tb_thc_system;
  import thc_pkg::*;
  localparam int R = 3, K = 16, M = 3, I = 3, W_T = 2;
  localparam real EBN0 = 10.0;
  localparam int NP = (1 << R) - R;
  localparam int ROW = R + M * NP;
  localparam int NSETS = 3;
  localparam int KW = $clog2(K);

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic msg_valid; logic [R-1:0] msg_bits;
  logic tx_valid; logic [W_T-1:0] tx_bits;
  logic ch_valid; logic signed [5:0] ch_llr [W_T];
  logic out_valid; logic [KW-1:0] out_k; logic [R-1:0] out_bits [M];
  logic dec_busy; logic [$clog2(I*M+1)-1:0] dec_stage;
  logic overflow; logic [15:0] sets_received;

  thc_system #(.R(R), .K(K), .M(M), .I(I), .W_T(W_T), .EBN0_DB(EBN0)) dut (.*);

  int checks = 0, failures = 0;
  logic [R-1:0] msg [NSETS+2][M][K];
  int n_msg = 0, n_out = 0, set_out = 0;
  int raw_err = 0, bit_err = 0, tx_err = 0, n_tx = 0;
  int enc_stall = 0, tx_swaps = 0, dec_swaps = 0, stages = 0, t_start = 0, cyc = 0;
  logic [ROW-1:0] row_sh; int row_pos = 0, row_n = 0;
  logic [W_T-1:0] sent_q [$];

  always @(posedge clk) cyc++;

  // model of one transmitted row (set s, code word c, block k)
  function automatic logic [ROW-1:0] model_row(int s, int c, int k);
    logic [ROW-1:0] row;
    row = '0;
    for (int b = 0; b < R; b++) row[b] = msg[s][c][k][b];
    for (int m = 0; m < M; m++) begin
      logic st; logic [R-1:0] d; logic q, qp; logic [(1<<R)-1:0] cw; logic [R-1:0] j;
      st = 0;
      for (int kk = 0; kk <= k; kk++) begin
        for (int b = 0; b < R; b++) d[b] = msg[s][c][perm(m, b, kk, R, K)][b];
        qp = ^d; q = qp ^ st; st = q;
      end
      j = d ^ {R{q}};
      for (int i = 0; i < (1 << R); i++) cw[i] = q ^ (^(R'(i) & j));
      for (int i = 0; i < NP; i++) row[R + m*NP + i] = cw[par_pos(i, R)];
    end
    return row;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (msg_valid) begin
      int s, c, k;
      s = n_msg / (M*K); c = (n_msg / K) % M; k = n_msg % K;
      if (s < NSETS + 2) msg[s][c][k] = msg_bits;
      n_msg++;
    end
    if (tx_valid) begin
      for (int i = 0; i < W_T; i++) row_sh[row_pos*W_T + i] = tx_bits[i];
      sent_q.push_back(tx_bits);
      row_pos++;
      if (row_pos == ROW / W_T) begin
        logic [ROW-1:0] exp_row;
        int s;
        s = row_n / (M*K);
        exp_row = model_row(s, (row_n / K) % M, row_n % K);
        checks++;
        if (exp_row !== row_sh) begin
          failures++; tx_err++;
          if (tx_err < 5) $display("tx row %0d mismatch %h vs %h", row_n, row_sh, exp_row);
        end
        row_pos = 0; row_n++;
      end
    end
    if (ch_valid) begin
      logic [W_T-1:0] sb;
      sb = sent_q.pop_front();
      for (int i = 0; i < W_T; i++) if ((ch_llr[i] < 0) != sb[i] || ch_llr[i] == 0) raw_err++;
    end
    if (dut.run && !dut.enc_ok && !dut.enc_busy) enc_stall++;
    if (dut.tx_done) tx_swaps++;
    if (dut.dec_start) begin t_start = cyc; dec_swaps++; end
    if (dut.u_dec.sd_done[0]) stages++;
    if (out_valid) begin
      for (int c = 0; c < M; c++) begin
        checks++;
        if (out_bits[c] !== msg[set_out][c][out_k]) begin
          failures++; bit_err++;
          if (bit_err < 6) $display("set %0d cw %0d blk %0d: got %b exp %b", set_out, c, out_k, out_bits[c], msg[set_out][c][out_k]);
        end
      end
      n_out++;
      if (out_k == KW'(K-1)) begin
        int dt;
        dt = cyc - t_start;
        checks++;
        // each stage: K forward + (R + 1) FHT/BCJR + K backward + R + 2, plus K output cycles
        if (dt > I*M*(2*K + 2*R + 8) + K + 4 || dt < 2*I*M*K) begin
          failures++; $display("decode time %0d cycles out of range", dt);
        end
        set_out++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; run = 1;
    wait (set_out == NSETS);
    run = 0;
    repeat (5) @(posedge clk);
    checks++; if (overflow) begin failures++; $display("receive buffer overflow"); end
    $display("raw channel sign errors %0d, decoded bit errors %0d, stages %0d, receive-set swaps %0d",
             raw_err, bit_err, stages, dec_swaps);
    $display("encoder stall cycles %0d, transmit-set swaps %0d", enc_stall, tx_swaps);
    checks++; if (enc_stall == 0) begin failures++; $display("encoder never waited for a free set"); end
    checks++; if (tx_swaps < NSETS) begin failures++; $display("transmit ping-pong not exercised"); end
    // mechanisms
    checks++; if (dec_swaps < 2) begin failures++; $display("receive ping-pong not exercised"); end
    checks++; if (stages != NSETS * I * M) begin failures++; $display("stage count %0d", stages); end
    checks++; if (raw_err == 0) begin failures++; $display("no channel errors to correct"); end
    checks++; if (row_n < NSETS * M * K) begin failures++; $display("rows sent %0d", row_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
