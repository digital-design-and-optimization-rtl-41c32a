// tb_thc_decoder: checks the turbo Hadamard decoder (R = 3, K = 16, M = 3,
// I = 4) on its own. The testbench encodes random messages with a
// behavioural model of the code and serves the channel LLRs of a set from
// behavioural receive-buffer RAMs (same read-port arrangement as the
// receive buffer). Three sets are decoded: clean LLRs; LLRs with about one
// sign in six flipped to a smaller wrong value; and all information LLRs
// erased (zero), so that the bits must come from the parity positions of
// the M component codes through the iterations. Every decision is compared
// with the message; the test also checks that every block k is output
// exactly once, that the stage counter runs through 0 .. I*M-1, and the decoding time of
// I*M*(2K + 2R + 4) cycles plus the K output cycles.
module tb_thc_decoder;
  import thc_pkg::*;
  localparam int R = 3, K = 16, M = 3, I = 4, N = 1 << R, NP = N - R;
  localparam int KW = $clog2(K), TW = $clog2(I * M + 1);
  logic clk = 0, rst_n = 0, start = 0, busy, out_valid;
  logic [KW-1:0] rb_info_addr [M][R];
  logic signed [5:0] rb_info_data [M][R];
  logic [KW-1:0] rb_par_addr;
  logic signed [5:0] rb_par_data [M][M][NP];
  logic [KW-1:0] out_k;
  logic [R-1:0] out_bits [M];
  logic [TW-1:0] stage;
  always #5 clk = ~clk;
  thc_decoder #(.R(R), .K(K), .M(M), .I(I)) dut (.*);

  logic [R-1:0] msg [M][K];
  logic signed [5:0] info_llr [M][R][K];
  logic signed [5:0] par_llr [M][K][M][NP];

  always_comb
    for (int c = 0; c < M; c++) begin
      for (int b = 0; b < R; b++) rb_info_data[c][b] = info_llr[c][b][rb_info_addr[c][b]];
      rb_par_data[c] = par_llr[c][rb_par_addr];
    end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int llr(bit v, int mode, int idx);
    int a;
    a = v ? -24 : 24;
    if (mode == 1 && (idx * 7919 % 6) == 1) a = -a / 3;
    return a;
  endfunction

  task automatic make_set(int mode);
    int idx;
    idx = 0;
    for (int c = 0; c < M; c++) begin
      for (int k = 0; k < K; k++) msg[c][k] = R'($urandom);
      for (int k = 0; k < K; k++)
        for (int b = 0; b < R; b++) begin
          info_llr[c][b][k] = (mode == 2) ? 6'sd0 : 6'(llr(msg[c][k][b], mode, idx));
          idx++;
        end
      for (int m = 0; m < M; m++) begin
        bit q;
        q = 0;
        for (int k = 0; k < K; k++) begin
          logic [R-1:0] d, j;
          for (int b = 0; b < R; b++) d[b] = msg[c][perm(m, b, k, R, K)][b];
          q = (^d) ^ q;
          j = d ^ {R{q}};
          for (int i = 0; i < NP; i++) begin
            par_llr[c][k][m][i] = 6'(llr(q ^ (^(R'(par_pos(i, R)) & j)), mode, idx));
            idx++;
          end
        end
      end
    end
  endtask

  task automatic decode(int mode);
    int t0, nout, errs, smax, nchg;
    logic [TW-1:0] sprev;
    bit seen [K];
    for (int k = 0; k < K; k++) seen[k] = 0;
    @(negedge clk);
    start = 1; t0 = cyc; @(negedge clk); start = 0;
    nout = 0; errs = 0; smax = 0; nchg = 0; sprev = stage;
    while (nout < K && cyc - t0 < 10000) begin
      if (stage != sprev) nchg++;
      sprev = stage;
      if (int'(stage) > smax) smax = int'(stage);
      if (out_valid) begin
        checks++;
        if (seen[out_k]) begin failures++; $display("block %0d output twice", out_k); end
        seen[out_k] = 1;
        for (int c = 0; c < M; c++) begin
          checks++;
          if (out_bits[c] != msg[c][out_k]) begin
            failures++; errs++;
            if (errs < 5) $display("mode %0d cw %0d block %0d: %b exp %b", mode, c, out_k, out_bits[c], msg[c][out_k]);
          end
        end
        nout++;
      end
      @(negedge clk);
    end
    checks++;
    if (nout != K) begin failures++; $display("mode %0d: %0d blocks output", mode, nout); end
    checks++;
    if (smax != I * M - 1 || nchg != I * M - 1) begin
      failures++; $display("stage counter: last %0d, %0d steps", smax, nchg);
    end
    checks++;
    if (cyc - t0 > I * M * (2 * K + 2 * R + 4) + K + 4) begin
      failures++; $display("mode %0d: %0d cycles", mode, cyc - t0);
    end
    $display("mode %0d: %0d block errors, %0d cycles", mode, errs, cyc - t0);
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      make_set(mode);
      decode(mode);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
