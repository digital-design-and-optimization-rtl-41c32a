// tb_thc_encoder: checks the turbo Hadamard encoder (R = 3, K = 16, M = 3)
// over two sets against a behavioural model written here: a 102-stage LFSR
// model for the message bits, the single parity check, the recursive
// convolutional code, the Hadamard parity bits and the FIWS patterns. It
// checks every information row and parity row written to the buffer, the
// row addresses, msg_valid/msg_bits, and the time of the done pulse
// (2*M*K working cycles plus the registered done: 2*M*K + 1 clock
// edges after the edge that samples start).
module tb_thc_encoder;
  import thc_pkg::*;
  localparam int R = 3, K = 16, M = 3, N = 1 << R, NP = N - R, AW = $clog2(M * K);
  localparam logic [101:0] SEED = 102'h2_5A5A_1234_5678_9ABC_DEF0_1357;
  logic clk = 0, rst_n = 0, start = 0, busy, done, wr_info_en, wr_par_en, msg_valid;
  logic [AW-1:0] wr_addr;
  logic [R-1:0] wr_info, msg_bits;
  logic [M*NP-1:0] wr_par;
  always #5 clk = ~clk;
  thc_encoder #(.R(R), .K(K), .M(M), .SEED(SEED)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [101:0] st = SEED;
  logic [R-1:0] msg [M][K];
  always @(posedge clk) cyc++;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [R-1:0] next_msg();
    logic [R-1:0] b;
    for (int i = 0; i < R; i++) begin
      b[i] = st[101] ^ st[100] ^ st[35] ^ st[34];
      st = {st[100:0], b[i]};
    end
    return b;
  endfunction

  // parity slice of component m, block k of code word c
  function automatic logic [NP-1:0] model_par(int c, int m, int k);
    bit q;
    logic [R-1:0] d, j;
    logic [NP-1:0] p;
    q = 0;
    for (int kk = 0; kk <= k; kk++) begin
      for (int b = 0; b < R; b++) d[b] = msg[c][perm(m, b, kk, R, K)][b];
      q = (^d) ^ q;
    end
    j = d ^ {R{q}};
    for (int i = 0; i < NP; i++) p[i] = q ^ (^(R'(par_pos(i, R)) & j));
    return p;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      int t0, ninfo, npar;
      @(negedge clk);
      start = 1; t0 = cyc; @(negedge clk); start = 0;
      ninfo = 0; npar = 0;
      while (!done) begin
        if (wr_info_en) begin
          int c, k;
          c = ninfo / K; k = ninfo % K;
          msg[c][k] = next_msg();
          chk(msg_valid && msg_bits == msg[c][k] && wr_info == msg[c][k],
              $sformatf("set %0d info row %0d", s, ninfo));
          chk(int'(wr_addr) == ninfo, $sformatf("info address %0d", wr_addr));
          ninfo++;
        end
        if (wr_par_en) begin
          int c, k;
          c = npar / K; k = npar % K;
          chk(int'(wr_addr) == npar, $sformatf("parity address %0d", wr_addr));
          for (int m = 0; m < M; m++)
            chk(wr_par[m*NP +: NP] == model_par(c, m, k),
                $sformatf("set %0d cw %0d comp %0d block %0d: %b exp %b", s, c, m, k,
                          wr_par[m*NP +: NP], model_par(c, m, k)));
          npar++;
        end
        chk(!(wr_info_en && wr_par_en), "one write kind per cycle");
        @(negedge clk);
      end
      chk(ninfo == M * K && npar == M * K, $sformatf("rows written %0d/%0d", ninfo, npar));
      chk(cyc - t0 == 2 * M * K + 1, $sformatf("done after %0d cycles", cyc - t0));
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
