// tb_thc_subdecoder: decodes component code words of a convolutional
// Hadamard code (built by a model of the encoder in this testbench).
// Pass 1: the information-bit LLRs are 0 and only the channel LLRs of q and
// the Hadamard parity bits are given (with some of them of the wrong sign):
// the decoder must recover every information bit from the code structure.
// Pass 2: same code word, in_first = 0; the a priori input is the pass-1
// output (which contains this decoder's own extrinsic, as in the turbo loop)
// plus noisy information LLRs; decisions must again be right. Pass 3 uses the
// other code-word slot with a fresh word. Pass 4 repeats pass 3 (in_first =
// 0) with its own output as the a priori input: removing the stored
// extrinsic must give back the pass-3 a priori, so the output must equal the
// pass-3 output exactly. It also checks the output order
// (K-1 .. 0), one row per cycle, and the latency 2R + K + 2 cycles from the
// first input row to the first output row.
module tb_thc_subdecoder;
  import thc_pkg::*;
  localparam int R = 5, K = 10, M = 2, N = 1 << R, NP = N - R;
  localparam int KW = $clog2(K);
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid, done;
  logic [0:0] in_slot = 0;
  logic signed [9:0] in_lprev [R], out_app [R];
  logic signed [5:0] in_par [NP];
  logic [KW-1:0] out_k;
  always #5 clk = ~clk;
  thc_subdecoder #(.R(R), .K(K), .M(M)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [R-1:0] d [K];
  logic [N-1:0] cw [K];
  int app1 [K][R], app3 [K][R];
  always @(posedge clk) cyc++;

  task automatic make_word();
    bit st;
    st = 0;
    for (int k = 0; k < K; k++) begin
      bit q;
      logic [R-1:0] j;
      d[k] = R'($urandom);
      q = (^d[k]) ^ st; st = q;
      j = d[k] ^ {R{q}};
      for (int i = 0; i < N; i++) cw[k][i] = q ^ (^(R'(i) & j));
    end
  endtask

  task automatic run_pass(int pass, bit first, bit use_info, bit slot);
    int t0, nout, ek;
    t0 = -1; nout = 0; ek = K - 1;
    in_first = first; in_slot = slot;
    fork
      begin
        for (int k = 0; k < K; k++) begin
          in_valid = 1;
          for (int b = 0; b < R; b++) begin
            int v;
            v = use_info ? (d[k][b] ? -20 : 20) : 0;
            if (use_info && ((k + b) % 5 == 0)) v = -v / 2;   // some wrong signs
            if (pass == 2) v = sat(v + app1[k][b], 10);
            if (pass == 4) v = app3[k][b];
            in_lprev[b] = 10'(v);
          end
          for (int i = 0; i < NP; i++) begin
            int v;
            v = cw[k][par_pos(i, R)] ? -20 : 20;
            if ((k * 7 + i) % 11 == 3) v = -v / 4;            // some wrong signs
            in_par[i] = 6'(v);
          end
          if (k == 0) t0 = cyc;
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        while (nout < K) begin
          @(negedge clk);
          if (out_valid) begin
            if (nout == 0) begin
              checks++;
              if (cyc - t0 != 2*R + K + 2) begin failures++; $display("latency %0d", cyc - t0); end
            end
            checks++;
            if (int'(out_k) != ek) begin failures++; $display("order: %0d exp %0d", out_k, ek); end
            for (int b = 0; b < R; b++) begin
              checks++;
              if (pass == 1) app1[ek][b] = int'(out_app[b]);
              if (pass == 3) app3[ek][b] = int'(out_app[b]);
              if (pass == 4) begin
                checks++;
                if (int'(out_app[b]) != app3[ek][b]) begin
                  failures++;
                  $display("pass 4 block %0d bit %0d: LLR %0d, pass 3 gave %0d", ek, b, out_app[b], app3[ek][b]);
                end
              end
              if ((out_app[b] < 0) != d[ek][b]) begin
                failures++;
                $display("pass %0d block %0d bit %0d: LLR %0d, bit %b", pass, ek, b, out_app[b], d[ek][b]);
              end
            end
            ek--; nout++;
          end
        end
      end
    join
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int b = 0; b < R; b++) in_lprev[b] = '0;
    for (int i = 0; i < NP; i++) in_par[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    make_word();
    run_pass(1, 1, 0, 0);
    run_pass(2, 0, 1, 0);
    make_word();
    run_pass(3, 1, 1, 1);
    run_pass(4, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
