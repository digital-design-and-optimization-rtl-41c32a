// tb_thc_bcjr: feeds K random rows of code-word metrics to the BCJR unit,
// twice in a row, and compares every backward output row with a behavioural
// model of the 2-state turbo Hadamard trellis written from the equations:
// branch metric = largest +/-m[j] on the branch, alpha/beta recursions with
// max* (correction computed with $ln/$exp), normalisation to a largest value
// of 0 and saturation of magnitudes. Also checks that rows come out in
// order K-1 .. 0, one per cycle, valid from the clock edge after the one that took the last input row.
module tb_thc_bcjr;
  localparam int R = 3, N = 1 << R, K = 12, WM = 12, NB = 7, ND = 10, LF = 5;
  localparam int KW = $clog2(K);
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, busy, done;
  logic signed [WM-1:0] in_m [N];
  logic signed [ND:0] out_a [N], out_b [N];
  logic [KW-1:0] out_k;
  always #5 clk = ~clk;
  thc_bcjr #(.R(R), .K(K), .WM(WM), .NB(NB), .ND(ND), .LOG_FRAC(LF)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int mm [K][N];
  int ea [K][N], eb [K][N];
  int exp_k, t_last, n_out;

  function automatic int ms(int a, int b);
    real sc; int d;
    sc = real'(1 << LF);
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + $rtoi(sc * $ln(1.0 + $exp(-real'(d) / sc)) + 0.5);
  endfunction
  function automatic int fl(int v, int nbits);
    return (v < -((1 << nbits) - 1)) ? -((1 << nbits) - 1) : v;
  endfunction
  function automatic int st_of(int j, int q);
    return ($countones(j) % 2) ^ (q & (R % 2)) ^ q;
  endfunction

  task automatic model();
    int al [K+1][2], be [K+1][2], B [K][2][2];
    for (int k = 0; k < K; k++) begin
      for (int s = 0; s < 2; s++) for (int t = 0; t < 2; t++) B[k][s][t] = -(1 << 20);
      for (int j = 0; j < N; j++) for (int q = 0; q < 2; q++) begin
        int v;
        v = q ? -mm[k][j] : mm[k][j];
        if (v > B[k][st_of(j, q)][q]) B[k][st_of(j, q)][q] = v;
      end
    end
    al[0][0] = 0; al[0][1] = -((1 << NB) - 1);
    for (int k = 0; k < K; k++) begin
      int t0, t1, mx;
      t0 = ms(al[k][0] + B[k][0][0], al[k][1] + B[k][1][0]);
      t1 = ms(al[k][0] + B[k][0][1], al[k][1] + B[k][1][1]);
      mx = (t0 > t1) ? t0 : t1;
      al[k+1][0] = fl(t0 - mx, NB); al[k+1][1] = fl(t1 - mx, NB);
    end
    be[K][0] = 0; be[K][1] = 0;
    for (int k = K - 1; k >= 0; k--) begin
      int t0, t1, mx;
      t0 = ms(B[k][0][0] + be[k+1][0], B[k][0][1] + be[k+1][1]);
      t1 = ms(B[k][1][0] + be[k+1][0], B[k][1][1] + be[k+1][1]);
      mx = (t0 > t1) ? t0 : t1;
      be[k][0] = fl(t0 - mx, NB); be[k][1] = fl(t1 - mx, NB);
    end
    for (int k = 0; k < K; k++) begin
      int mx;
      mx = -(1 << 30);
      for (int j = 0; j < N; j++) begin
        ea[k][j] = mm[k][j] + al[k][st_of(j, 0)] + be[k+1][0];
        eb[k][j] = -mm[k][j] + al[k][st_of(j, 1)] + be[k+1][1];
        if (ea[k][j] > mx) mx = ea[k][j];
        if (eb[k][j] > mx) mx = eb[k][j];
      end
      for (int j = 0; j < N; j++) begin
        ea[k][j] = fl(ea[k][j] - mx, ND); eb[k][j] = fl(eb[k][j] - mx, ND);
      end
    end
  endtask

  always @(posedge clk) cyc++;

  initial begin
    for (int j = 0; j < N; j++) in_m[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      for (int k = 0; k < K; k++) for (int j = 0; j < N; j++)
        mm[k][j] = $signed($urandom_range(0, 400)) - 200;
      model();
      for (int k = 0; k < K; k++) begin
        in_valid = 1;
        for (int j = 0; j < N; j++) in_m[j] = WM'(mm[k][j]);
        @(negedge clk);
      end
      in_valid = 0;
      t_last = cyc;
      exp_k = K - 1; n_out = 0;
      while (n_out < K) begin
        @(negedge clk);
        if (out_valid) begin
          checks++;
          if (int'(out_k) != exp_k) begin failures++; $display("row %0d expected %0d", out_k, exp_k); end
          if (n_out == 0) begin
            checks++;
            if (cyc - t_last != 1) begin failures++; $display("first output after %0d cycles", cyc - t_last); end
          end
          for (int j = 0; j < N; j++) begin
            checks += 2;
            if (int'(out_a[j]) != ea[exp_k][j]) begin failures++; if (failures < 6) $display("k%0d a[%0d] %0d exp %0d", exp_k, j, out_a[j], ea[exp_k][j]); end
            if (int'(out_b[j]) != eb[exp_k][j]) failures++;
          end
          exp_k--; n_out++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
