// tb_dfht: streams random log-domain code-word weights through the order-R
// dual FHT and compares every output with the exact values computed in real
// arithmetic: a_i = ln sum_j (e^a_j if popcount(i&j) even else e^b_j),
// b_i likewise with a and b exchanged, in 2^-LOG_FRAC nat units. The table
// correction rounds at each of the R stages, so each output may differ from
// the exact value by at most R LSBs. Latency must be R cycles.
module tb_dfht;
  localparam int R = 4, W = 11, N = 1 << R, TW = 8, LF = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in_a [N], in_b [N], out_a [N], out_b [N];
  logic [TW-1:0] in_tag, out_tag;
  always #5 clk = ~clk;
  dfht #(.R(R), .W(W), .LOG_FRAC(LF), .TAG_W(TW)) dut (.*);
  int checks = 0, failures = 0, cyc = 0, got = 0, maxdev = 0;
  int as_ [128][N], bs_ [128][N];
  int t_in [128];

  function automatic int exact(int n, int i, bit sel_b);
    real s, sc;
    sc = real'(1 << LF);
    s = 0.0;
    for (int j = 0; j < N; j++) begin
      bit odd;
      odd = $countones(i & j) % 2;
      s += $exp(real'((odd ^ sel_b) ? bs_[n][j] : as_[n][j]) / sc);
    end
    return $rtoi(sc * $ln(s) + ((s >= 1.0) ? 0.5 : -0.5));
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      checks++;
      if (cyc - t_in[out_tag] != R) begin failures++; $display("latency %0d", cyc - t_in[out_tag]); end
      for (int i = 0; i < N; i++) begin
        int ea, eb, da, db;
        ea = exact(out_tag, i, 0); eb = exact(out_tag, i, 1);
        da = int'(out_a[i]) - ea; db = int'(out_b[i]) - eb;
        if (da < 0) da = -da;
        if (db < 0) db = -db;
        if (da > maxdev) maxdev = da;
        if (db > maxdev) maxdev = db;
        checks += 2;
        if (da > R) failures++;
        if (db > R) failures++;
      end
      got++;
    end
  end

  initial begin
    in_tag = '0;
    for (int i = 0; i < N; i++) begin in_a[i] = '0; in_b[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      in_valid = (n % 9 != 4);
      in_tag = TW'(n);
      for (int i = 0; i < N; i++) begin
        as_[n][i] = -$urandom_range(0, 300);
        bs_[n][i] = -$urandom_range(0, 300);
        in_a[i] = W'(as_[n][i]); in_b[i] = W'(bs_[n][i]);
      end
      t_in[n] = cyc + 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (R + 3) @(posedge clk);
    $display("largest deviation from the exact log-sum: %0d LSB", maxdev);
    checks++; if (got != 89) begin failures++; $display("got %0d outputs", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
