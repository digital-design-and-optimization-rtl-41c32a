// tb_fht: random inputs streamed every cycle through the order-R FHT; each
// output is compared with the direct product y[j] = sum_i (-1)^popcount(i&j) x[i]
// and must leave exactly R cycles after its input, with its tag.
module tb_fht;
  localparam int R = 4, W = 10, N = 1 << R, TW = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in_x [N];
  logic signed [W+R-1:0] out_y [N];
  logic [TW-1:0] in_tag, out_tag;
  always #5 clk = ~clk;
  fht #(.R(R), .W_IN(W), .TAG_W(TW)) dut (.*);
  int checks = 0, failures = 0, cyc = 0, sent = 0, got = 0;
  int xs [256][N];
  int t_in [256];
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      checks++;
      if (cyc - t_in[out_tag] != R + 1) begin failures++; $display("latency %0d", cyc - t_in[out_tag]); end
      for (int j = 0; j < N; j++) begin
        int y;
        y = 0;
        for (int i = 0; i < N; i++) y += ($countones(i & j) % 2) ? -xs[out_tag][i] : xs[out_tag][i];
        checks++; if (int'(out_y[j]) != y) failures++;
      end
      got++;
    end
  end
  initial begin
    in_tag = '0;
    for (int i = 0; i < N; i++) in_x[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      in_valid <= (n % 7 != 5);
      in_tag <= TW'(n);
      for (int i = 0; i < N; i++) begin
        int v;
        v = (n < 4) ? ((n % 2) ? -(1 << (W-1)) : (1 << (W-1)) - 1) : $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W-1));
        if (n < 4 && (i % 2)) v = -v - 1;
        xs[n][i] = v; in_x[i] <= W'(v);
      end
      t_in[n] = cyc + 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (R + 3) @(posedge clk);
    checks++; if (got == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
