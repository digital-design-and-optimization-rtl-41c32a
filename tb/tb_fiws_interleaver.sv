// tb_fiws_interleaver: checks the FIWS interleaver memory at full size
// (R = 7 windows of depth K = 585). Component 1 writes a known value for
// every step k; the test then reads in natural order (the memory must hold
// the values de-interleaved by pattern 1) and as component 2 (interleaved by
// pattern 2). It also checks that every window pattern of components 0..4 is
// a permutation of 0..K-1 and that component 0 is the identity.
module tb_fiws_interleaver;
  import thc_pkg::*;
  localparam int R = 7, K = 585, W = 10, KW = $clog2(K);
  logic clk = 0, wr_en = 0, rd_natural = 0;
  logic [KW-1:0] wr_k = '0, rd_k = '0;
  logic signed [W-1:0] wr_data [R], rd_data [R];
  always #5 clk = ~clk;
  fiws_interleaver #(.R(R), .K(K), .W(W), .WR_COMP(1), .RD_COMP(2)) dut (.*);

  int checks = 0, failures = 0;
  function automatic int val(int k, int w);
    return ((k * 13 + w * 101) % 1000) - 500;
  endfunction

  initial begin
    // pattern properties
    for (int m = 0; m < 5; m++)
      for (int w = 0; w < R; w++) begin
        bit seen [K];
        int bad;
        bad = 0;
        for (int k = 0; k < K; k++) seen[k] = 0;
        for (int k = 0; k < K; k++) begin
          int a;
          a = perm(m, w, k, R, K);
          if (a < 0 || a >= K || seen[a]) bad++;
          else seen[a] = 1;
          if (m == 0 && a != k) bad++;
        end
        checks++;
        if (bad != 0) begin failures++; $display("pattern m=%0d w=%0d not a permutation", m, w); end
      end
    for (int w = 0; w < R; w++) wr_data[w] = '0;
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      wr_en = 1; wr_k = KW'(k);
      for (int w = 0; w < R; w++) wr_data[w] = W'(val(k, w));
      @(negedge clk);
    end
    wr_en = 0;
    // natural-order read: row n of window w holds the value written at the
    // step k with perm(1, w, k) = n
    rd_natural = 1;
    for (int k = 0; k < K; k++) begin
      rd_k = KW'(perm(1, 0, k, R, K));
      for (int w = 0; w < R; w++) begin
        rd_k = KW'(perm(1, w, k, R, K));
        #1;
        checks++;
        if (int'(rd_data[w]) != val(k, w)) begin
          failures++;
          if (failures < 10) $display("natural k=%0d w=%0d: %0d exp %0d", k, w, rd_data[w], val(k, w));
        end
      end
    end
    // interleaved read as component 2
    rd_natural = 0;
    for (int k = 0; k < K; k++) begin
      rd_k = KW'(k);
      #1;
      for (int w = 0; w < R; w++) begin
        int src;
        src = -1;
        for (int j = 0; j < K; j++) if (perm(1, w, j, R, K) == perm(2, w, k, R, K)) src = j;
        checks++;
        if (int'(rd_data[w]) != val(src, w)) begin
          failures++;
          if (failures < 10) $display("comp2 k=%0d w=%0d: %0d exp %0d", k, w, rd_data[w], val(src, w));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
