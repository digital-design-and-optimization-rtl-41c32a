// tb_conv_hadamard_enc: drives random blocks through the convolutional
// Hadamard encoder and checks q_k = XOR(d_k) ^ q_(k-1) (state cleared by
// init) and every parity output against sum-of-products Hadamard parity
// c[i] = q ^ XOR_b(i_b & (d_b ^ q)) at the non-information positions in
// increasing order.
module tb_conv_hadamard_enc;
  localparam int R = 7, NP = (1 << R) - R;
  logic clk = 0, rst_n = 0, init = 0, valid = 0;
  logic [R-1:0] d; logic [NP-1:0] par; logic q;
  always #5 clk = ~clk;
  conv_hadamard_enc #(.R(R)) dut (.*);
  int checks = 0, failures = 0;
  bit st;
  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      bit eq; int pi;
      init = (n % 50 == 0);
      valid = !init;
      d = R'($urandom);
      #1;
      if (init) begin
        @(negedge clk);
        st = 0;
        continue;
      end
      eq = (^d) ^ st;
      checks++; if (q !== eq) begin failures++; $display("n=%0d q=%b exp %b", n, q, eq); end
      pi = 0;
      for (int i = 0; i < (1 << R); i++) if ($countones(i) != 1) begin
        bit e;
        e = eq;
        for (int b = 0; b < R; b++) e ^= (i >> b) & 1 & (d[b] ^ eq);
        checks++; if (par[pi] !== e) failures++;
        pi++;
      end
      @(negedge clk);
      if (valid) st = eq;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
