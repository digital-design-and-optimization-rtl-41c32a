// tb_hadamard_enc: checks the order-R Hadamard encoder against code words
// taken from a Sylvester Hadamard matrix built by the recursion
// H_2n = [H H; H -H]: the output must be column j of +H (q = 0) or -H
// (q = 1), in 0/1 form, with d at positions 2^b and q at position 0.
module tb_hadamard_enc;
  localparam int R = 5, N = 1 << R;
  logic [R-1:0] d; logic q; logic [N-1:0] c;
  hadamard_enc #(.R(R)) dut (.*);
  int checks = 0, failures = 0;
  int H [N][N];
  initial begin
    H[0][0] = 1;
    for (int n = 1; n < N; n = n * 2)
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
        H[i][j+n] = H[i][j]; H[i+n][j] = H[i][j]; H[i+n][j+n] = -H[i][j];
      end
    for (int qq = 0; qq < 2; qq++) for (int dd = 0; dd < N; dd++) begin
      bit found;
      d = R'(dd); q = qq[0];
      #1;
      // the code word must be +/- a column of H
      found = 0;
      for (int j = 0; j < N; j++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < N; i++)
          if (c[i] != ((qq ? -H[i][j] : H[i][j]) < 0)) ok = 0;
        if (ok) found = 1;
      end
      checks++; if (!found) begin failures++; $display("d=%0d q=%0d not a code word", dd, qq); end
      checks++; if (c[0] !== q) failures++;
      for (int b = 0; b < R; b++) begin checks++; if (c[1 << b] !== d[b]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
