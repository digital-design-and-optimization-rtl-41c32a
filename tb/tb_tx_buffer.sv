// tb_tx_buffer: checks the ping-pong transmit buffer (R = 3, K = 4, M = 2).
// The test fills set 0, hands it over with enc_done, fills set 1 while set 0
// is read back, and checks the contents, the full/empty flags (enc_ok, tx_ok)
// and the set pointers through two full cycles of both sets.
module tb_tx_buffer;
  localparam int R = 3, K = 4, M = 2, NP = (1 << R) - R, AW = $clog2(M * K);
  logic clk = 0, rst_n = 0;
  logic enc_ok, enc_set, enc_done = 0, wr_info_en = 0, wr_par_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [R-1:0] wr_info = '0, rd_info;
  logic [M*NP-1:0] wr_par = '0, rd_par;
  logic tx_ok, tx_set, tx_done = 0;
  always #5 clk = ~clk;
  tx_buffer #(.R(R), .K(K), .M(M)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [R-1:0] iv(int s, int a);
    return R'(s * 5 + a * 3 + 1);
  endfunction
  function automatic logic [M*NP-1:0] pv(int s, int a);
    return (M*NP)'(s * 311 + a * 97 + 7);
  endfunction

  task automatic fill(int s);
    for (int a = 0; a < M * K; a++) begin
      wr_info_en = 1; wr_par_en = 1; wr_addr = AW'(a);
      wr_info = iv(s, a); wr_par = pv(s, a);
      @(negedge clk);
    end
    wr_info_en = 0; wr_par_en = 0;
    enc_done = 1; @(negedge clk); enc_done = 0;
  endtask

  task automatic drain(int s);
    for (int a = 0; a < M * K; a++) begin
      rd_addr = AW'(a); #1;
      chk(rd_info == iv(s, a) && rd_par == pv(s, a), $sformatf("read set %0d addr %0d", s, a));
    end
    @(negedge clk);
    tx_done = 1; @(negedge clk); tx_done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(enc_ok && !tx_ok && enc_set == 0 && tx_set == 0, "after reset: empty");
    fill(0);
    chk(enc_ok && enc_set == 1 && tx_ok && tx_set == 0, "set 0 full, set 1 free");
    fill(1);
    chk(!enc_ok && tx_ok, "both sets full: encoder must wait");
    drain(0);
    chk(enc_ok && enc_set == 0 && tx_set == 1 && tx_ok, $sformatf("set 0 released %b %b %b %b", enc_ok, enc_set, tx_set, tx_ok));
    fill(2);
    drain(1);
    drain(2);
    chk(enc_ok && !tx_ok && enc_set == 1 && tx_set == 1, "all drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
