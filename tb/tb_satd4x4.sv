// tb_satd4x4: checks SATD against a matrix-product model H * (A - B) * H^T with the
// order-4 Hadamard matrix, on random blocks and on the all-0 / all-255 extreme.
module tb_satd4x4;
  logic [127:0] a, b;
  logic [31:0]  satd;
  int checks = 0, failures = 0;

  satd4x4 dut (.blk_a(a), .blk_b(b), .satd(satd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(logic [127:0] x, logic [127:0] y);
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int d [4][4], t [4][4];
    int s = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = int'(x[8*(4*r+c) +: 8]) - int'(y[8*(4*r+c) +: 8]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int v = 0;
        for (int k = 0; k < 4; k++) v += t[i][k] * hm[j][k];
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction

  initial begin
    a = '0; b = '1; #1;
    checks++; if (satd != model(a, b)) begin failures++; $display("FAIL extreme %0d", satd); end
    for (int n = 0; n < 500; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (satd != model(a, b)) begin failures++; $display("FAIL %0d vs %0d", satd, model(a, b)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
