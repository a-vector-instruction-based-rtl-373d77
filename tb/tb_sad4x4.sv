// tb_sad4x4: checks the 4x4 SAD datapath against a per-pixel software sum on random
// blocks and on the extreme case (all 0 against all 255 gives 4080).
module tb_sad4x4;
  logic [127:0] a, b;
  logic [31:0]  sad;
  int checks = 0, failures = 0;

  sad4x4 dut (.blk_a(a), .blk_b(b), .sad(sad));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(logic [127:0] x, logic [127:0] y);
    int s = 0;
    for (int i = 0; i < 16; i++) begin
      int d = int'(x[8*i +: 8]) - int'(y[8*i +: 8]);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  initial begin
    a = '0; b = '1; #1;
    checks++; if (sad != 4080) begin failures++; $display("FAIL extreme %0d", sad); end
    for (int n = 0; n < 500; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (sad != model(a, b)) begin failures++; $display("FAIL %0d vs %0d", sad, model(a, b)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
