// tb_nac_unit: checks NAC and NAC2 pointers against the address formulas, with random
// candidates that sometimes fall outside the picture so that clamping is exercised.
module tb_nac_unit;
  logic         sub_pel;
  logic [127:0] a, b, y;
  int checks = 0, failures = 0, clamped = 0;

  nac_unit dut (.sub_pel, .a, .b, .y_out(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      int w, h, cx, cy, x, yy, ob, rb, px, py, pitch, e_orig, e_ref;
      sub_pel = n[0];
      w = 16 * $urandom_range(2, 12); h = 16 * $urandom_range(2, 9);
      cx = $urandom_range(0, 80) - 20; cy = $urandom_range(0, 80) - 20;
      if (sub_pel) begin cx *= 4; cy *= 4; end
      x = 4 * $urandom_range(0, 3); yy = 4 * $urandom_range(0, 3);
      ob = $urandom_range(0, 4095); rb = $urandom_range(4096, 65535);
      a = {32'(cy), 32'(cx), 32'(h), 32'(w)};
      b = {32'(rb), 32'(ob), 32'(yy), 32'(x)};
      #1;
      if (sub_pel) begin
        px = clip(cx + 4 * x, 4 * w - 13); py = clip(cy + 4 * yy, 4 * h - 13); pitch = 4 * w;
      end else begin
        px = clip(cx + x, w - 4); py = clip(cy + yy, h - 4); pitch = w;
      end
      if (px != (sub_pel ? cx + 4 * x : cx + x)) clamped++;
      e_orig = ob + 16 * yy + x;
      e_ref  = rb + py * pitch + px;
      checks += 2;
      if (y[31:0] != 32'(e_orig)) begin failures++; $display("FAIL pOrig"); end
      if (y[63:32] != 32'(e_ref)) begin failures++; $display("FAIL pRef %0d %0d", y[63:32], e_ref); end
    end
    checks++;
    if (clamped == 0) begin failures++; $display("FAIL clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
