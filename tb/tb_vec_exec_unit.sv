// tb_vec_exec_unit: issues random vector operations (4x4SAD, SATD, NAC, NAC2, VINS, VEXT)
// with ready operands; checks each result against independent models and that every
// vector instruction produces its result one cycle after it is dispatched. Also checks
// that a result held back by a busy bus is kept until granted.
module tb_vec_exec_unit;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0, alloc_valid = 0, full, busy_any, req_valid, grant;
  rs_req_t alloc_req;
  logic [TAGW-1:0] alloc_tag, req_tag;
  logic [VLEN-1:0] req_data;
  cdb_t cdb;
  logic hold = 0;
  int checks = 0, failures = 0;

  vec_exec_unit #(.TAG_BASE(TAG_VEU1)) dut (.*);
  always #5 clk = ~clk;
  assign grant = req_valid && !hold;
  assign cdb = '{valid: grant, tag: req_tag, data: req_data};

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad(logic [127:0] x, logic [127:0] y);
    int s = 0;
    for (int i = 0; i < 16; i++) begin
      int d = int'(x[8*i +: 8]) - int'(y[8*i +: 8]);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  function automatic int satd(logic [127:0] x, logic [127:0] y);
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int v = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            v += hm[i][r] * hm[j][c] * (int'(x[8*(4*r+c) +: 8]) - int'(y[8*(4*r+c) +: 8]));
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction

  function automatic logic [127:0] nac(logic sp, logic [127:0] a, logic [127:0] b);
    int w = a[31:0], h = a[63:32], cx = a[95:64], cy = a[127:96];
    int x = b[31:0], y = b[63:32];
    int px, py, pitch;
    px = sp ? cx + 4 * x : cx + x;  py = sp ? cy + 4 * y : cy + y;
    pitch = sp ? 4 * w : w;
    if (px < 0) px = 0; if (px > (sp ? 4 * w - 13 : w - 4)) px = sp ? 4 * w - 13 : w - 4;
    if (py < 0) py = 0; if (py > (sp ? 4 * h - 13 : h - 4)) py = sp ? 4 * h - 13 : h - 4;
    return {32'(y), 32'(x + 4), 32'(b[127:96] + py * pitch + px), 32'(b[95:64] + 16 * y + x)};
  endfunction

  initial begin
    op_e ops [6] = '{OP_SAD, OP_SATD, OP_NAC, OP_NAC2, OP_VINS, OP_VEXT};
    alloc_req = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [127:0] a, b, e;
      logic [31:0] imm;
      int lat;
      op_e op;
      op = ops[n % 6];
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      imm = 32'($urandom_range(0, 3));
      if (op == OP_NAC || op == OP_NAC2) begin
        a = {32'($urandom_range(0, 200)) - 50, 32'($urandom_range(0, 200)) - 50, 32'd144, 32'd176};
        b = {32'($urandom_range(0, 65535)), 32'($urandom_range(0, 4095)), 32'(4 * $urandom_range(0, 3)),
             32'(4 * $urandom_range(0, 3))};
      end
      case (op)
        OP_SAD:  e = 128'(sad(a, b));
        OP_SATD: e = 128'(satd(a, b));
        OP_NAC:  e = nac(1'b0, a, b);
        OP_NAC2: e = nac(1'b1, a, b);
        OP_VINS: begin e = a; e[32*imm[1:0] +: 32] = b[31:0]; end
        default: e = 128'(a[32*imm[1:0] +: 32]);
      endcase
      hold = (n % 7 == 0);
      @(negedge clk);
      alloc_valid = 1;
      alloc_req = '{op: op, a: '{tag: '0, val: a}, b: '{tag: '0, val: b}, imm: imm};
      @(negedge clk); alloc_valid = 0;
      lat = 0;
      while (!req_valid && lat < 10) begin @(negedge clk); lat++; end
      if (hold) begin
        repeat (3) @(negedge clk);
        checks++;
        if (!req_valid) begin failures++; $display("FAIL result dropped while bus busy"); end
        hold = 0;
      end
      checks += 2;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (req_data != e) begin failures++; $display("FAIL %s %h vs %h", op.name(), req_data, e); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
