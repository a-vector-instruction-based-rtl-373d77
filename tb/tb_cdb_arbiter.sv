// tb_cdb_arbiter: random request patterns; checks that exactly one requester wins when
// any requests, that the bus carries the winner's tag and data, and that a requester that
// keeps requesting is granted within N cycles (round-robin fairness).
module tb_cdb_arbiter;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] req, grant;
  logic [TAGW-1:0] tag [4];
  logic [VLEN-1:0] data [4];
  cdb_t cdb;
  int checks = 0, failures = 0;
  int wait_cnt [4];

  cdb_arbiter #(.N(4)) dut (.clk, .rst_n, .req, .req_tag(tag), .req_data(data), .grant, .cdb);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin tag[i] = TAGW'(i + 1); data[i] = VLEN'(100 + i); wait_cnt[i] = 0; end
    req = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      req = (n < 200) ? 4'($urandom) : 4'hF;
      #1;
      checks++;
      if (req != 0 && !$onehot(grant)) begin failures++; $display("FAIL grant %b", grant); end
      if (req == 0 && grant != 0) begin failures++; $display("FAIL spurious grant"); end
      for (int i = 0; i < 4; i++) if (grant[i]) begin
        checks++;
        if (!req[i] || cdb.tag != tag[i] || cdb.data != data[i] || !cdb.valid) begin
          failures++; $display("FAIL bus contents");
        end
      end
      if (n >= 200) for (int i = 0; i < 4; i++) begin
        wait_cnt[i] = grant[i] ? 0 : wait_cnt[i] + 1;
        checks++;
        if (wait_cnt[i] >= 4) begin failures++; $display("FAIL starvation of %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
