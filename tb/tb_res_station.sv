// tb_res_station: fills the station with operations whose operands wait on producer tags,
// broadcasts those tags on the bus in scrambled order, and checks that each entry
// dispatches only once both operands are captured, with the captured values, that the
// full flag follows occupancy, and that an entry is freed by the broadcast of its own tag.
module tb_res_station;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, full, busy_any, fu_ready = 1, disp_valid;
  rs_req_t alloc_req;
  logic [TAGW-1:0] alloc_tag;
  cdb_t cdb;
  fu_op_t disp;
  int checks = 0, failures = 0;

  res_station #(.DEPTH(3), .TAG_BASE(4'd4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic bcast(logic [TAGW-1:0] t, logic [VLEN-1:0] d);
    @(negedge clk); cdb = '{valid: 1'b1, tag: t, data: d};
    @(negedge clk); cdb = '0;
  endtask

  initial begin
    logic [TAGW-1:0] tags [3];
    cdb = '0; alloc_req = '0;
    #12 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      fu_ready = 0;
      // three operations; op i waits on producer tags 10+i (operand a) and 13 (operand b)
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        chk("not full before alloc", !full);
        tags[i] = alloc_tag;
        alloc_valid = 1;
        alloc_req = '{op: OP_ADD, a: '{tag: 4'(10 + i), val: '0},
                      b: '{tag: (i == 1) ? 4'd0 : 4'd13, val: VLEN'(7)}, imm: 32'(i)};
      end
      @(negedge clk); alloc_valid = 0;
      chk("full after 3 allocs", full);
      chk("distinct tags", tags[0] != tags[1] && tags[1] != tags[2] && tags[0] != tags[2]);
      fu_ready = 1;
      #1 chk("nothing ready yet", !disp_valid);
      // operand a of entry 2 arrives: still waits on b
      bcast(4'd12, VLEN'(300 + round));
      #1 chk("entry 2 still waits for b", !disp_valid);
      // operand a of entry 1 arrives: entry 1 has b already, dispatches
      bcast(4'd11, VLEN'(200 + round));
      #1 chk("entry 1 dispatches", disp_valid && disp.imm == 1 && disp.a == VLEN'(200 + round)
                                   && disp.b == VLEN'(7));
      @(negedge clk);
      #1 chk("dispatched once", !disp_valid);
      // shared operand b arrives, then a of entry 0
      bcast(4'd13, VLEN'(55));
      #1 chk("entry 2 dispatches", disp_valid && disp.imm == 2 && disp.a == VLEN'(300 + round)
                                   && disp.b == VLEN'(55));
      @(negedge clk);
      bcast(4'd10, VLEN'(100));
      #1 chk("entry 0 dispatches", disp_valid && disp.imm == 0 && disp.b == VLEN'(55) && disp.tag == tags[0]);
      @(negedge clk);
      chk("still full until results broadcast", full);
      for (int i = 0; i < 3; i++) bcast(tags[i], '0);
      chk("empty after results broadcast", !busy_any && !full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
