// tb_lane_frontend: a lane's fetch unit. The test pops instructions at
// random moments and checks that they come in program order with the right
// contents, and that after each redirect (pc_load) the next instruction is
// the one at the new PC, even when a fetch of the old path is in flight.
module tb_lane_frontend;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inval, run, pc_load, ib_valid, ib_pop;
  addr_t pc_in, ib_pc;
  logic [31:0] ib_instr;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq; mem_rsp_t mrsp;
  int n_rd, n_wr, n_amo;

  lane_frontend dut (.*);
  line_mem_model #(.LINES(64), .LAT(3)) u_mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mreq),
    .rsp_valid(mrsp_valid), .rsp(mrsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] exp_word(addr_t a);
    logic [31:0] v;
    for (int y = 0; y < 4; y++) begin
      int x;
      x = int'(a & ~32'h3) + y;
      v[y*8 +: 8] = 8'((x * 7) + (x / 256));
    end
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t expect_pc;
    int popped = 0, redirects = 0;
    inval = 0; run = 0; pc_load = 0; pc_in = '0; ib_pop = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    pc_load = 1; pc_in = 32'h200; run = 1; expect_pc = 32'h200;
    @(posedge clk); #1 pc_load = 0;
    while (popped < 3000) begin
      @(negedge clk);
      ib_pop = 0;
      if ($urandom % 40 == 0) begin
        // redirect to a random word of the first 32 lines
        pc_load = 1; pc_in = addr_t'(($urandom % 512) * 4); expect_pc = pc_in; redirects++;
        @(posedge clk); #1 pc_load = 0;
      end else if (ib_valid && ($urandom % 3 != 0)) begin
        check(ib_pc == expect_pc, $sformatf("program order: got %h expected %h", ib_pc, expect_pc));
        check(ib_instr == exp_word(ib_pc), $sformatf("instruction at %h", ib_pc));
        ib_pop = 1; expect_pc = ib_pc + 4; popped++;
        @(posedge clk); #1 ib_pop = 0;
      end
    end
    // run low stops fetching
    run = 0; repeat (20) @(negedge clk);
    begin
      int r0;
      r0 = n_rd;
      repeat (50) @(negedge clk);
      check(n_rd == r0, "no fetch while the lane is not running");
    end
    check(redirects > 30, "redirects exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
