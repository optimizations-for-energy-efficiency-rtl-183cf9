// lane_exec_model: behavioural decode/execute stages of the lanes of one SM,
// for testbenches. Each lane takes one instruction at a time from its
// instruction buffer, executes it (memory instructions through the lane's
// tinyCache port), and reports it to the warp scheduler as it retires.
//
// The instruction encoding belongs to the testbenches (opcode in bits
// 31:28); thread index s = warp * LANES + lane inside the SM and
// t = SM_ID * WARPS * LANES + s over the whole GPU:
//   0 ALU   r2 = 3 * r1 + r2             6 LDS   r3 = shared[(s+1) mod n]
//   1 LDX   r1 = X[t]                    7 STZ   Z[t] = r3
//   2 LDY   r2 = Y[t]                    8 AMO   CNT += 1 (lane 0 only)
//   3 STY   Y[t] = r2                    9 BRA   odd lanes jump by imm
//   4 STS   shared[s] = r2              10 STB   byte W[t] = t[7:0]
//   5 BAR                               11 EXIT
//                                       12 FENCE (waits for fence_done)
// X, Y, Z are word arrays at XB, YB, ZB, W a byte array at WB; n is the
// number of threads of the SM (nthreads). n_hit counts memory instructions
// answered in the cycle after their acceptance, i.e. tinyCache hits.
module lane_exec_model
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANES = 32,
  parameter int unsigned WARPS = 24,
  parameter int unsigned SM_ID = 0,
  parameter addr_t XB  = 32'h0000_4000,
  parameter addr_t YB  = 32'h0000_8000,
  parameter addr_t ZB  = 32'h0000_C000,
  parameter addr_t WB  = 32'h0001_0000,
  parameter addr_t CNT = 32'h0001_2000
) (
  input  logic                 clk,
  input  logic [LANES-1:0]     ib_valid,
  input  logic [31:0]          ib_instr [LANES],
  input  addr_t                ib_pc    [LANES],
  input  logic [$clog2(WARPS)-1:0] ib_warp [LANES],
  output logic [LANES-1:0]     ib_pop,
  output logic [LANES-1:0]     retire_valid,
  output iclass_e              retire_class   [LANES],
  output addr_t                retire_next_pc [LANES],
  output logic [LANES-1:0]     lreq_valid,
  input  logic [LANES-1:0]     lreq_ready,
  output lane_req_t            lreq [LANES],
  input  logic [LANES-1:0]     lrsp_valid,
  input  logic [31:0]          lrsp_data [LANES],
  output logic [LANES-1:0]     fence_req,
  input  logic [LANES-1:0]     fence_done,
  input  int                   nthreads,
  output int                   n_mem,
  output int                   n_amo,
  output int                   n_hit,
  output int                   n_retired,
  output int                   n_fence
);
  logic [31:0] r1 [WARPS][LANES], r2 [WARPS][LANES], r3 [WARPS][LANES];

  initial begin
    ib_pop = '0; retire_valid = '0; lreq_valid = '0; fence_req = '0;
    n_fence = 0; n_mem = 0; n_amo = 0; n_hit = 0; n_retired = 0;
    for (int l = 0; l < LANES; l++) begin
      retire_class[l] = IC_ALU; retire_next_pc[l] = '0; lreq[l] = '0;
    end
    for (int l = 0; l < LANES; l++) begin
      automatic int ll = l;
      fork lane(ll); join_none
    end
  end

  task automatic mem_op(int l, lane_op_e op, space_e sp, size_e sz, addr_t a, logic [31:0] d,
                        output logic [31:0] r);
    int wait_cyc;
    lreq[l] = '{op: op, space: sp, size: sz, addr: a, wdata: d};
    lreq_valid[l] = 1;
    n_mem++;
    #1; while (!lreq_ready[l]) begin @(negedge clk); #1; end
    @(posedge clk); #1 lreq_valid[l] = 0;
    @(negedge clk);
    wait_cyc = 1;
    while (!lrsp_valid[l]) begin @(negedge clk); wait_cyc++; end
    if (wait_cyc == 1) n_hit++;                 // answered right after acceptance
    r = lrsp_data[l];
  endtask

  task automatic lane(int l);
    forever begin
      logic [31:0] ins, r;
      addr_t pc, npc;
      int w, s, t;
      iclass_e c;
      @(negedge clk);
      if (!ib_valid[l]) continue;
      ins = ib_instr[l]; pc = ib_pc[l]; w = int'(ib_warp[l]);
      s = w * int'(LANES) + l;
      t = int'(SM_ID * WARPS * LANES) + s;
      ib_pop[l] = 1;
      @(posedge clk); #1 ib_pop[l] = 0;
      npc = pc + 4;
      c = IC_MEM;
      unique case (ins[31:28])
        4'd0: begin r2[w][l] = 3 * r1[w][l] + r2[w][l]; c = IC_ALU; end
        4'd1: mem_op(l, LN_LD, SP_GLOBAL, SZ_W, XB + addr_t'(4 * t), '0, r1[w][l]);
        4'd2: mem_op(l, LN_LD, SP_GLOBAL, SZ_W, YB + addr_t'(4 * t), '0, r2[w][l]);
        4'd3: mem_op(l, LN_ST, SP_GLOBAL, SZ_W, YB + addr_t'(4 * t), r2[w][l], r);
        4'd4: mem_op(l, LN_ST, SP_SHARED, SZ_W, addr_t'(4 * s), r2[w][l], r);
        4'd5: c = IC_BAR;
        4'd6: mem_op(l, LN_LD, SP_SHARED, SZ_W, addr_t'(4 * ((s + 1) % nthreads)), '0, r3[w][l]);
        4'd7: mem_op(l, LN_ST, SP_GLOBAL, SZ_W, ZB + addr_t'(4 * t), r3[w][l], r);
        4'd8: if (l == 0) begin mem_op(l, LN_AMO, SP_GLOBAL, SZ_W, CNT, 32'd1, r); n_amo++; end
              else c = IC_ALU;
        4'd9: begin c = IC_BRA; if (l % 2 == 1) npc = pc + addr_t'(ins[27:0]); end
        4'd10: mem_op(l, LN_ST, SP_GLOBAL, SZ_B, WB + addr_t'(t), {4{8'(t)}}, r);
        4'd12: begin
          fence_req[l] = 1;
          @(negedge clk);
          while (!fence_done[l]) @(negedge clk);
          @(posedge clk); #1 fence_req[l] = 0;
          n_fence++;
        end
        default: c = IC_EXIT;
      endcase
      if (c != IC_MEM) @(negedge clk);
      retire_valid[l] = 1; retire_class[l] = c; retire_next_pc[l] = npc;
      n_retired++;
      @(posedge clk); #1 retire_valid[l] = 0;
    end
  endtask
endmodule
