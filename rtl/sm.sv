// sm: one streaming multiprocessor of the EESI GPGPU with tiny incoherent
// caches.
//
// Every lane has its own fetch unit with a tiny instruction cache
// (lane_frontend) and its own tiny data cache (tinycache). The lanes'
// tinyCache misses meet at the coalescer and go to the SM-L1 (scratchpad
// plus virtual data cache); the tiny instruction caches' misses go to the
// IL1. IL1 and SM-L1 misses share one port to the SM-L2 through a second
// merging arbiter. The warp scheduler hands threads to the lanes and
// redirects their fetch units. The decode/execute part of each lane is
// outside this module: it takes instructions from the lane's buffer, sends
// loads, stores and atomics to the lane's tinyCache and reports each
// retiring instruction to the scheduler.
// A small controller sequences the coherence actions that the programming
// model needs:
//   barrier : when all unfinished threads wait at the barrier, every
//             tinyCache writes back and invalidates its lines, then the
//             barrier is released;
//   fence    : a lane's memory fence (fence_req) writes back and
//             invalidates that lane's tinyCache; fence_done answers it;
//   kernel end : when all threads have exited, the tinyCaches are flushed,
//             the SM-L1 writes back and invalidates all lines, the
//             scratchpad is cleared and kernel_done pulses.
// Page flushes requested by the shared TLB use the SM-L1's flush port
// (pflush_*) while no kernel-end flush is using it.
//
// Interface: per-lane execute-side ports (instruction buffer, data
// requests, retire reports), kernel launch and mode inputs, the page-flush
// handshake and the SM-L2 line port; event outputs for statistics.
//
// From the document: the organisation of Fig. 5.2 (lanes with TC-D, a
// coalescing unit shared by the lanes, scratchpad/DL1, IL1, warp scheduler)
// extended with the per-lane fetch units and tinyIcaches of EESI, the
// eviction of tinyCaches at barriers and block end, and the SM-L1 flush at
// kernel end. This design's own choices: the controller and the order of
// its steps, and that a kernel runs as one thread block per SM.
module sm
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANES    = 32,
  parameter int unsigned WARPS    = 24,
  parameter int unsigned TC_ENT   = 16,
  parameter int unsigned TC_WAYS  = 8,
  parameter int unsigned TCI_ENT  = 8,
  parameter int unsigned L1_SETS  = 128,
  parameter int unsigned L1_WAYS  = 8,
  parameter int unsigned SP_BYTES = 48 * 1024,
  parameter int unsigned SP_BANKS = 8,
  parameter int unsigned IL1_SETS = 64,
  parameter int unsigned IL1_WAYS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // kernel control and modes
  input  logic                 launch,
  input  logic [$clog2(WARPS+1)-1:0] num_warps,
  input  addr_t                start_pc,
  input  kid_t                 launch_kid,
  input  logic                 policy_m,
  input  trigger_e             trigger,
  input  logic                 cache_global,
  input  logic                 cache_shared,
  input  logic                 code_inval,
  output logic                 busy,
  output logic                 kernel_done,
  output kid_t                 kid,
  // lanes' execute side
  output logic [LANES-1:0]     ib_valid,
  output logic [31:0]          ib_instr [LANES],
  output addr_t                ib_pc    [LANES],
  output logic [$clog2(WARPS)-1:0] ib_warp [LANES],
  input  logic [LANES-1:0]     ib_pop,
  input  logic [LANES-1:0]     retire_valid,
  input  iclass_e              retire_class   [LANES],
  input  addr_t                retire_next_pc [LANES],
  input  logic [LANES-1:0]     lreq_valid,
  output logic [LANES-1:0]     lreq_ready,
  input  lane_req_t            lreq [LANES],
  output logic [LANES-1:0]     lrsp_valid,
  output logic [31:0]          lrsp_data [LANES],
  input  logic [LANES-1:0]     fence_req,    // held until fence_done
  output logic [LANES-1:0]     fence_done,
  // page flush from the shared TLB
  input  logic                 pflush_valid,
  output logic                 pflush_ready,
  input  vpn_t                 pflush_vpn,
  output logic                 pflush_done,
  // SM-L2 port
  output logic                 dreq_valid,
  input  logic                 dreq_ready,
  output mem_req_t             dreq,
  input  logic                 drsp_valid,
  input  mem_rsp_t             drsp,
  // events
  output logic [LANES-1:0]     switch_evt,
  output logic                 barrier_evt,
  output logic [$clog2(LANES+1)-1:0] coalesced
);
  // ---------------- warp scheduler ----------------
  logic [LANES-1:0] pc_load, lane_run;
  addr_t            pc_out [LANES];
  logic             barrier_reached, barrier_ack, all_done;

  warp_scheduler #(.LANES(LANES), .WARPS(WARPS)) u_ws (
    .clk, .rst_n, .policy_m, .trigger, .launch, .num_warps, .start_pc,
    .retire_valid, .retire_class, .retire_next_pc,
    .pc_load, .pc_out, .warp_out(ib_warp), .lane_run, .switch_evt,
    .barrier_reached, .barrier_ack, .all_done);

  // ---------------- controller ----------------
  typedef enum logic [2:0] {C_IDLE, C_RUN, C_BAR_TC, C_END_TC, C_END_L1, C_END_SP} cfsm_e;
  cfsm_e            cfsm;
  logic [LANES-1:0] tc_pend, tc_flush, tc_done;
  logic             l1_fl_valid, l1_fl_ready, l1_fl_done;
  flush_mode_e      l1_fl_mode;
  vpn_t             l1_fl_vpn;
  logic             own_fl_valid, kernel_end;

  // A lane's memory fence writes back and invalidates its own tinyCache. A
  // lane waiting for its fence still runs its thread, so a fence never
  // overlaps the barrier or kernel-end flush of all tinyCaches.
  assign tc_flush   = (tc_pend | fence_req) & ~tc_done;
  assign fence_done = tc_done & fence_req;
  assign busy     = (cfsm != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfsm <= C_IDLE; tc_pend <= '0; kid <= '0; kernel_done <= 1'b0;
      barrier_ack <= 1'b0; barrier_evt <= 1'b0; own_fl_valid <= 1'b0; kernel_end <= 1'b0;
    end else begin
      kernel_done <= 1'b0;
      barrier_ack <= 1'b0;
      barrier_evt <= 1'b0;
      kernel_end  <= 1'b0;
      tc_pend     <= tc_pend & ~tc_done;
      unique case (cfsm)
        C_IDLE: if (launch) begin kid <= launch_kid; cfsm <= C_RUN; end
        C_RUN: begin
          if (barrier_reached && !barrier_ack) begin
            tc_pend <= '1; cfsm <= C_BAR_TC;
          end else if (all_done) begin
            tc_pend <= '1; cfsm <= C_END_TC;
          end
        end
        C_BAR_TC: if ((tc_pend & ~tc_done) == '0) begin
          barrier_ack <= 1'b1; barrier_evt <= 1'b1; cfsm <= C_RUN;
        end
        C_END_TC: if ((tc_pend & ~tc_done) == '0) begin
          own_fl_valid <= 1'b1; cfsm <= C_END_L1;
        end
        C_END_L1: begin
          if (own_fl_valid && l1_fl_ready) own_fl_valid <= 1'b0;
          if (!own_fl_valid && l1_fl_done) begin kernel_end <= 1'b1; cfsm <= C_END_SP; end
        end
        C_END_SP: begin kernel_done <= 1'b1; cfsm <= C_IDLE; end
        default: cfsm <= C_IDLE;
      endcase
    end
  end

  // SM-L1 flush port: the kernel-end flush, otherwise the page flushes
  logic own_fl;
  assign own_fl       = (cfsm == C_END_L1);
  assign l1_fl_valid  = own_fl ? own_fl_valid : pflush_valid;
  assign l1_fl_mode   = own_fl ? FL_ALL : FL_PAGE;
  assign l1_fl_vpn    = pflush_vpn;
  assign pflush_ready = !own_fl && l1_fl_ready;
  assign pflush_done  = !own_fl && l1_fl_done;

  // ---------------- lanes ----------------
  logic [LANES-1:0] ic_mreq_valid, ic_mreq_ready, ic_mrsp_valid;
  mem_req_t         ic_mreq [LANES];
  mem_rsp_t         ic_mrsp;
  logic [LANES-1:0] tc_mreq_valid, tc_mreq_ready, tc_mrsp_valid;
  mem_req_t         tc_mreq [LANES];
  mem_rsp_t         tc_mrsp;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    lane_frontend #(.IC_ENTRIES(TCI_ENT)) u_fe (
      .clk, .rst_n, .inval(code_inval), .run(lane_run[l]),
      .pc_load(pc_load[l]), .pc_in(pc_out[l]),
      .ib_valid(ib_valid[l]), .ib_instr(ib_instr[l]), .ib_pc(ib_pc[l]), .ib_pop(ib_pop[l]),
      .mreq_valid(ic_mreq_valid[l]), .mreq_ready(ic_mreq_ready[l]), .mreq(ic_mreq[l]),
      .mrsp_valid(ic_mrsp_valid[l]), .mrsp(ic_mrsp));

    tinycache #(.ENTRIES(TC_ENT), .WAYS(TC_WAYS)) u_tc (
      .clk, .rst_n, .cache_global, .cache_shared,
      .flush_req(tc_flush[l]), .flush_done(tc_done[l]),
      .lreq_valid(lreq_valid[l]), .lreq_ready(lreq_ready[l]), .lreq(lreq[l]),
      .lrsp_valid(lrsp_valid[l]), .lrsp_data(lrsp_data[l]),
      .mreq_valid(tc_mreq_valid[l]), .mreq_ready(tc_mreq_ready[l]), .mreq(tc_mreq[l]),
      .mrsp_valid(tc_mrsp_valid[l]), .mrsp(tc_mrsp));
  end

  // ---------------- shared SM structures ----------------
  logic     co_valid, co_ready, co_rsp_valid;
  mem_req_t co_req;
  mem_rsp_t co_rsp;

  coalescer #(.LANES(LANES)) u_coal (
    .clk, .rst_n,
    .ureq_valid(tc_mreq_valid), .ureq_ready(tc_mreq_ready), .ureq(tc_mreq),
    .ursp_valid(tc_mrsp_valid), .ursp(tc_mrsp),
    .dreq_valid(co_valid), .dreq_ready(co_ready), .dreq(co_req),
    .drsp_valid(co_rsp_valid), .drsp(co_rsp), .merged_count(coalesced));

  logic [1:0] dn_valid, dn_ready, dn_rsp_valid;
  mem_req_t   dn_req [2];
  mem_rsp_t   dn_rsp;
  logic       il1_inval_done;
  logic [1:0] dn_merged;

  sm_l1 #(.SETS(L1_SETS), .WAYS(L1_WAYS), .SP_BYTES(SP_BYTES), .SP_BANKS(SP_BANKS)) u_l1 (
    .clk, .rst_n, .kid, .kernel_end,
    .ureq_valid(co_valid), .ureq_ready(co_ready), .ureq(co_req),
    .ursp_valid(co_rsp_valid), .ursp(co_rsp),
    .dreq_valid(dn_valid[0]), .dreq_ready(dn_ready[0]), .dreq(dn_req[0]),
    .drsp_valid(dn_rsp_valid[0]), .drsp(dn_rsp),
    .flush_valid(l1_fl_valid), .flush_ready(l1_fl_ready), .flush_mode(l1_fl_mode),
    .flush_kid(kid), .flush_vpn(l1_fl_vpn), .flush_done(l1_fl_done));

  il1 #(.LANES(LANES), .SETS(IL1_SETS), .WAYS(IL1_WAYS)) u_il1 (
    .clk, .rst_n, .kid, .inval(code_inval), .inval_done(il1_inval_done),
    .ureq_valid(ic_mreq_valid), .ureq_ready(ic_mreq_ready), .ureq(ic_mreq),
    .ursp_valid(ic_mrsp_valid), .ursp(ic_mrsp),
    .dreq_valid(dn_valid[1]), .dreq_ready(dn_ready[1]), .dreq(dn_req[1]),
    .drsp_valid(dn_rsp_valid[1]), .drsp(dn_rsp));

  coalescer #(.LANES(2)) u_dn (
    .clk, .rst_n,
    .ureq_valid(dn_valid), .ureq_ready(dn_ready), .ureq(dn_req),
    .ursp_valid(dn_rsp_valid), .ursp(dn_rsp),
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp, .merged_count(dn_merged));

endmodule
