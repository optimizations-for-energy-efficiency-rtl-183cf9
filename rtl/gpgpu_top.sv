// gpgpu_top: GPU side of a heterogeneous CPU-GPU chip that shares one
// virtual address space with the CPU without copies between the two.
//
// NUM_SM streaming multiprocessors (sm) run lanes with their own fetch
// units, tiny instruction caches and tiny incoherent data caches. Their
// whole memory hierarchy is virtual: SM-L1 and IL1 per SM, and the SM-L2
// shared by all SMs (sm_l2), whose misses and write-backs are translated by
// the shared TLB (stlb) just in front of the last-level cache. The LLC, the
// CPU cores and the operating system's TLB-miss handler are outside: their
// ports are the LLC line port, the CPU lookup port and the miss/fill/inv
// ports of the shared TLB.
// A flush sequencer carries out the two hierarchy-wide write-back-and-
// invalidate operations:
//   page flush : requested by the shared TLB when a CPU touches a page the
//                GPU used or such a page is deallocated; every SM-L1 flushes
//                the page, then the SM-L2 does, then the TLB continues;
//   kernel flush : after the SMs of a kernel have reported kernel_done, the
//                driver asks (kflush_valid, kflush_kid) for the SM-L2 lines
//                of that kernel id to be written back and invalidated.
// No coherence is kept between the SMs' caches or between lanes; the
// programming model's barriers, kernel boundaries and atomics are the only
// points where data are made visible.
//
// Interface: per SM, per lane: instruction buffer, data requests and
// retire reports of the lanes' execute stages; per SM: kernel launch; chip
// wide: modes, kernel flush, CPU TLB lookups, TLB miss/fill/invalidate, LLC
// port; event outputs for statistics.
//
// From the document: the FuseTLB organisation (virtual SM caches, SM-L2
// with kernel ids, a TLB shared with the CPU before the LLC, page flushes,
// flushes at kernel end), the tinyCache SM of Fig. 5.2 and the EESI lanes,
// 4 SMs of 32 lanes (Tables 4.2, 5.1). Table 6.2 evaluates EESI with 2 SMs;
// the 4-SM configuration of the other chapters is the default here. This
// design's own choices: the sequencer and its handshakes.
module gpgpu_top
  import gpgpu_pkg::*;
#(
  parameter int unsigned NUM_SM   = 4,
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
  parameter int unsigned IL1_WAYS = 8,
  parameter int unsigned L2_SETS  = 256,
  parameter int unsigned L2_WAYS  = 16,
  parameter int unsigned TLB_ENT  = 512,
  parameter int unsigned TLB_WAYS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // modes
  input  logic              policy_m,
  input  trigger_e          trigger,
  input  logic              cache_global,
  input  logic              cache_shared,
  input  logic              code_inval,
  // per-SM kernel launch
  input  logic [NUM_SM-1:0] launch,
  input  logic [$clog2(WARPS+1)-1:0] num_warps [NUM_SM],
  input  addr_t             start_pc  [NUM_SM],
  input  kid_t              launch_kid[NUM_SM],
  output logic [NUM_SM-1:0] sm_busy,
  output logic [NUM_SM-1:0] kernel_done,
  // kernel-end flush of the SM-L2
  input  logic              kflush_valid,
  output logic              kflush_ready,
  input  kid_t              kflush_kid,
  output logic              kflush_done,
  // lanes' execute stages
  output logic [LANES-1:0]  ib_valid [NUM_SM],
  output logic [31:0]       ib_instr [NUM_SM][LANES],
  output addr_t             ib_pc    [NUM_SM][LANES],
  output logic [$clog2(WARPS)-1:0] ib_warp [NUM_SM][LANES],
  input  logic [LANES-1:0]  ib_pop   [NUM_SM],
  input  logic [LANES-1:0]  retire_valid [NUM_SM],
  input  iclass_e           retire_class   [NUM_SM][LANES],
  input  addr_t             retire_next_pc [NUM_SM][LANES],
  input  logic [LANES-1:0]  lreq_valid [NUM_SM],
  output logic [LANES-1:0]  lreq_ready [NUM_SM],
  input  lane_req_t         lreq       [NUM_SM][LANES],
  output logic [LANES-1:0]  lrsp_valid [NUM_SM],
  output logic [31:0]       lrsp_data  [NUM_SM][LANES],
  input  logic [LANES-1:0]  fence_req  [NUM_SM],
  output logic [LANES-1:0]  fence_done [NUM_SM],
  // CPU cores' second-level TLB lookups
  input  logic              creq_valid,
  output logic              creq_ready,
  input  vpn_t              creq_vpn,
  output logic              crsp_valid,
  output vpn_t              crsp_ppn,
  // TLB miss exception, refill and page deallocation
  output logic              miss_valid,
  output vpn_t              miss_vpn,
  input  logic              fill_valid,
  output logic              fill_ready,
  input  vpn_t              fill_vpn,
  input  vpn_t              fill_ppn,
  input  logic              inv_valid,
  output logic              inv_ready,
  input  vpn_t              inv_vpn,
  // last-level cache
  output logic              llc_req_valid,
  input  logic              llc_req_ready,
  output mem_req_t          llc_req,
  input  logic              llc_rsp_valid,
  input  mem_rsp_t          llc_rsp,
  // events
  output logic [LANES-1:0]  switch_evt  [NUM_SM],
  output logic [NUM_SM-1:0] barrier_evt,
  output logic [$clog2(LANES+1)-1:0] coalesced [NUM_SM],
  output logic [$clog2(NUM_SM+1)-1:0] l2_merged,
  output logic              page_flush_evt
);
  // ---------------- SMs ----------------
  logic [NUM_SM-1:0] s_dreq_valid, s_dreq_ready, s_drsp_valid;
  mem_req_t          s_dreq [NUM_SM];
  mem_rsp_t          s_drsp;
  logic [NUM_SM-1:0] pf_sm_valid, pf_sm_ready, pf_sm_done;
  vpn_t              pf_vpn;
  kid_t              sm_kid [NUM_SM];

  for (genvar s = 0; s < NUM_SM; s++) begin : g_sm
    sm #(.LANES(LANES), .WARPS(WARPS), .TC_ENT(TC_ENT), .TC_WAYS(TC_WAYS), .TCI_ENT(TCI_ENT),
         .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS), .SP_BYTES(SP_BYTES), .SP_BANKS(SP_BANKS),
         .IL1_SETS(IL1_SETS), .IL1_WAYS(IL1_WAYS)) u_sm (
      .clk, .rst_n,
      .launch(launch[s]), .num_warps(num_warps[s]), .start_pc(start_pc[s]), .launch_kid(launch_kid[s]),
      .policy_m, .trigger, .cache_global, .cache_shared, .code_inval,
      .busy(sm_busy[s]), .kernel_done(kernel_done[s]), .kid(sm_kid[s]),
      .ib_valid(ib_valid[s]), .ib_instr(ib_instr[s]), .ib_pc(ib_pc[s]), .ib_warp(ib_warp[s]),
      .ib_pop(ib_pop[s]),
      .retire_valid(retire_valid[s]), .retire_class(retire_class[s]), .retire_next_pc(retire_next_pc[s]),
      .lreq_valid(lreq_valid[s]), .lreq_ready(lreq_ready[s]), .lreq(lreq[s]),
      .lrsp_valid(lrsp_valid[s]), .lrsp_data(lrsp_data[s]),
      .fence_req(fence_req[s]), .fence_done(fence_done[s]),
      .pflush_valid(pf_sm_valid[s]), .pflush_ready(pf_sm_ready[s]), .pflush_vpn(pf_vpn),
      .pflush_done(pf_sm_done[s]),
      .dreq_valid(s_dreq_valid[s]), .dreq_ready(s_dreq_ready[s]), .dreq(s_dreq[s]),
      .drsp_valid(s_drsp_valid[s]), .drsp(s_drsp),
      .switch_evt(switch_evt[s]), .barrier_evt(barrier_evt[s]), .coalesced(coalesced[s]));
  end

  // ---------------- SM-L2 ----------------
  logic        l2_dreq_valid, l2_dreq_ready, l2_drsp_valid;
  mem_req_t    l2_dreq;
  mem_rsp_t    l2_drsp;
  logic        l2_fl_valid, l2_fl_ready, l2_fl_done;
  flush_mode_e l2_fl_mode;
  kid_t        l2_fl_kid;

  sm_l2 #(.NUM_SM(NUM_SM), .SETS(L2_SETS), .WAYS(L2_WAYS)) u_l2 (
    .clk, .rst_n,
    .ureq_valid(s_dreq_valid), .ureq_ready(s_dreq_ready), .ureq(s_dreq),
    .ursp_valid(s_drsp_valid), .ursp(s_drsp),
    .dreq_valid(l2_dreq_valid), .dreq_ready(l2_dreq_ready), .dreq(l2_dreq),
    .drsp_valid(l2_drsp_valid), .drsp(l2_drsp),
    .flush_valid(l2_fl_valid), .flush_ready(l2_fl_ready), .flush_mode(l2_fl_mode),
    .flush_kid(l2_fl_kid), .flush_vpn(pf_vpn), .flush_done(l2_fl_done),
    .merged_count(l2_merged));

  // ---------------- shared TLB ----------------
  logic pf_req, pf_done;

  stlb #(.ENTRIES(TLB_ENT), .WAYS(TLB_WAYS)) u_stlb (
    .clk, .rst_n,
    .greq_valid(l2_dreq_valid), .greq_ready(l2_dreq_ready), .greq(l2_dreq),
    .grsp_valid(l2_drsp_valid), .grsp(l2_drsp),
    .llc_req_valid, .llc_req_ready, .llc_req, .llc_rsp_valid, .llc_rsp,
    .creq_valid, .creq_ready, .creq_vpn, .crsp_valid, .crsp_ppn,
    .miss_valid, .miss_vpn, .fill_valid, .fill_ready, .fill_vpn, .fill_ppn,
    .inv_valid, .inv_ready, .inv_vpn,
    .pf_req, .pf_vpn, .pf_done);

  // ---------------- flush sequencer ----------------
  typedef enum logic [2:0] {Q_IDLE, Q_PF_L1, Q_PF_L2, Q_PF_END, Q_K_L2} qfsm_e;
  qfsm_e             q;
  logic [NUM_SM-1:0] pf_pend, pf_wait;
  logic              l2_req_pend;

  assign pf_sm_valid  = pf_pend;
  assign l2_fl_valid  = l2_req_pend;
  assign l2_fl_mode   = (q == Q_K_L2) ? FL_KID : FL_PAGE;
  assign kflush_ready = (q == Q_IDLE) && !pf_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= Q_IDLE; pf_pend <= '0; pf_wait <= '0; l2_req_pend <= 1'b0; l2_fl_kid <= '0;
      pf_done <= 1'b0; kflush_done <= 1'b0; page_flush_evt <= 1'b0;
    end else begin
      pf_done        <= 1'b0;
      kflush_done    <= 1'b0;
      page_flush_evt <= 1'b0;
      pf_pend <= pf_pend & ~pf_sm_ready;
      pf_wait <= pf_wait & ~pf_sm_done;
      if (l2_req_pend && l2_fl_ready) l2_req_pend <= 1'b0;
      unique case (q)
        Q_IDLE: begin
          if (pf_req) begin
            pf_pend <= '1; pf_wait <= '1; q <= Q_PF_L1;
          end else if (kflush_valid) begin
            l2_fl_kid <= kflush_kid; l2_req_pend <= 1'b1; q <= Q_K_L2;
          end
        end
        Q_PF_L1: if ((pf_wait & ~pf_sm_done) == '0) begin
          l2_req_pend <= 1'b1; q <= Q_PF_L2;
        end
        Q_PF_L2: if (!l2_req_pend && l2_fl_done) begin
          pf_done <= 1'b1; page_flush_evt <= 1'b1; q <= Q_PF_END;
        end
        Q_PF_END: q <= Q_IDLE;                 // let the TLB drop pf_req
        Q_K_L2: if (!l2_req_pend && l2_fl_done) begin
          kflush_done <= 1'b1; q <= Q_IDLE;
        end
        default: q <= Q_IDLE;
      endcase
    end
  end

endmodule
