// warp_scheduler: EESI warp scheduler of one SM.
//
// All warps assigned to the SM stay resident: the scheduler is a circular
// buffer holding, for every warp and every lane, the PC of that thread
// (warp w, lane l), plus a done bit and an at-barrier bit. Each lane runs one
// thread at a time and reports every retiring instruction with its class
// and the PC that follows it. The lane gives up its thread (a warp switch)
// when the instruction class matches the configured trigger (NON: only at a
// barrier or exit, MEM: memory instructions, BRA: branches, MBR: both, ALL:
// every instruction), or at a barrier or exit; the thread's next PC is
// saved in the buffer. A branch that does not cause a switch redirects the
// lane's fetch to the branch's next PC.
// Two policies pick the next thread of a lane:
//   EESI-M (policy_m = 1): each lane moves on independently to the next warp,
//     in circular order, that has a runnable thread for it; lanes can run
//     different warps at the same time.
//   EESI-T (policy_m = 0): lanes follow divergent paths inside one warpset,
//     but move to the next warpset together: the SM advances only when every
//     lane has given up its thread, and then every lane that has a runnable
//     thread in the next warp with one starts it.
// When every unfinished thread waits at the barrier, barrier_reached rises;
// the SM evicts the tinyCaches and answers with barrier_ack, which releases
// the barrier. all_done rises when every thread has exited.
//
// Interface: launch (num_warps, start_pc) starts a kernel with all threads
// at start_pc; per lane: retire_valid/retire_class/retire_next_pc in,
// pc_load/pc_out/warp_out/lane_run out; switch_evt pulses on each warp
// switch. A new thread's PC is loaded one cycle after its lane is free.
//
// From the document: resident warps, a circular buffer of the PCs of a
// warpset for the different cores, EESI-T and EESI-M (Section 6.3.3,
// Fig. 6.3), the trigger set of Table 6.5, reconvergence at barriers, 24
// warps per SM (Table 5.1). This design's own choices: one thread block per
// SM for the barrier, circular warp order, the handshake with the SM.
module warp_scheduler
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANES = 32,
  parameter int unsigned WARPS = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     policy_m,
  input  trigger_e                 trigger,
  input  logic                     launch,
  input  logic [$clog2(WARPS+1)-1:0] num_warps,
  input  addr_t                    start_pc,
  input  logic [LANES-1:0]         retire_valid,
  input  iclass_e                  retire_class   [LANES],
  input  addr_t                    retire_next_pc [LANES],
  output logic [LANES-1:0]         pc_load,
  output addr_t                    pc_out   [LANES],
  output logic [$clog2(WARPS)-1:0] warp_out [LANES],
  output logic [LANES-1:0]         lane_run,
  output logic [LANES-1:0]         switch_evt,
  output logic                     barrier_reached,
  input  logic                     barrier_ack,
  output logic                     all_done
);
  localparam int unsigned WW = $clog2(WARPS);
  localparam int unsigned NW = $clog2(WARPS + 1);

  addr_t         pcs   [WARPS][LANES];
  logic          dn    [WARPS][LANES];
  logic          bar   [WARPS][LANES];
  logic [WW-1:0] cur   [LANES];
  logic [WW-1:0] gwarp;
  logic [NW-1:0] nwarps;
  logic          active;

  function automatic logic runnable(int w, int l);
    return (w < int'(nwarps)) && !dn[w][l] && !bar[w][l];
  endfunction

  function automatic logic trig(iclass_e c);
    unique case (trigger)
      TRIG_MEM: return c == IC_MEM;
      TRIG_BRA: return c == IC_BRA;
      TRIG_MBR: return c == IC_MEM || c == IC_BRA;
      TRIG_ALL: return 1'b1;
      default:  return 1'b0;
    endcase
  endfunction

  // ---- status ----
  logic any_bar, all_dn_or_bar, none_run;
  always_comb begin
    any_bar = 1'b0; all_dn_or_bar = 1'b1; none_run = (lane_run == '0);
    for (int w = 0; w < WARPS; w++)
      for (int l = 0; l < LANES; l++)
        if (w < int'(nwarps)) begin
          if (bar[w][l]) any_bar = 1'b1;
          if (!dn[w][l] && !bar[w][l]) all_dn_or_bar = 1'b0;
        end
  end
  assign barrier_reached = active && none_run && all_dn_or_bar && any_bar;
  assign all_done        = active && none_run && all_dn_or_bar && !any_bar;

  // ---- EESI-M: next warp per lane ----
  logic          m_found [LANES];
  logic [WW-1:0] m_warp  [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      m_found[l] = 1'b0; m_warp[l] = '0;
      for (int k = WARPS; k >= 1; k--) begin
        int w;
        w = (int'(cur[l]) + k) % WARPS;
        if (runnable(w, l)) begin m_found[l] = 1'b1; m_warp[l] = WW'(w); end
      end
    end
  end

  // ---- EESI-T: next warpset for the whole SM ----
  logic          t_found;
  logic [WW-1:0] t_warp;
  always_comb begin
    t_found = 1'b0; t_warp = '0;
    for (int k = WARPS; k >= 1; k--) begin
      int  w;
      logic any;
      w = (int'(gwarp) + k) % WARPS;
      any = 1'b0;
      for (int l = 0; l < LANES; l++) if (runnable(w, l)) any = 1'b1;
      if (any) begin t_found = 1'b1; t_warp = WW'(w); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; nwarps <= '0; gwarp <= '0;
      pc_load <= '0; lane_run <= '0; switch_evt <= '0;
      for (int l = 0; l < LANES; l++) begin cur[l] <= '0; pc_out[l] <= '0; warp_out[l] <= '0; end
      for (int w = 0; w < WARPS; w++)
        for (int l = 0; l < LANES; l++) begin pcs[w][l] <= '0; dn[w][l] <= 1'b1; bar[w][l] <= 1'b0; end
    end else begin
      pc_load    <= '0;
      switch_evt <= '0;
      if (launch) begin
        active   <= 1'b1;
        nwarps   <= num_warps;
        gwarp    <= WW'(WARPS - 1);
        lane_run <= '0;
        for (int l = 0; l < LANES; l++) cur[l] <= WW'(WARPS - 1);
        for (int w = 0; w < WARPS; w++)
          for (int l = 0; l < LANES; l++) begin
            pcs[w][l] <= start_pc;
            dn[w][l]  <= (w >= int'(num_warps));
            bar[w][l] <= 1'b0;
          end
      end else if (active) begin
        // retiring instructions
        for (int l = 0; l < LANES; l++) begin
          if (retire_valid[l] && lane_run[l]) begin
            if (retire_class[l] == IC_EXIT || retire_class[l] == IC_BAR || trig(retire_class[l])) begin
              pcs[cur[l]][l] <= retire_next_pc[l];
              if (retire_class[l] == IC_EXIT) dn[cur[l]][l] <= 1'b1;
              if (retire_class[l] == IC_BAR)  bar[cur[l]][l] <= 1'b1;
              lane_run[l]   <= 1'b0;
              switch_evt[l] <= 1'b1;
            end else if (retire_class[l] == IC_BRA) begin
              pc_load[l] <= 1'b1;                   // taken-branch redirect
              pc_out[l]  <= retire_next_pc[l];
            end
          end
        end
        // barrier release
        if (barrier_reached && barrier_ack)
          for (int w = 0; w < WARPS; w++)
            for (int l = 0; l < LANES; l++) bar[w][l] <= 1'b0;
        // dispatch
        if (policy_m) begin
          for (int l = 0; l < LANES; l++)
            if (!lane_run[l] && m_found[l]) begin
              lane_run[l] <= 1'b1;
              cur[l]      <= m_warp[l];
              warp_out[l] <= m_warp[l];
              pc_load[l]  <= 1'b1;
              pc_out[l]   <= pcs[m_warp[l]][l];
            end
        end else if (none_run && t_found) begin
          gwarp <= t_warp;
          for (int l = 0; l < LANES; l++) begin
            cur[l] <= t_warp;
            if (runnable(int'(t_warp), l)) begin
              lane_run[l] <= 1'b1;
              warp_out[l] <= t_warp;
              pc_load[l]  <= 1'b1;
              pc_out[l]   <= pcs[t_warp][l];
            end
          end
        end
        if (all_done) active <= 1'b0;
      end
    end
  end

  // A lane never runs a finished thread.
  for (genvar l = 0; l < LANES; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     lane_run[l] && active |-> !dn[cur[l]][l]);
  end

endmodule
