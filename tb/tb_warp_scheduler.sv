// tb_warp_scheduler: EESI scheduler with 24 warps of 32 lanes. A lane model
// runs an abstract program per thread (memory instructions, branches that
// skip an instruction on some lanes, a barrier, an exit whose position
// depends on the lane) and retires instructions at random moments. The test
// checks that every thread resumes exactly where it left off, that switches
// follow the trigger, that EESI-T lanes always run the same warp while EESI-M
// lanes drift apart, and that all threads pass the barrier and exit once.
module tb_warp_scheduler;
  import gpgpu_pkg::*;
  localparam int L = 32, W = 24;
  localparam addr_t START = 32'h1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic policy_m, launch, barrier_reached, barrier_ack, all_done;
  trigger_e trigger;
  logic [$clog2(W+1)-1:0] num_warps;
  addr_t start_pc;
  logic [L-1:0] retire_valid, pc_load, lane_run, switch_evt;
  iclass_e retire_class [L];
  addr_t retire_next_pc [L], pc_out [L];
  logic [$clog2(W)-1:0] warp_out [L];

  warp_scheduler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the program: instruction index i of lane l
  function automatic iclass_e cls(int i, int l);
    if (i == 30) return IC_BAR;
    if (i == ((l % 2 == 0) ? 62 : 64)) return IC_EXIT;
    if (i % 7 == 3 && (l + i) % 2 == 0) return IC_BRA;   // skips instruction i+1
    if (i % 5 == 0) return IC_MEM;
    return IC_ALU;
  endfunction
  function automatic bit trig_hit(trigger_e t, iclass_e c);
    case (t)
      TRIG_MEM: return c == IC_MEM;
      TRIG_BRA: return c == IC_BRA;
      TRIG_MBR: return c == IC_MEM || c == IC_BRA;
      TRIG_ALL: return 1'b1;
      default:  return 1'b0;
    endcase
  endfunction

  addr_t tpc  [W][L];     // where each thread must resume
  int    nexit[W][L];
  bit    have [L];        // lane holds a thread and may retire
  addr_t lpc  [L];
  int    lw   [L];
  int    n_bar = 0, n_switch = 0, n_diverged = 0, n_notsame = 0;

  always @(negedge clk) begin
    for (int l = 0; l < L; l++) if (switch_evt[l]) n_switch++;
    if (rst_n && !launch) begin
      int w0;
      bit same, any;
      same = 1; any = 0; w0 = -1;
      for (int l = 0; l < L; l++) if (lane_run[l]) begin
        if (w0 < 0) w0 = int'(warp_out[l]); else if (int'(warp_out[l]) != w0) same = 0;
        any = 1;
      end
      if (any && !same) begin if (policy_m) n_diverged++; else n_notsame++; end
    end
  end

  // lane model
  always @(negedge clk) begin
    retire_valid = '0;
    for (int l = 0; l < L; l++) begin
      if (pc_load[l]) begin
        if (!have[l]) begin
          // a new thread: must resume where it left off
          check(pc_out[l] == tpc[warp_out[l]][l],
                $sformatf("lane %0d warp %0d resumes at %h, expected %h", l, warp_out[l], pc_out[l],
                          tpc[warp_out[l]][l]));
          lw[l] = int'(warp_out[l]);
        end else
          check(pc_out[l] == lpc[l], $sformatf("lane %0d branch redirect to %h", l, pc_out[l]));
        lpc[l] = pc_out[l]; have[l] = 1;
      end else if (have[l] && lane_run[l] && $urandom % 2 == 0) begin
        int i;
        iclass_e c;
        i = int'((lpc[l] - START) / 4);
        c = cls(i, l);
        retire_valid[l]   = 1;
        retire_class[l]   = c;
        retire_next_pc[l] = lpc[l] + ((c == IC_BRA) ? 32'd8 : 32'd4);
        lpc[l] = retire_next_pc[l];
        tpc[lw[l]][l] = lpc[l];
        if (c == IC_EXIT) nexit[lw[l]][l]++;
        if (c == IC_EXIT || c == IC_BAR || trig_hit(trigger, c)) have[l] = 0;
        else if (c == IC_BRA) have[l] = 1;        // redirect comes next cycle with the same PC
      end
    end
  end

  always @(negedge clk) begin
    barrier_ack = 0;
    if (barrier_reached) begin n_bar++; barrier_ack = 1; end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_kernel(bit m, trigger_e t, int nw);
    int b0, s0, cyc;
    policy_m = m; trigger = t; num_warps = ($clog2(W+1))'(nw); start_pc = START;
    for (int w = 0; w < W; w++) for (int l = 0; l < L; l++) begin tpc[w][l] = START; nexit[w][l] = 0; end
    for (int l = 0; l < L; l++) have[l] = 0;
    n_diverged = 0; n_notsame = 0; b0 = n_bar; s0 = n_switch;
    @(negedge clk); launch = 1; @(negedge clk); launch = 0;
    cyc = 0;
    while (!all_done) begin @(negedge clk); cyc++; end
    for (int w = 0; w < nw; w++) for (int l = 0; l < L; l++)
      check(nexit[w][l] == 1, $sformatf("thread %0d/%0d exited once", w, l));
    check(n_bar == b0 + 1, $sformatf("%s %s: one barrier for the block", m ? "EESI-M" : "EESI-T", t.name()));
    if (m) check(n_diverged > 0, "EESI-M lanes ran different warps");
    else   check(n_notsame == 0, "EESI-T lanes always ran the same warp");
    $display("%s %-8s warps %0d: %0d cycles, %0d switches, %0d cycles with lanes on different warps",
             m ? "EESI-M" : "EESI-T", t.name(), nw, cyc, n_switch - s0, n_diverged + n_notsame);
  endtask

  initial begin
    policy_m = 0; trigger = TRIG_NON; launch = 0; num_warps = '0; start_pc = '0;
    retire_valid = '0; barrier_ack = 0;
    for (int l = 0; l < L; l++) begin retire_class[l] = IC_ALU; retire_next_pc[l] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    run_kernel(0, TRIG_MEM, 24);
    run_kernel(1, TRIG_MEM, 24);
    run_kernel(0, TRIG_BRA, 24);
    run_kernel(1, TRIG_MBR, 24);
    run_kernel(1, TRIG_ALL, 5);
    run_kernel(0, TRIG_NON, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
