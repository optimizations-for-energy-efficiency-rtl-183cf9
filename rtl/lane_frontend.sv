// lane_frontend: the instruction fetch unit and instruction buffer that
// each EESI lane owns, with its tiny instruction cache.
//
// The warp scheduler (or a taken branch) loads a new fetch address with
// pc_load/pc_in; this empties the instruction buffer and discards a fetch
// that is still in flight. Otherwise the unit fetches sequentially (pc + 4)
// through the lane's tiny_icache whenever the buffer has a free slot, so a
// lane can follow its own control path independently of the other lanes.
// The execute stage takes instructions from the head of the buffer with
// ib_pop. run low stops fetching (the lane has no thread) and hides the
// buffer, as does a pc_load in progress, so instructions of a thread that
// has just been switched out are never handed to the execute stage.
//
// Interface: pc_load/pc_in/run from the scheduler; ib_valid/ib_instr/ib_pc
// and ib_pop towards the execute stage; inval clears the tiny_icache; the
// IL1 line port. After a pc_load on a hit, the first instruction is in the
// buffer two cycles later.
//
// From the document: an IF unit and instruction buffers per lane with a
// tinyIcache (Section 6.3). This design's own choices: buffer depth, one
// fetch in flight, sequential next-PC.
module lane_frontend
  import gpgpu_pkg::*;
#(
  parameter int unsigned IB_DEPTH   = 2,
  parameter int unsigned IC_ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inval,
  input  logic        run,
  input  logic        pc_load,
  input  addr_t       pc_in,
  output logic        ib_valid,
  output logic [31:0] ib_instr,
  output addr_t       ib_pc,
  input  logic        ib_pop,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  input  mem_rsp_t    mrsp
);
  localparam int unsigned PW = (IB_DEPTH > 1) ? $clog2(IB_DEPTH) : 1;

  logic [31:0]   q_instr [IB_DEPTH];
  addr_t         q_pc    [IB_DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;

  addr_t fetch_pc;      // next address to fetch
  addr_t fl_pc;         // address of the fetch in flight
  logic  inflight, stale;

  logic        freq_valid, freq_ready, frsp_valid;
  logic [31:0] frsp_instr;

  // a slot must be free for the fetch in flight as well
  assign freq_valid = run && !pc_load && !inflight &&
                      (count + (PW+1)'(inflight)) < (PW+1)'(IB_DEPTH);

  tiny_icache #(.ENTRIES(IC_ENTRIES)) u_tci (
    .clk, .rst_n, .inval,
    .freq_valid, .freq_ready, .freq_pc(fetch_pc),
    .frsp_valid, .frsp_instr,
    .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp);

  assign ib_valid = (count != '0) && run && !pc_load;   // hidden while the thread is not (yet) running
  assign ib_instr = q_instr[rd_ptr];
  assign ib_pc    = q_pc[rd_ptr];

  logic push, pop;
  assign push = frsp_valid && !stale && !pc_load;
  assign pop  = ib_pop && ib_valid && !pc_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; count <= '0;
      fetch_pc <= '0; fl_pc <= '0; inflight <= 1'b0; stale <= 1'b0;
      for (int i = 0; i < IB_DEPTH; i++) begin q_instr[i] <= '0; q_pc[i] <= '0; end
    end else begin
      if (frsp_valid) begin inflight <= 1'b0; stale <= 1'b0; end
      if (freq_valid && freq_ready) begin
        inflight <= 1'b1;
        fl_pc    <= fetch_pc;
        fetch_pc <= fetch_pc + 32'd4;
      end
      if (pc_load) begin
        rd_ptr <= '0; wr_ptr <= '0; count <= '0;
        fetch_pc <= pc_in;
        // a fetch still in flight belongs to the old path
        stale <= inflight && !frsp_valid;
        if (!(inflight && !frsp_valid)) inflight <= 1'b0;
      end else begin
        if (push) begin
          q_instr[wr_ptr] <= frsp_instr;
          q_pc[wr_ptr]    <= fl_pc;
          wr_ptr <= (wr_ptr == PW'(IB_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        end
        if (pop) rd_ptr <= (rd_ptr == PW'(IB_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        count <= count + (PW+1)'(push) - (PW+1)'(pop);
      end
    end
  end
endmodule
