// line_mem_model: behavioural memory answering the line request/response
// port of the hierarchy, for testbenches. Holds LINES lines starting at
// address 0 (addresses wrap), answers each request LAT cycles after it is
// accepted, one request at a time, and counts reads, writes and atomics.
// Contents start at a pattern derived from the address so that fills are
// distinguishable: byte i of the memory holds (i*7 + i/256) mod 256.
module line_mem_model
  import gpgpu_pkg::*;
#(
  parameter int unsigned LINES = 256,
  parameter int unsigned LAT   = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp,
  output int       n_rd,
  output int       n_wr,
  output int       n_amo
);
  line_t mem [LINES];
  int    cnt;
  logic  busy;
  mem_req_t r;

  function automatic line_t init_line(int l);
    line_t v;
    for (int b = 0; b < LINE_BYTES; b++) begin
      int a;
      a = l * LINE_BYTES + b;
      v[b*8 +: 8] = 8'((a * 7) + (a / 256));
    end
    return v;
  endfunction

  function automatic int lidx(addr_t a);
    return int'((a >> OFF_W) % LINES);
  endfunction

  initial for (int l = 0; l < LINES; l++) mem[l] = init_line(l);

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; rsp_valid <= 1'b0; rsp <= '0;
      n_rd <= 0; n_wr <= 0; n_amo <= 0; r <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy <= 1'b1; r <= req; cnt <= 0;
      end else if (busy) begin
        if (cnt + 1 >= int'(LAT)) begin
          busy <= 1'b0;
          rsp_valid <= 1'b1;
          unique case (r.op)
            MEM_RD: begin rsp.rdata <= mem[lidx(r.addr)]; n_rd <= n_rd + 1; end
            MEM_WR: begin
              mem[lidx(r.addr)] <= merge_line(mem[lidx(r.addr)], r.wdata, r.wmask);
              rsp.rdata <= '0; n_wr <= n_wr + 1;
            end
            default: begin
              logic [31:0] old;
              old = pick_word(r.addr, mem[lidx(r.addr)]);
              mem[lidx(r.addr)] <= merge_line(mem[lidx(r.addr)], place_word(r.addr, old + r.wdata[31:0]),
                                              access_bmask(r.addr, SZ_W));
              rsp.rdata <= LINE_BITS'(old); n_amo <= n_amo + 1;
            end
          endcase
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
