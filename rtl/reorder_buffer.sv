// reorder_buffer: the reorder buffer (ROB) of the late-commit pipelines.
//
// A circular buffer of ENTRIES entries, each holding V (entry valid), P
// (pending: an instruction in flight targets this entry), a second valid bit
// for the destination register specifier (dest_v), the destination register
// rdest, and an exception flag with the excepting instruction's address (this
// design's addition, so that exceptions are taken at commit). Entries are allocated in order at the tail by the decode
// stage, have their pending bit cleared out of order by the write-back stage,
// and are deallocated in order from the head by the commit stage, which waits
// for the head's pending bit to clear.
//
// Timing: alloc_idx is the tail, valid in the cycle of the allocation; full is
// based on the occupancy at the start of the cycle (a commit in the same cycle
// does not free room for an allocation). head_* describe the head entry; the
// commit stage pops it with commit_pop. flush empties the buffer.
module reorder_buffer
  import ooo_pkg::*;
#(
  parameter int ENTRIES = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  flush,
  // allocate (D stage)
  input  logic                  alloc_val,
  input  logic                  alloc_dest_v,
  input  logic [REG_W-1:0]      alloc_rd,
  output logic [ROB_IDX_W-1:0]  alloc_idx,
  output logic                  full,
  // update (W stage)
  input  logic                  upd_val,
  input  logic [ROB_IDX_W-1:0]  upd_idx,
  input  logic                  upd_exc,
  input  logic [31:0]           upd_pc,
  // commit (C stage)
  output logic                  head_val,
  output logic                  head_pending,
  output logic                  head_dest_v,
  output logic [REG_W-1:0]      head_rd,
  output logic                  head_exc,
  output logic [31:0]           head_pc,
  output logic [ROB_IDX_W-1:0]  head_idx,
  input  logic                  commit_pop,
  output logic                  empty
);
  localparam int PW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]            v_q, p_q, dv_q, exc_q;
  logic [ENTRIES-1:0][REG_W-1:0] rd_q;
  logic [ENTRIES-1:0][31:0]      pc_q;
  logic [PW-1:0]                 head_q, tail_q;
  logic [PW:0]                   count_q;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] x);
    return (int'(x) == ENTRIES - 1) ? '0 : x + 1'b1;
  endfunction

  assign full         = (int'(count_q) == ENTRIES);
  assign empty        = (count_q == '0);
  assign alloc_idx    = ROB_IDX_W'(tail_q);
  assign head_idx     = ROB_IDX_W'(head_q);
  assign head_val     = v_q[head_q];
  assign head_pending = p_q[head_q];
  assign head_dest_v  = dv_q[head_q];
  assign head_rd      = rd_q[head_q];
  assign head_exc     = exc_q[head_q];
  assign head_pc      = pc_q[head_q];

  logic do_alloc, do_pop;
  assign do_alloc = alloc_val && !full;
  assign do_pop   = commit_pop && head_val && !head_pending;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      v_q     <= '0;
      p_q     <= '0;
      exc_q   <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (upd_val) begin
        p_q[PW'(upd_idx)]   <= 1'b0;
        exc_q[PW'(upd_idx)] <= upd_exc;
        pc_q[PW'(upd_idx)]  <= upd_pc;
      end
      if (do_pop) begin
        v_q[head_q] <= 1'b0;
        head_q      <= incr(head_q);
      end
      if (do_alloc) begin
        v_q[tail_q]   <= 1'b1;
        p_q[tail_q]   <= 1'b1;
        exc_q[tail_q] <= 1'b0;
        dv_q[tail_q]  <= alloc_dest_v;
        rd_q[tail_q]  <= alloc_rd;
        tail_q        <= incr(tail_q);
      end
      count_q <= count_q + (PW+1)'(do_alloc) - (PW+1)'(do_pop);
    end
  end

  // An update must target an entry that is valid and still pending.
  a_upd_pending: assert property (@(posedge clk) disable iff (rst || flush)
    upd_val |-> (v_q[PW'(upd_idx)] && p_q[PW'(upd_idx)]));
  a_no_alloc_when_full: assert property (@(posedge clk) disable iff (rst || flush)
    alloc_val |-> !full);
endmodule
