// issue_queue: centralised issue queue (IQ) of the out-of-order-issue pipelines.
//
// Each of the ENTRIES entries holds V (entry valid), the decoded instruction
// (opcode, immediate, destination and source specifiers with their valid
// bits) and one pending bit P per source: P set means the source value cannot
// yet be read or bypassed in the issue stage. The IQ is a circular buffer:
// instructions are allocated in order at the tail by D and leave out of order
// from the issue stage I. Freed slots become reusable once the head pointer
// passes them; the head moves past every freed entry at its front each cycle.
//
// Wakeup: the WAKE_PORTS broadcast ports carry destination registers whose
// values become bypassable in the next cycle (the X-pipe instruction issuing
// now, and the multiply now in Y2); a matching source has P cleared at the end
// of the cycle. At allocation P is set when the source's producer is still in
// the IQ, is a multiply issuing now, or is a multiply in Y0/Y1 (src_busy,
// supplied by the scoreboard).
// Select: among entries with both P bits clear, with no write-back-port hazard
// (X-pipe instructions wait while x_blocked) and with no write to their
// destination still in flight (reg_busy), the oldest is issued. iss_val/iss_uop
// are combinational; the issued entry is freed at the end of the cycle.
// Timing: an entry allocated in cycle t can issue in t+1 at the earliest.
module issue_queue
  import ooo_pkg::*;
#(
  parameter int ENTRIES    = 3,
  parameter int WAKE_PORTS = 2
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              flush,
  // allocate (D stage)
  input  logic                              alloc_val,
  input  uop_t                              alloc_uop,
  input  logic [1:0]                        alloc_src_busy,  // [0]: rs, [1]: rt
  output logic                              full,
  // wakeup broadcast
  input  logic [WAKE_PORTS-1:0]             wake_val,
  input  logic [WAKE_PORTS-1:0][REG_W-1:0]  wake_reg,
  // hazard information for select
  input  logic                              x_blocked,
  input  logic [NREGS-1:0]                  reg_busy,
  // issue (I stage)
  output logic                              iss_val,
  output uop_t                              iss_uop,
  output logic                              iss_not_oldest,
  output logic                              empty
);
  localparam int PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]        v_q;
  logic [ENTRIES-1:0][1:0]   p_q;
  uop_t [ENTRIES-1:0]        uop_q;
  logic [PW-1:0]             head_q, tail_q;
  logic [PW:0]               count_q;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] x, int n);
    return PW'((int'(x) + n) % ENTRIES);
  endfunction

  assign full  = (int'(count_q) == ENTRIES);
  assign empty = (count_q == '0);

  // ---- select: oldest ready entry, scanning from the head ----
  logic [ENTRIES-1:0] ready;
  logic [PW-1:0]      sel;
  logic               first_seen;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      ready[e] = v_q[e] && (p_q[e] == 2'b00)
              && (uop_q[e].op == OP_MUL || !x_blocked)
              && !(uop_q[e].rd_v && reg_busy[uop_q[e].rd]);
    end
    iss_val        = 1'b0;
    sel            = '0;
    iss_not_oldest = 1'b0;
    first_seen     = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!iss_val && ready[wrap_add(head_q, i)]) begin
        iss_val        = 1'b1;
        sel            = wrap_add(head_q, i);
        iss_not_oldest = first_seen;
      end
      if (v_q[wrap_add(head_q, i)]) first_seen = 1'b1;
    end
    iss_uop = uop_q[sel];
  end

  // ---- pending bits of a newly allocated instruction ----
  function automatic logic src_pending(logic sv, logic [REG_W-1:0] sr, logic ext_busy);
    logic pend;
    pend = 1'b0;
    if (sv && sr != '0) begin
      pend = ext_busy;
      for (int e = 0; e < ENTRIES; e++) begin
        if (v_q[e] && uop_q[e].rd_v && uop_q[e].rd == sr) begin
          if (!(iss_val && PW'(e) == sel) || uop_q[e].op == OP_MUL) pend = 1'b1;
        end
      end
    end
    return pend;
  endfunction

  // ---- head advance: skip freed entries at the front ----
  logic [ENTRIES-1:0] v_after;
  int                 skip;
  logic               stop;
  logic               do_alloc;

  always_comb begin
    v_after = v_q;
    if (iss_val) v_after[sel] = 1'b0;
    skip = 0;
    stop = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!stop && i < int'(count_q) && !v_after[wrap_add(head_q, i)]) skip = skip + 1;
      else stop = 1'b1;
    end
    do_alloc = alloc_val && !full;
  end

  function automatic logic woken(logic [REG_W-1:0] r);
    logic w;
    w = 1'b0;
    for (int k = 0; k < WAKE_PORTS; k++) if (wake_val[k] && wake_reg[k] == r) w = 1'b1;
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      v_q     <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (woken(uop_q[e].rs)) p_q[e][0] <= 1'b0;
        if (woken(uop_q[e].rt)) p_q[e][1] <= 1'b0;
      end
      v_q <= v_after;
      if (do_alloc) begin
        v_q[tail_q]   <= 1'b1;
        uop_q[tail_q] <= alloc_uop;
        p_q[tail_q]   <= {src_pending(alloc_uop.rt_v, alloc_uop.rt, alloc_src_busy[1]),
                          src_pending(alloc_uop.rs_v, alloc_uop.rs, alloc_src_busy[0])};
        tail_q        <= wrap_add(tail_q, 1);
      end
      head_q  <= wrap_add(head_q, skip);
      count_q <= count_q - (PW+1)'(skip) + (PW+1)'(do_alloc);
    end
  end

  a_no_alloc_when_full: assert property (@(posedge clk) disable iff (rst || flush)
    alloc_val |-> !full);
endmodule
