// dual_core: dual-issue version of the IO2L pipeline (in-order front end,
// out-of-order issue and completion, in-order late commit) that fetches,
// decodes, issues, writes back and commits up to two instructions per cycle.
//
// Stages and structures follow the single-issue IO2L pipeline (proc_core with
// ARCH_IO2L); only the width changes:
//   F  fetches the two words at pc and pc+4 (imem_addr[1:0]) and advances pc
//      by 8.
//   D  decodes both; nops are dropped, and the remaining zero, one or two
//      instructions enter the issue queue (IQ) and the reorder buffer (ROB)
//      together, or the whole group waits until both have room.
//   I  picks the oldest ready addu/addiu for X and the oldest ready mul for
//      the four-stage multiplier Y, so up to two issue per cycle (the pipeline
//      keeps the single-issue design's one X pipe and one Y pipe). Operands
//      come from the PRF or from the bypass network.
//   W  has one slot per pipe, so X and Y can complete in the same cycle; there
//      is no write-back port hazard. Both slots write the PRF (a future file
//      indexed by architectural register) and clear the ROB entries' pending
//      bits.
//   C  commits the ROB head and, when it is also done, the entry after it,
//      copying their registers from the PRF into the ARF.
//
// The scoreboard is the one indexed by functional unit (scoreboard_fu): a row
// of five shifting cells per pipe, so that both pipes can enter an
// instruction in the same cycle. Its lookup gives the same one-hot
// when-available columns 4..0 per register as in the single-issue pipelines. A
// source in column 1 is bypassed from the end of X or Y3 (by FU), in column 0
// from the W slot of its FU, and columns 2..4 mean the value is not yet
// available. The IQ is kept compacted in age order (entry 0 oldest).
// At allocation a source is marked pending if its producer is still in the
// IQ (and is not an X-pipe instruction issuing this cycle), is the older
// instruction of the same decode group, or is a multiply in Y0/Y1. Pending
// bits are cleared by the same two wakeup broadcasts as in the single-issue
// IQ: the X-pipe instruction issuing now, and the multiply in Y2. An
// instruction does not issue while an earlier write to its destination is
// more than one cycle from W.
//
// Exceptions (illegal instructions) are taken when the excepting instruction
// is at the ROB head with its pending bit clear. Everything in flight is
// squashed, the ARF is copied into the PRF one register per cycle (r1..r31),
// and fetch continues at EXC_VECTOR. An exception at the entry after the head
// is taken in the next cycle, after the head has committed.
//
// What follows the single-issue pipelines: the stages, the scoreboard
// columns and bypass rules, the wakeup rules, the ROB fields and the
// recovery. This design's own choices: the split of the two issue slots
// between X and Y, the use of the unit-indexed scoreboard, the all-or-nothing
// group allocation, the compacted IQ, and the sizes (IQ_ENTRIES = 4,
// ROB_ENTRIES = 8).
//
// Interface: imem_addr/imem_data are two combinational instruction-memory
// reads; arf_we/arf_waddr/arf_wdata show the (up to two) architectural
// register updates per cycle, slot 0 being the older; dbg_addr/dbg_data read
// the ARF; exc_taken pulses for one cycle with the faulting pc on exc_epc;
// busy is high while an instruction is in flight or the PRF is being
// restored; events reports which mechanisms acted in the cycle.
module dual_core
  import ooo_pkg::*;
#(
  parameter int          ROB_ENTRIES  = 8,
  parameter int          IQ_ENTRIES   = 4,
  parameter logic [31:0] RESET_VECTOR = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR   = 32'h0000_0100
) (
  input  logic             clk,
  input  logic             rst,
  output logic [1:0][31:0] imem_addr,
  input  logic [1:0][31:0] imem_data,
  input  logic [4:0]       dbg_addr,
  output logic [31:0]      dbg_data,
  output logic [1:0]       arf_we,
  output logic [1:0][4:0]  arf_waddr,
  output logic [1:0][31:0] arf_wdata,
  output logic             exc_taken,
  output logic [31:0]      exc_epc,
  output logic             busy,
  output dual_events_t     events
);
  localparam int RW = $clog2(ROB_ENTRIES);
  localparam int QW = $clog2(IQ_ENTRIES + 1);

  // ------------------------------------------------------------------ signals
  logic [31:0]       pc_q;
  logic              fd_val;
  logic [1:0][31:0]  fd_inst, fd_pc;

  uop_t [1:0]        d_uop;
  logic [1:0]        d_has;
  int                d_n;
  logic              d_iq_short, d_rob_short, d_stall, d_fire;

  uop_t [IQ_ENTRIES-1:0]      iq_uop_q, iq_uop_n;
  logic [IQ_ENTRIES-1:0][1:0] iq_p_q, iq_p_n;
  logic [QW-1:0]              iq_count_q;
  int                         iq_count_n;

  logic              iss_x_val, iss_y_val;
  int                iss_x_idx, iss_y_idx;
  uop_t              ux, uy;
  logic              x_not_oldest, y_not_oldest;
  logic [1:0]        wake_val;
  logic [1:0][4:0]   wake_reg;

  logic [NREGS-1:0][WA_W-1:0] sb_wa;
  fu_e  [NREGS-1:0]           sb_fu;
  logic [NREGS-1:0]           sb_pend;
  logic                       sb_col2;    // not needed: W has a slot per pipe
  logic [NREGS-1:0]           reg_busy;

  logic [3:0][31:0]  i_rf;              // PRF values: x.rs, x.rt, y.rs, y.rt
  logic [31:0]       xs_val, xt_val, ys_val, yt_val;
  logic              xs_rdy, xt_rdy, ys_rdy, yt_rdy;
  logic [2:0]        xs_byp, xt_byp, ys_byp, yt_byp;   // {W, Y3, X}

  logic [0:0]        x_st_val;
  uop_t [0:0]        x_st_uop;
  logic [0:0][31:0]  x_st_res;
  logic [3:0]        y_st_val;
  uop_t [3:0]        y_st_uop;
  logic [31:0]       y_res;

  logic              wx_val, wy_val;
  uop_t              wx_uop, wy_uop;
  logic [31:0]       wx_res, wy_res;

  logic [ROB_ENTRIES-1:0]       rob_v, rob_p, rob_dv, rob_exc;
  logic [ROB_ENTRIES-1:0][4:0]  rob_rd;
  logic [ROB_ENTRIES-1:0][31:0] rob_pc;
  logic [RW-1:0]                rob_head_q, rob_tail_q, rob_h1;
  logic [RW:0]                  rob_count_q;
  logic [1:0][RW-1:0]           d_rob_idx;
  logic                         c0, c1, c_exc;

  logic              flush_all, rec_q;
  logic [4:0]        rec_idx_q;

  logic [5:0][4:0]   prf_raddr;
  logic [5:0][31:0]  prf_rdata;
  logic [1:0]        prf_we;
  logic [1:0][4:0]   prf_waddr;
  logic [1:0][31:0]  prf_wdata;
  logic [1:0][4:0]   arf_raddr;
  logic [1:0][31:0]  arf_rdata;

  function automatic logic [RW-1:0] rob_add(logic [RW-1:0] x, int n);
    return RW'((int'(x) + n) % ROB_ENTRIES);
  endfunction

  // ================================================================== F
  assign imem_addr = {pc_q + 32'd4, pc_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q   <= RESET_VECTOR;
      fd_val <= 1'b0;
    end else if (flush_all) begin
      fd_val <= 1'b0;
    end else if (rec_q) begin
      fd_val <= 1'b0;
      if (rec_idx_q == 5'd31) pc_q <= EXC_VECTOR;
    end else if (!d_stall) begin
      fd_val  <= 1'b1;
      fd_inst <= imem_data;
      fd_pc   <= {pc_q + 32'd4, pc_q};
      pc_q    <= pc_q + 32'd8;
    end
  end

  // ================================================================== D
  always_comb begin
    logic nop;
    for (int k = 0; k < 2; k++) begin
      d_uop[k] = decode(fd_inst[k], fd_pc[k], nop);
      d_has[k] = fd_val && !nop;
    end
    d_n         = int'(d_has[0]) + int'(d_has[1]);
    d_iq_short  = int'(iq_count_q) + d_n > IQ_ENTRIES;
    d_rob_short = int'(rob_count_q) + d_n > ROB_ENTRIES;
    d_stall     = (d_n != 0) && (d_iq_short || d_rob_short);
    d_fire      = (d_n != 0) && !d_stall;
    d_rob_idx[0] = rob_tail_q;
    d_rob_idx[1] = d_has[0] ? rob_add(rob_tail_q, 1) : rob_tail_q;
    for (int k = 0; k < 2; k++) d_uop[k].rob_idx = ROB_IDX_W'(d_rob_idx[k]);
  end

  // ================================================================== scoreboard
  // Indexed by functional unit: one row per pipe, so an X-pipe instruction and
  // a multiply can both be entered in the cycle they issue together.
  scoreboard_fu u_sb (
    .clk, .rst, .flush(flush_all),
    .set_x_val(iss_x_val && ux.rd_v), .set_x_reg(ux.rd),
    .set_y_val(iss_y_val && uy.rd_v), .set_y_reg(uy.rd),
    .pending(sb_pend), .fu(sb_fu), .wa(sb_wa), .col2_busy(sb_col2)
  );

  always_comb begin
    for (int r = 0; r < NREGS; r++) reg_busy[r] = (sb_wa[r][4:1] != '0);
  end

  // ================================================================== IQ select
  always_comb begin
    iss_x_val = 1'b0; iss_x_idx = 0;
    iss_y_val = 1'b0; iss_y_idx = 0;
    for (int e = 0; e < IQ_ENTRIES; e++) begin
      if (e < int'(iq_count_q) && iq_p_q[e] == 2'b00
          && !(iq_uop_q[e].rd_v && reg_busy[iq_uop_q[e].rd])) begin
        if (iq_uop_q[e].op == OP_MUL) begin
          if (!iss_y_val) begin iss_y_val = 1'b1; iss_y_idx = e; end
        end else begin
          if (!iss_x_val) begin iss_x_val = 1'b1; iss_x_idx = e; end
        end
      end
    end
    ux = iq_uop_q[iss_x_idx];
    uy = iq_uop_q[iss_y_idx];
    // two writes to one register never issue together: the younger waits
    if (iss_x_val && iss_y_val && ux.rd_v && uy.rd_v && ux.rd == uy.rd) begin
      if (iss_x_idx > iss_y_idx) iss_x_val = 1'b0;
      else                       iss_y_val = 1'b0;
    end
    x_not_oldest = iss_x_val && (iss_x_idx > ((iss_y_val && iss_y_idx < iss_x_idx) ? 1 : 0));
    y_not_oldest = iss_y_val && (iss_y_idx > ((iss_x_val && iss_x_idx < iss_y_idx) ? 1 : 0));
    wake_val[0] = iss_x_val && ux.rd_v;
    wake_reg[0] = ux.rd;
    wake_val[1] = y_st_val[2] && y_st_uop[2].rd_v;
    wake_reg[1] = y_st_uop[2].rd;
  end

  function automatic logic woken(logic [4:0] r);
    return (wake_val[0] && wake_reg[0] == r) || (wake_val[1] && wake_reg[1] == r);
  endfunction

  // Pending bit of source r of decode slot k at allocation.
  function automatic logic src_pending(int k, logic sv, logic [4:0] r);
    logic pend;
    pend = 1'b0;
    if (sv && r != 5'd0) begin
      if (sb_wa[r][4:3] != '0) pend = 1'b1;
      for (int e = 0; e < IQ_ENTRIES; e++)
        if (e < int'(iq_count_q) && iq_uop_q[e].rd_v && iq_uop_q[e].rd == r
            && !(iss_x_val && iss_x_idx == e))
          pend = 1'b1;
      if (k == 1 && d_has[0] && d_uop[0].rd_v && d_uop[0].rd == r) pend = 1'b1;
    end
    return pend;
  endfunction

  // ================================================================== IQ update
  always_comb begin
    int n;
    n        = 0;
    iq_uop_n = iq_uop_q;
    iq_p_n   = iq_p_q;
    for (int e = 0; e < IQ_ENTRIES; e++) begin
      if (e < int'(iq_count_q) && !(iss_x_val && iss_x_idx == e)
          && !(iss_y_val && iss_y_idx == e)) begin
        iq_uop_n[n]  = iq_uop_q[e];
        iq_p_n[n][0] = iq_p_q[e][0] && !woken(iq_uop_q[e].rs);
        iq_p_n[n][1] = iq_p_q[e][1] && !woken(iq_uop_q[e].rt);
        n++;
      end
    end
    if (d_fire) begin
      for (int k = 0; k < 2; k++) begin
        if (d_has[k] && n < IQ_ENTRIES) begin
          iq_uop_n[n] = d_uop[k];
          iq_p_n[n]   = {src_pending(k, d_uop[k].rt_v, d_uop[k].rt),
                         src_pending(k, d_uop[k].rs_v, d_uop[k].rs)};
          n++;
        end
      end
    end
    iq_count_n = n;
  end

  always_ff @(posedge clk) begin
    if (rst || flush_all) begin
      iq_count_q <= '0;
    end else begin
      iq_count_q <= QW'(iq_count_n);
    end
    iq_uop_q <= iq_uop_n;
    iq_p_q   <= iq_p_n;
  end

  // ================================================================== I
  function automatic void lookup(input logic sv, input logic [4:0] r, input logic [31:0] rf,
                                 output logic rdy, output logic [31:0] val,
                                 output logic [2:0] byp);
    rdy = 1'b1; val = rf; byp = 3'b000;
    if (sv && r != 5'd0 && sb_pend[r]) begin
      if (sb_wa[r][1]) begin
        if (sb_fu[r] == FU_X) begin val = x_st_res[0]; byp = 3'b001; end
        else                  begin val = y_res;       byp = 3'b010; end
      end else if (sb_wa[r][0]) begin
        val = (sb_fu[r] == FU_X) ? wx_res : wy_res; byp = 3'b100;
      end else begin
        rdy = 1'b0;
      end
    end
    if (!sv || r == 5'd0) val = '0;
  endfunction

  always_comb begin
    lookup(ux.rs_v, ux.rs, i_rf[0], xs_rdy, xs_val, xs_byp);
    lookup(ux.rt_v, ux.rt, i_rf[1], xt_rdy, xt_val, xt_byp);
    lookup(uy.rs_v, uy.rs, i_rf[2], ys_rdy, ys_val, ys_byp);
    lookup(uy.rt_v, uy.rt, i_rf[3], yt_rdy, yt_val, yt_byp);
  end

  a_x_ready: assert property (@(posedge clk) disable iff (rst) iss_x_val |-> (xs_rdy && xt_rdy));
  a_y_ready: assert property (@(posedge clk) disable iff (rst) iss_y_val |-> (ys_rdy && yt_rdy));

  // ================================================================== X, Y
  x_pipe #(.NSTAGES(1)) u_x (
    .clk, .rst, .flush(flush_all),
    .in_val(iss_x_val), .in_uop(ux),
    .in_a(xs_val), .in_b(ux.op == OP_ADDIU ? ux.imm : xt_val),
    .st_val(x_st_val), .st_uop(x_st_uop), .st_res(x_st_res)
  );

  mul_pipe u_y (
    .clk, .rst, .flush(flush_all),
    .in_val(iss_y_val), .in_uop(uy),
    .in_a(ys_val), .in_b(yt_val),
    .st_val(y_st_val), .st_uop(y_st_uop), .out_res(y_res)
  );

  // ================================================================== W
  always_ff @(posedge clk) begin
    if (rst || flush_all) begin
      wx_val <= 1'b0;
      wy_val <= 1'b0;
    end else begin
      wx_val <= x_st_val[0];
      wy_val <= y_st_val[3];
    end
    wx_uop <= x_st_uop[0];
    wx_res <= x_st_res[0];
    wy_uop <= y_st_uop[3];
    wy_res <= y_res;
  end

  // ================================================================== PRF, ARF
  assign prf_raddr = {rob_rd[rob_h1], rob_rd[rob_head_q], uy.rt, uy.rs, ux.rt, ux.rs};
  assign i_rf      = prf_rdata[3:0];

  always_comb begin
    if (rec_q) begin
      prf_we[0] = 1'b1; prf_waddr[0] = rec_idx_q; prf_wdata[0] = arf_rdata[0];
    end else begin
      prf_we[0] = wx_val && wx_uop.rd_v; prf_waddr[0] = wx_uop.rd; prf_wdata[0] = wx_res;
    end
    prf_we[1] = wy_val && wy_uop.rd_v; prf_waddr[1] = wy_uop.rd; prf_wdata[1] = wy_res;
  end

  regfile #(.NREAD(6), .NWRITE(2)) u_prf (
    .clk, .rst, .raddr(prf_raddr), .rdata(prf_rdata),
    .we(prf_we), .waddr(prf_waddr), .wdata(prf_wdata)
  );

  assign arf_raddr = {dbg_addr, rec_idx_q};
  assign dbg_data  = arf_rdata[1];

  regfile #(.NREAD(2), .NWRITE(2)) u_arf (
    .clk, .rst, .raddr(arf_raddr), .rdata(arf_rdata),
    .we(arf_we), .waddr(arf_waddr), .wdata(arf_wdata)
  );

  // ================================================================== ROB and C
  assign rob_h1 = rob_add(rob_head_q, 1);
  assign c0     = rob_v[rob_head_q] && !rob_p[rob_head_q] && !rob_exc[rob_head_q];
  assign c_exc  = rob_v[rob_head_q] && !rob_p[rob_head_q] &&  rob_exc[rob_head_q];
  assign c1     = c0 && rob_v[rob_h1] && !rob_p[rob_h1] && !rob_exc[rob_h1];
  assign flush_all = c_exc;

  assign arf_we    = {c1 && rob_dv[rob_h1], c0 && rob_dv[rob_head_q]};
  assign arf_waddr = {rob_rd[rob_h1], rob_rd[rob_head_q]};
  assign arf_wdata = prf_rdata[5:4];

  always_ff @(posedge clk) begin
    if (rst || flush_all) begin
      rob_v       <= '0;
      rob_p       <= '0;
      rob_exc     <= '0;
      rob_head_q  <= '0;
      rob_tail_q  <= '0;
      rob_count_q <= '0;
    end else begin
      if (wx_val) begin
        rob_p[RW'(wx_uop.rob_idx)]   <= 1'b0;
        rob_exc[RW'(wx_uop.rob_idx)] <= wx_uop.exc;
      end
      if (wy_val) rob_p[RW'(wy_uop.rob_idx)] <= 1'b0;
      if (c0) rob_v[rob_head_q] <= 1'b0;
      if (c1) rob_v[rob_h1]     <= 1'b0;
      if (d_fire) begin
        for (int k = 0; k < 2; k++) begin
          if (d_has[k]) begin
            rob_v[d_rob_idx[k]]   <= 1'b1;
            rob_p[d_rob_idx[k]]   <= 1'b1;
            rob_exc[d_rob_idx[k]] <= 1'b0;
            rob_dv[d_rob_idx[k]]  <= d_uop[k].rd_v;
            rob_rd[d_rob_idx[k]]  <= d_uop[k].rd;
            rob_pc[d_rob_idx[k]]  <= d_uop[k].pc;
          end
        end
        rob_tail_q <= rob_add(rob_tail_q, d_n);
      end
      rob_head_q  <= rob_add(rob_head_q, int'(c0) + int'(c1));
      rob_count_q <= (RW+1)'(int'(rob_count_q) - int'(c0) - int'(c1) + (d_fire ? d_n : 0));
    end
  end

  // Recovery: copy r1..r31 from the ARF into the PRF, then fetch the handler.
  always_ff @(posedge clk) begin
    if (rst) begin
      rec_q     <= 1'b0;
      rec_idx_q <= 5'd1;
    end else if (c_exc) begin
      rec_q     <= 1'b1;
      rec_idx_q <= 5'd1;
    end else if (rec_q) begin
      rec_idx_q <= rec_idx_q + 5'd1;
      if (rec_idx_q == 5'd31) rec_q <= 1'b0;
    end
  end

  // ================================================================== status
  assign exc_taken = c_exc;
  assign exc_epc   = rob_pc[rob_head_q];

  assign busy = (d_has != '0) || (iq_count_q != '0) || x_st_val[0] || (y_st_val != '0)
             || wx_val || wy_val || (rob_count_q != '0) || rec_q;

  always_comb begin
    events                = '0;
    events.dual_alloc     = d_fire && d_n == 2;
    events.issue_x        = iss_x_val;
    events.issue_y        = iss_y_val;
    events.dual_issue     = iss_x_val && iss_y_val;
    events.ooo_issue      = x_not_oldest || y_not_oldest;
    events.bypass_x       = (iss_x_val && (xs_byp[0] || xt_byp[0])) || (iss_y_val && (ys_byp[0] || yt_byp[0]));
    events.bypass_y       = (iss_x_val && (xs_byp[1] || xt_byp[1])) || (iss_y_val && (ys_byp[1] || yt_byp[1]));
    events.bypass_w       = (iss_x_val && (xs_byp[2] || xt_byp[2])) || (iss_y_val && (ys_byp[2] || yt_byp[2]));
    events.dual_writeback = wx_val && wy_val;
    events.dual_commit    = c1;
    events.commit         = c0;
    events.rob_full_stall = (d_n != 0) && d_rob_short;
    events.iq_full_stall  = (d_n != 0) && d_iq_short;
    events.exception      = c_exc;
    events.prf_copy       = rec_q;
  end
endmodule
