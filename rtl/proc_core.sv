// proc_core: single-issue pipeline for addu, addiu and mul, built in one of
// five organisations selected by ARCH:
//
//   ARCH       issue         completion     commit   structures
//   I3L        in order      in order       late (W) none (X padded to X0..X3)
//   I2OE       in order      out of order   early(D) scoreboard
//   I2OL       in order      out of order   late (C) scoreboard, PRF, ROB
//   IO2E       out of order  out of order   early(D) scoreboard, IQ
//   IO2L       out of order  out of order   late (C) scoreboard, IQ, PRF, ROB
//
// Stages: F fetches the word at pc (imem_addr/imem_data, combinational read);
// D decodes it, drops nops and, in the late-commit versions, allocates a
// reorder-buffer entry; I reads the operands (ARF, or PRF in late commit),
// checks hazards, bypasses and issues to X (addu, addiu) or to the
// four-stage multiplier Y0..Y3 (mul); W writes the result. In the late-commit
// versions W writes the PRF and clears the ROB entry's pending bit, and C
// copies the head entry's register from the PRF to the ARF in program order.
// In the out-of-order-issue versions D writes an issue queue and I selects the
// oldest ready entry from it.
//
// Hazards. With a scoreboard (all but I3L) a source whose producer is in
// when-available column 1 is bypassed from the end of X or Y3 (by FU), column
// 0 from W, and columns 2..4 stall I; an X-pipe instruction stalls while
// column 2 is occupied (write-back port hazard); a write to a register whose
// previous write is still more than one cycle from W also stalls (this keeps
// one scoreboard entry per register; the code is otherwise assumed free of
// WAW and WAR dependences). I3L compares the sources with every pipeline
// register instead and bypasses from X0..X3, Y3 and W.
//
// Exceptions. Only illegal instructions raise one. Early commit takes it in D:
// the older instructions carry on, the younger ones are not fetched, and fetch
// goes to EXC_VECTOR. I3L takes it in W, squashing everything younger. The ROB
// versions take it in C when the excepting instruction reaches the head: the
// whole pipeline, IQ, scoreboard and ROB are cleared, the ARF is copied into
// the PRF one register per cycle (31 cycles, r1..r31), and then fetch goes to
// EXC_VECTOR. exc_taken pulses for one cycle with the faulting pc on exc_epc.
// With RECOVERY_BITS set, the late-commit versions use the other recovery the
// scheme allows instead of the copy: one bit per register, kept in I, says
// whether the newest value is in the PRF (set when W writes it) or in the ARF
// (all bits cleared at the exception). I then reads the ARF or the PRF by
// that bit, and fetch goes to EXC_VECTOR in the cycle after the exception.
//
// arf_we/arf_waddr/arf_wdata show every architectural register update;
// dbg_addr/dbg_data read the ARF. busy is high while any instruction other
// than a nop is in flight (from D on) or the PRF is being restored. events
// reports which mechanisms acted in the cycle.
module proc_core
  import ooo_pkg::*;
#(
  parameter arch_e       ARCH         = ARCH_IO2L,
  parameter int          ROB_ENTRIES  = 4,
  parameter int          IQ_ENTRIES   = 3,
  parameter bit          RECOVERY_BITS = 1'b0,
  parameter logic [31:0] RESET_VECTOR = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR   = 32'h0000_0100
) (
  input  logic         clk,
  input  logic         rst,
  output logic [31:0]  imem_addr,
  input  logic [31:0]  imem_data,
  input  logic [4:0]   dbg_addr,
  output logic [31:0]  dbg_data,
  output logic         arf_we,
  output logic [4:0]   arf_waddr,
  output logic [31:0]  arf_wdata,
  output logic         exc_taken,
  output logic [31:0]  exc_epc,
  output logic         busy,
  output core_events_t events
);
  localparam bit LATE  = (ARCH == ARCH_I2OL) || (ARCH == ARCH_IO2L);
  localparam bit EARLY = (ARCH == ARCH_I2OE) || (ARCH == ARCH_IO2E);
  localparam bit OOO   = (ARCH == ARCH_IO2E) || (ARCH == ARCH_IO2L);
  localparam bit EQLEN = (ARCH == ARCH_I3L);
  localparam int XST   = EQLEN ? 4 : 1;

  // ------------------------------------------------------------------ F
  logic [31:0] pc_q, fd_pc, fd_inst;
  logic        fd_val;

  // ------------------------------------------------------------------ D
  uop_t d_uop, d_uop_out;
  logic d_nop, d_has, d_exc_early, d_pass, d_stall, d_fire;

  // ------------------------------------------------------------------ I
  logic        di_val;
  uop_t        di_uop;
  logic        cand_val;
  uop_t        cand;
  logic [31:0] rs_val, rt_val;
  logic        rs_rdy, rt_rdy;
  logic [2:0]  rs_byp, rt_byp;      // {from W, from Y3, from X}
  logic        rs_pad, rt_pad;      // from X0..X2 (I3L)
  logic        i_raw, i_struct, i_waw, i_issue;
  logic [1:0][31:0] i_rf_data;

  // ------------------------------------------------------------------ X, Y, W
  logic [XST-1:0]        x_st_val;
  uop_t [XST-1:0]        x_st_uop;
  logic [XST-1:0][31:0]  x_st_res;
  logic [3:0]            y_st_val;
  uop_t [3:0]            y_st_uop;
  logic [31:0]           y_res;
  logic                  xl_val;
  uop_t                  xl_uop;
  logic [31:0]           xl_res;
  logic                  w_val;
  uop_t                  w_uop;
  logic [31:0]           w_res;
  logic [31:0]           last_w_pc;
  logic                  last_w_val;

  // ------------------------------------------------------------------ SB
  logic [NREGS-1:0]           sb_pending;
  fu_e  [NREGS-1:0]           sb_fu;
  logic [NREGS-1:0][WA_W-1:0] sb_wa;
  logic                       sb_col2;

  // ------------------------------------------------------------------ IQ / ROB / C
  logic iq_full, iq_empty, iq_iss_val, iq_not_oldest;
  uop_t iq_iss_uop;
  logic rob_full, rob_empty;
  logic [ROB_IDX_W-1:0] rob_alloc_idx;
  logic flush_all;          // squash everything in flight (exception at W or C)
  logic rec_q;              // copying ARF to PRF after a late exception
  logic [4:0] rec_idx_q;
  logic c_commit, c_exc;
  logic [31:0] c_pc;

  // ARF: read ports [0],[1] = I-stage sources (early commit, I3L, or late
  // commit with RECOVERY_BITS) or the recovery copy index (late commit), [2] =
  // debug.
  logic [2:0][4:0]  arf_raddr;
  logic [2:0][31:0] arf_rdata;

  regfile #(.NREAD(3)) u_arf (
    .clk, .rst, .raddr(arf_raddr), .rdata(arf_rdata),
    .we(arf_we), .waddr(arf_waddr), .wdata(arf_wdata)
  );
  assign dbg_data = arf_rdata[2];

  // ================================================================== F
  assign imem_addr = pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q   <= RESET_VECTOR;
      fd_val <= 1'b0;
    end else if (flush_all) begin
      fd_val <= 1'b0;
      if (!LATE || RECOVERY_BITS) pc_q <= EXC_VECTOR;   // no PRF copy: redirect at once
    end else if (rec_q) begin
      fd_val <= 1'b0;
      if (rec_idx_q == 5'd31) pc_q <= EXC_VECTOR;
    end else if (d_exc_early) begin
      fd_val <= 1'b0;
      pc_q   <= EXC_VECTOR;
    end else if (!d_stall) begin
      fd_val  <= 1'b1;
      fd_inst <= imem_data;
      fd_pc   <= pc_q;
      pc_q    <= pc_q + 32'd4;
    end
  end

  // ================================================================== D
  always_comb begin
    d_uop       = decode(fd_inst, fd_pc, d_nop);
    d_has       = fd_val && !d_nop;
    d_exc_early = EARLY && d_has && d_uop.exc;
    d_pass      = d_has && !d_exc_early;
    if (OOO) d_stall = d_pass && (iq_full || (LATE && rob_full));
    else     d_stall = d_pass && ((di_val && !i_issue) || (LATE && rob_full));
    d_fire      = d_pass && !d_stall;
    d_uop_out   = d_uop;
    if (LATE) d_uop_out.rob_idx = rob_alloc_idx;
  end

  // ================================================================== I
  // Source lookup with the scoreboard: stall, bypass or register read.
  function automatic void sb_lookup(input logic sv, input logic [4:0] r, input logic [31:0] rf,
                                    output logic rdy, output logic [31:0] val,
                                    output logic [2:0] byp);
    rdy = 1'b1; val = rf; byp = 3'b000;
    if (sv && r != 5'd0 && sb_pending[r]) begin
      if (sb_wa[r][1]) begin
        if (sb_fu[r] == FU_X) begin val = xl_res; byp = 3'b001; end
        else                  begin val = y_res;  byp = 3'b010; end
      end else if (sb_wa[r][0]) begin
        val = w_res; byp = 3'b100;
      end else begin
        rdy = 1'b0;
      end
    end
    if (!sv || r == 5'd0) val = '0;
  endfunction

  // The X-pipe stages seen as four slots (only the first XST are ever valid).
  logic [3:0]       xv4;
  uop_t [3:0]       xu4;
  logic [3:0][31:0] xr4;
  for (genvar k = 0; k < 4; k++) begin : g_x4
    if (k < XST) begin : g_on
      assign xv4[k] = x_st_val[k];
      assign xu4[k] = x_st_uop[k];
      assign xr4[k] = x_st_res[k];
    end else begin : g_off
      assign xv4[k] = 1'b0;
      assign xu4[k] = '0;
      assign xr4[k] = '0;
    end
  end

  // Source lookup against the pipeline registers (I3L), youngest first.
  function automatic void pipe_lookup(input logic sv, input logic [4:0] r, input logic [31:0] rf,
                                      output logic rdy, output logic [31:0] val,
                                      output logic [2:0] byp, output logic pad);
    logic found;
    rdy = 1'b1; val = rf; byp = 3'b000; pad = 1'b0; found = 1'b0;
    if (sv && r != 5'd0) begin
      for (int k = 0; k < 4; k++) begin
        if (!found && xv4[k] && xu4[k].rd_v && xu4[k].rd == r) begin
          found = 1'b1; val = xr4[k];
          if (k == XST - 1) byp = 3'b001; else pad = 1'b1;
        end
        if (!found && y_st_val[k] && y_st_uop[k].rd_v && y_st_uop[k].rd == r) begin
          found = 1'b1;
          if (k == 3) begin val = y_res; byp = 3'b010; end
          else rdy = 1'b0;
        end
      end
      if (!found && w_val && w_uop.rd_v && w_uop.rd == r) begin
        val = w_res; byp = 3'b100;
      end
    end
    if (!sv || r == 5'd0) val = '0;
  endfunction

  always_comb begin
    if (OOO) begin cand_val = iq_iss_val; cand = iq_iss_uop; end
    else     begin cand_val = di_val;     cand = di_uop;     end
  end

  always_comb begin
    rs_pad = 1'b0; rt_pad = 1'b0;
    if (EQLEN) begin
      pipe_lookup(cand.rs_v, cand.rs, i_rf_data[0], rs_rdy, rs_val, rs_byp, rs_pad);
      pipe_lookup(cand.rt_v, cand.rt, i_rf_data[1], rt_rdy, rt_val, rt_byp, rt_pad);
      i_struct = 1'b0;
      i_waw    = 1'b0;
    end else begin
      sb_lookup(cand.rs_v, cand.rs, i_rf_data[0], rs_rdy, rs_val, rs_byp);
      sb_lookup(cand.rt_v, cand.rt, i_rf_data[1], rt_rdy, rt_val, rt_byp);
      i_struct = (cand.op != OP_MUL) && sb_col2;
      i_waw    = cand.rd_v && sb_pending[cand.rd] && (sb_wa[cand.rd][4:1] != '0);
    end
    i_raw   = !(rs_rdy && rt_rdy);
    i_issue = cand_val && !i_raw && !i_struct && !i_waw;
  end

  // In-order issue: the D/I pipeline register holds the instruction in I.
  always_ff @(posedge clk) begin
    if (rst || flush_all || OOO) begin
      di_val <= 1'b0;
    end else if (!di_val || i_issue) begin
      di_val <= d_fire;
      di_uop <= d_uop_out;
    end
  end

  // Scoreboard (not used by I3L, whose hazard checks read the pipeline registers).
  if (!EQLEN) begin : g_sb
    scoreboard u_sb (
      .clk, .rst, .flush(flush_all),
      .set_val(i_issue && cand.rd_v), .set_reg(cand.rd), .set_fu(fu_of(cand.op)),
      .pending(sb_pending), .fu(sb_fu), .wa(sb_wa), .col2_busy(sb_col2)
    );
  end else begin : g_no_sb
    assign sb_pending = '0;
    assign sb_fu      = '0;
    assign sb_wa      = '0;
    assign sb_col2    = 1'b0;
  end

  // Issue queue between D and I (out-of-order issue).
  if (OOO) begin : g_iq
    logic [NREGS-1:0] reg_busy;
    logic [1:0]       src_busy;
    logic [1:0]       wake_val;
    logic [1:0][4:0]  wake_reg;
    always_comb begin
      for (int r = 0; r < NREGS; r++)
        reg_busy[r] = sb_pending[r] && (sb_wa[r][4:1] != '0);
      src_busy[0] = sb_pending[d_uop.rs] && (sb_wa[d_uop.rs][4:3] != '0);
      src_busy[1] = sb_pending[d_uop.rt] && (sb_wa[d_uop.rt][4:3] != '0);
      // Wakeup one cycle before the value can be bypassed into I.
      wake_val[0] = i_issue && cand.op != OP_MUL && cand.rd_v;
      wake_reg[0] = cand.rd;
      wake_val[1] = y_st_val[2] && y_st_uop[2].rd_v;
      wake_reg[1] = y_st_uop[2].rd;
    end
    issue_queue #(.ENTRIES(IQ_ENTRIES), .WAKE_PORTS(2)) u_iq (
      .clk, .rst, .flush(flush_all),
      .alloc_val(d_fire), .alloc_uop(d_uop_out), .alloc_src_busy(src_busy), .full(iq_full),
      .wake_val, .wake_reg,
      .x_blocked(sb_col2), .reg_busy,
      .iss_val(iq_iss_val), .iss_uop(iq_iss_uop), .iss_not_oldest(iq_not_oldest),
      .empty(iq_empty)
    );
    // The select logic only offers instructions whose operands are available.
    a_iq_ready: assert property (@(posedge clk) disable iff (rst)
      iq_iss_val |-> (!i_raw && !i_struct && !i_waw));
  end else begin : g_no_iq
    assign iq_full       = 1'b0;
    assign iq_empty      = 1'b1;
    assign iq_iss_val    = 1'b0;
    assign iq_iss_uop    = '0;
    assign iq_not_oldest = 1'b0;
  end

  // ================================================================== X, Y
  x_pipe #(.NSTAGES(XST)) u_x (
    .clk, .rst, .flush(flush_all),
    .in_val(i_issue && cand.op != OP_MUL), .in_uop(cand),
    .in_a(rs_val), .in_b(cand.op == OP_ADDIU ? cand.imm : rt_val),
    .st_val(x_st_val), .st_uop(x_st_uop), .st_res(x_st_res)
  );

  mul_pipe u_y (
    .clk, .rst, .flush(flush_all),
    .in_val(i_issue && cand.op == OP_MUL), .in_uop(cand),
    .in_a(rs_val), .in_b(rt_val),
    .st_val(y_st_val), .st_uop(y_st_uop), .out_res(y_res)
  );

  assign xl_val = x_st_val[XST-1];
  assign xl_uop = x_st_uop[XST-1];
  assign xl_res = x_st_res[XST-1];

  a_one_writeback: assert property (@(posedge clk) disable iff (rst) !(xl_val && y_st_val[3]));

  // ================================================================== W
  always_ff @(posedge clk) begin
    if (rst || flush_all) begin
      w_val <= 1'b0;
    end else begin
      w_val <= xl_val || y_st_val[3];
      w_uop <= y_st_val[3] ? y_st_uop[3] : xl_uop;
      w_res <= y_st_val[3] ? y_res : xl_res;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush_all) begin
      last_w_val <= 1'b0;
    end else if (w_val) begin
      last_w_val <= 1'b1;
      last_w_pc  <= w_uop.pc;
    end
  end

  // ================================================================== commit
  if (LATE) begin : g_late
    logic [2:0][4:0]  prf_raddr;
    logic [2:0][31:0] prf_rdata;
    logic             prf_we;
    logic [4:0]       prf_waddr;
    logic [31:0]      prf_wdata;
    logic             head_val, head_pending, head_dest_v, head_exc;
    logic [4:0]       head_rd;
    logic [31:0]      head_pc;
    logic [ROB_IDX_W-1:0] head_idx;

    assign prf_raddr = {head_rd, cand.rt, cand.rs};

    if (RECOVERY_BITS) begin : g_bits
      // in_prf_q[r]: the newest committed-or-not value of r is in the PRF.
      logic [NREGS-1:0] in_prf_q;
      always_ff @(posedge clk) begin
        if (rst || c_exc) in_prf_q <= '0;
        else if (prf_we)  in_prf_q[prf_waddr] <= 1'b1;
      end
      assign i_rf_data[0] = in_prf_q[cand.rs] ? prf_rdata[0] : arf_rdata[0];
      assign i_rf_data[1] = in_prf_q[cand.rt] ? prf_rdata[1] : arf_rdata[1];
      assign arf_raddr    = {dbg_addr, cand.rt, cand.rs};
    end else begin : g_copy
      assign i_rf_data = prf_rdata[1:0];
      assign arf_raddr = {dbg_addr, 5'd0, rec_idx_q};
    end
    always_comb begin
      if (rec_q) begin
        prf_we = 1'b1; prf_waddr = rec_idx_q; prf_wdata = arf_rdata[0];
      end else begin
        prf_we = w_val && w_uop.rd_v; prf_waddr = w_uop.rd; prf_wdata = w_res;
      end
    end

    regfile #(.NREAD(3)) u_prf (
      .clk, .rst, .raddr(prf_raddr), .rdata(prf_rdata),
      .we(prf_we), .waddr(prf_waddr), .wdata(prf_wdata)
    );

    reorder_buffer #(.ENTRIES(ROB_ENTRIES)) u_rob (
      .clk, .rst, .flush(flush_all),
      .alloc_val(d_fire), .alloc_dest_v(d_uop.rd_v), .alloc_rd(d_uop.rd),
      .alloc_idx(rob_alloc_idx), .full(rob_full),
      .upd_val(w_val), .upd_idx(w_uop.rob_idx), .upd_exc(w_uop.exc), .upd_pc(w_uop.pc),
      .head_val, .head_pending, .head_dest_v, .head_rd, .head_exc, .head_pc, .head_idx,
      .commit_pop(c_commit), .empty(rob_empty)
    );

    assign c_exc     = head_val && !head_pending && head_exc;
    assign c_commit  = head_val && !head_pending && !head_exc;
    assign c_pc      = head_pc;
    assign flush_all = c_exc;
    assign arf_we    = c_commit && head_dest_v;
    assign arf_waddr = head_rd;
    assign arf_wdata = prf_rdata[2];

    always_ff @(posedge clk) begin
      if (rst) begin
        rec_q     <= 1'b0;
        rec_idx_q <= 5'd1;
      end else if (c_exc && !RECOVERY_BITS) begin
        rec_q     <= 1'b1;
        rec_idx_q <= 5'd1;
      end else if (rec_q) begin
        rec_idx_q <= rec_idx_q + 5'd1;
        if (rec_idx_q == 5'd31) rec_q <= 1'b0;
      end
    end
  end else begin : g_early
    assign i_rf_data     = arf_rdata[1:0];
    assign arf_raddr     = {dbg_addr, cand.rt, cand.rs};
    assign rob_full      = 1'b0;
    assign rob_empty     = 1'b1;
    assign rob_alloc_idx = '0;
    assign c_commit      = 1'b0;
    assign c_pc          = w_uop.pc;
    assign rec_q         = 1'b0;
    assign rec_idx_q     = 5'd0;
    // I3L commits in W: an excepting instruction squashes all younger ones there.
    assign c_exc         = EQLEN && w_val && w_uop.exc;
    assign flush_all     = c_exc;
    assign arf_we        = w_val && w_uop.rd_v && !w_uop.exc;
    assign arf_waddr     = w_uop.rd;
    assign arf_wdata     = w_res;
  end

  // ================================================================== status
  assign exc_taken = d_exc_early || c_exc;
  assign exc_epc   = d_exc_early ? fd_pc : c_pc;

  assign busy = d_has || di_val || !iq_empty || (x_st_val != '0) || (y_st_val != '0)
             || w_val || !rob_empty || rec_q;

  always_comb begin
    events                = '0;
    events.issue          = i_issue;
    events.raw_stall      = cand_val && i_raw;
    events.struct_stall   = cand_val && !i_raw && i_struct;
    events.waw_stall      = cand_val && !i_raw && !i_struct && i_waw;
    events.bypass_x       = i_issue && (rs_byp[0] || rt_byp[0]);
    events.bypass_y       = i_issue && (rs_byp[1] || rt_byp[1]);
    events.bypass_w       = i_issue && (rs_byp[2] || rt_byp[2]);
    events.bypass_x_pad   = i_issue && (rs_pad || rt_pad);
    events.rob_full_stall = LATE && d_pass && rob_full;
    events.iq_full_stall  = OOO && d_pass && iq_full;
    events.ooo_issue      = i_issue && iq_not_oldest;
    events.ooo_complete   = w_val && last_w_val && (w_uop.pc < last_w_pc);
    events.commit         = LATE ? c_commit : (w_val && !w_uop.exc);
    events.exception      = exc_taken;
    events.prf_copy       = rec_q;
  end
endmodule
