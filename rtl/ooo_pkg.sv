// ooo_pkg: shared types, constants and the instruction decoder for the five
// single-issue pipelines (I3L, I2OE, I2OL, IO2E, IO2L).
//
// The instruction set is the three-instruction subset the pipelines are built
// around: addu, addiu and mul. They use MIPS32 encodings (addu: SPECIAL funct
// 0x21, addiu: opcode 0x09, mul: SPECIAL2 funct 0x02); the encodings are this
// design's choice. The all-zero word is a nop that the decode stage drops. Any
// other word is an illegal instruction, which is the exception source used to
// exercise precise-exception handling.
package ooo_pkg;

  localparam int XLEN      = 32;
  localparam int NREGS     = 32;
  localparam int REG_W     = 5;
  localparam int ROB_IDX_W = 4;   // enough for up to 16 reorder-buffer entries
  localparam int WA_W      = 5;   // when-available columns 4..0 of the scoreboard

  // The five microarchitectures: front-end / issue / completion order and commit point.
  typedef enum logic [2:0] {
    ARCH_I3L  = 3'd0,  // in-order issue and completion, late commit
    ARCH_I2OE = 3'd1,  // in-order issue, out-of-order completion, early commit
    ARCH_I2OL = 3'd2,  // in-order issue, out-of-order completion, late commit (ROB)
    ARCH_IO2E = 3'd3,  // out-of-order issue (IQ) and completion, early commit
    ARCH_IO2L = 3'd4   // out-of-order issue (IQ) and completion, late commit (ROB)
  } arch_e;

  typedef enum logic [1:0] {
    OP_ADDU    = 2'd0,
    OP_ADDIU   = 2'd1,
    OP_MUL     = 2'd2,
    OP_ILLEGAL = 2'd3
  } op_e;

  typedef enum logic {
    FU_X = 1'b0,   // single-cycle integer pipe
    FU_Y = 1'b1    // four-cycle multiplier pipe
  } fu_e;

  // A decoded instruction as it travels down the pipeline.
  typedef struct packed {
    logic [XLEN-1:0]      pc;
    op_e                  op;
    logic [XLEN-1:0]      imm;      // sign-extended immediate (addiu)
    logic                 rd_v;     // writes a destination register
    logic [REG_W-1:0]     rd;
    logic                 rs_v;
    logic [REG_W-1:0]     rs;
    logic                 rt_v;
    logic [REG_W-1:0]     rt;
    logic                 exc;      // raises an exception (illegal instruction)
    logic [ROB_IDX_W-1:0] rob_idx;  // reorder-buffer entry (late-commit pipelines)
  } uop_t;

  // One-cycle event flags a core reports, so that a test can see which
  // mechanisms were exercised.
  typedef struct packed {
    logic issue;           // an instruction left I
    logic raw_stall;       // I held back by a RAW hazard
    logic struct_stall;    // I held back by the write-back port hazard
    logic waw_stall;       // I held back by a pending write to its destination
    logic bypass_x;        // an operand taken from the end of X
    logic bypass_y;        // an operand taken from the end of Y3
    logic bypass_w;        // an operand taken from W
    logic bypass_x_pad;    // an operand taken from X0..X2 (equal-length pipes only)
    logic rob_full_stall;  // D held back by a full reorder buffer
    logic iq_full_stall;   // D held back by a full issue queue
    logic ooo_issue;       // issued instruction was not the oldest in the IQ
    logic ooo_complete;    // W saw an instruction older than the previous one in W
    logic commit;          // an instruction committed (C stage, late commit)
    logic exception;       // an exception was taken
    logic prf_copy;        // a cycle of ARF-to-PRF copy after an exception
  } core_events_t;

  // Event flags of the dual-issue pipeline.
  typedef struct packed {
    logic dual_alloc;      // two instructions entered the IQ and ROB together
    logic issue_x;         // an instruction issued to X
    logic issue_y;         // an instruction issued to Y
    logic dual_issue;      // one instruction issued to each of X and Y
    logic ooo_issue;       // an issued instruction was not the oldest in the IQ
    logic bypass_x;        // an operand taken from the end of X
    logic bypass_y;        // an operand taken from the end of Y3
    logic bypass_w;        // an operand taken from either W slot
    logic dual_writeback;  // both W slots wrote back
    logic dual_commit;     // two instructions committed together
    logic commit;          // at least one instruction committed
    logic rob_full_stall;  // D held back by lack of ROB entries
    logic iq_full_stall;   // D held back by lack of IQ entries
    logic exception;       // an exception was taken
    logic prf_copy;        // a cycle of ARF-to-PRF copy after an exception
  } dual_events_t;

  function automatic fu_e fu_of(op_e op);
    return (op == OP_MUL) ? FU_Y : FU_X;
  endfunction

  // Decode one instruction word. 'nop' is set for the all-zero word.
  function automatic uop_t decode(logic [31:0] inst, logic [31:0] pc, output logic nop);
    uop_t u;
    u         = '0;
    u.pc      = pc;
    u.rs      = inst[25:21];
    u.rt      = inst[20:16];
    u.imm     = {{16{inst[15]}}, inst[15:0]};
    nop       = (inst == 32'h0);
    if (inst[31:26] == 6'h00 && inst[10:0] == 11'h021) begin
      u.op = OP_ADDU;  u.rd_v = 1'b1; u.rd = inst[15:11]; u.rs_v = 1'b1; u.rt_v = 1'b1;
    end else if (inst[31:26] == 6'h09) begin
      u.op = OP_ADDIU; u.rd_v = 1'b1; u.rd = inst[20:16]; u.rs_v = 1'b1;
    end else if (inst[31:26] == 6'h1c && inst[10:0] == 11'h002) begin
      u.op = OP_MUL;   u.rd_v = 1'b1; u.rd = inst[15:11]; u.rs_v = 1'b1; u.rt_v = 1'b1;
    end else begin
      u.op = OP_ILLEGAL; u.exc = !nop;
    end
    return u;
  endfunction

endpackage
