// tb_prog_pkg: test programs and a reference instruction-set model for the
// pipeline testbenches.
//
// prog holds 256 instruction words (byte addresses 0..0x3fc). build_example
// writes the seven-instruction example sequence (mul/addiu chains) behind a
// short prologue that sets its inputs, followed by a sequence with an illegal
// instruction and an exception handler at EXC_VEC. build_random writes a
// random program of addu/addiu/mul in which every destination is a register
// not read or written before, so there are no WAW or WAR dependences;
// build_random_exc adds an illegal instruction at a random place. iss
// executes prog one instruction at a time, independently of the RTL, and gives
// the final register values, the number of exceptions and the faulting pc.
package tb_prog_pkg;

  localparam logic [31:0] EXC_VEC = 32'h0000_0100;
  localparam logic [31:0] ILLEGAL = 32'hffff_ffff;
  localparam int          A_PC    = 32'h34;       // address of instruction a
  localparam int          X_PC    = 32'h78;       // address of the illegal instruction

  logic [31:0] prog [256];

  function automatic logic [31:0] enc_addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 11'h021};
  endfunction
  function automatic logic [31:0] enc_addiu(int rt, int rs, int imm);
    return {6'h09, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_mul(int rd, int rs, int rt);
    return {6'h1c, 5'(rs), 5'(rt), 5'(rd), 11'h002};
  endfunction

  function automatic void clear();
    for (int i = 0; i < 256; i++) prog[i] = 32'h0;
  endfunction

  function automatic void build_example();
    clear();
    // prologue: initial register values r2=1, r3=2, r4=3, r6=4, r10=21
    prog[0]  = enc_addiu(2, 0, 1);
    prog[1]  = enc_addiu(3, 0, 2);
    prog[2]  = enc_addiu(4, 0, 3);
    prog[3]  = enc_addiu(6, 0, 4);
    prog[4]  = enc_addiu(10, 0, 21);
    // words 5..12 are nops, so the example starts with an empty pipeline
    prog[A_PC/4 + 0] = enc_mul(1, 2, 3);      // a: mul   r1,  r2,  r3
    prog[A_PC/4 + 1] = enc_addiu(11, 10, 1);  // b: addiu r11, r10, 1
    prog[A_PC/4 + 2] = enc_mul(5, 1, 4);      // c: mul   r5,  r1,  r4
    prog[A_PC/4 + 3] = enc_mul(7, 5, 6);      // d: mul   r7,  r5,  r6
    prog[A_PC/4 + 4] = enc_addiu(12, 11, 1);  // e: addiu r12, r11, 1
    prog[A_PC/4 + 5] = enc_addiu(13, 12, 1);  // f: addiu r13, r12, 1
    prog[A_PC/4 + 6] = enc_addiu(14, 12, 2);  // g: addiu r14, r12, 2
    // exception sequence: an older multiply is still in flight at the fault
    prog[X_PC/4 - 2] = enc_addiu(15, 0, 5);
    prog[X_PC/4 - 1] = enc_mul(16, 15, 15);
    prog[X_PC/4 + 0] = ILLEGAL;
    prog[X_PC/4 + 1] = enc_addiu(17, 0, 9);   // must not take effect
    prog[X_PC/4 + 2] = enc_mul(18, 15, 15);   // must not take effect
    prog[X_PC/4 + 3] = enc_addiu(19, 0, 1);   // must not take effect
    // handler
    prog[EXC_VEC/4 + 0] = enc_addiu(20, 0, 7);
    prog[EXC_VEC/4 + 1] = enc_addu(21, 20, 16);
  endfunction

  // The example a..g alone, with instruction 'which' (0 = a .. 6 = g)
  // replaced by an illegal word, followed by the handler.
  function automatic void build_example_fault(int which);
    build_example();
    for (int i = X_PC/4 - 2; i <= X_PC/4 + 3; i++) prog[i] = 32'h0;
    prog[A_PC/4 + which] = ILLEGAL;
  endfunction

  // Random WAW/WAR-free program of n instructions (n <= 25) after a prologue
  // setting r1..r6.
  function automatic void build_random(int n);
    int      pos;
    int      next_dest;
    int      op, s0, s1;
    clear();
    pos = 0;
    for (int r = 1; r <= 6; r++) begin
      prog[pos] = enc_addiu(r, 0, 3 + ($urandom % 50));
      pos++;
    end
    next_dest = 7;
    for (int i = 0; i < n && next_dest < 32; i++) begin
      op = $urandom % 3;
      s0 = 1 + ($urandom % (next_dest - 1));
      s1 = 1 + ($urandom % (next_dest - 1));
      // bias towards the most recent results to create dependences
      if ($urandom % 2 == 0 && next_dest > 8) s0 = next_dest - 1 - ($urandom % 2);
      case (op)
        0: prog[pos] = enc_addu(next_dest, s0, s1);
        1: prog[pos] = enc_addiu(next_dest, s0, ($urandom % 200) - 100);
        default: prog[pos] = enc_mul(next_dest, s0, s1);
      endcase
      pos++;
      if ($urandom % 5 == 0) pos++;            // occasional nop bubble
      next_dest++;
    end
  endfunction

  // Random program of n instructions (destinations up to r29) with one of
  // them replaced by an illegal word. The handler writes r30 and r31 only,
  // so it has no WAW or WAR dependence on the interrupted code, and reads
  // r27..r29, the last registers the program writes: usually instructions
  // after the illegal one, which must not take effect.
  function automatic void build_random_exc(int n);
    int last;
    build_random(n);
    last = 6;
    for (int i = 6; i < 64; i++) if (prog[i] != 32'h0) last = i;
    prog[6 + ($urandom % (last - 5))] = ILLEGAL;
    prog[EXC_VEC/4 + 0] = enc_addu(30, 29, 28);
    prog[EXC_VEC/4 + 1] = enc_addu(31, 30, 27);
  endfunction

  // Reference model: run prog from address 0 until 64 nops in a row.
  function automatic void iss(output logic [31:0] regs [32], output int n_exc,
                              output logic [31:0] epc);
    logic [31:0] pc, w;
    int          zeros, steps;
    for (int r = 0; r < 32; r++) regs[r] = 32'h0;
    pc = 0; zeros = 0; steps = 0; n_exc = 0; epc = 0;
    while (zeros < 64 && steps < 4000) begin
      w = (pc < 1024) ? prog[pc[9:2]] : 32'h0;
      steps++;
      if (w == 32'h0) begin
        zeros++; pc = pc + 4;
      end else begin
        zeros = 0;
        if (w[31:26] == 6'h00 && w[10:0] == 11'h021) begin
          regs[w[15:11]] = regs[w[25:21]] + regs[w[20:16]];
        end else if (w[31:26] == 6'h09) begin
          regs[w[20:16]] = regs[w[25:21]] + {{16{w[15]}}, w[15:0]};
        end else if (w[31:26] == 6'h1c && w[10:0] == 11'h002) begin
          regs[w[15:11]] = regs[w[25:21]] * regs[w[20:16]];
        end else begin
          n_exc++; epc = pc; pc = EXC_VEC - 4;
        end
        regs[0] = 32'h0;
        pc = pc + 4;
      end
    end
  endfunction

endpackage
