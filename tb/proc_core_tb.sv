// proc_core_tb: the core in its default organisation (IO2L: issue queue,
// scoreboard, physical register file and reorder buffer) running the
// seven-instruction example, a precise exception and random programs, with
// and without an illegal instruction.
//
// Checks: every architectural register, one check each, against a reference
// model; the cycle
// (from the fetch of instruction a) in which each of a..g commits to the ARF;
// that the instructions after the illegal one never commit while the older
// multiply does; the exception pc; that the ARF-to-PRF copy takes 31 cycles
// and the handler is fetched in the cycle after it; and that out-of-order
// issue, a full IQ and a full ROB all occurred.
module proc_core_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0]  imem_addr, imem_data, dbg_data, arf_wdata, exc_epc;
  logic [4:0]   dbg_addr, arf_waddr;
  logic         arf_we, exc_taken, busy;
  core_events_t events;

  proc_core dut (.*);

  assign imem_data = (imem_addr < 32'd1024) ? prog[imem_addr[9:2]] : 32'h0;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_a, t_exc, t_handler, n_exc, n_copy, n_ooo, n_iqfull, n_robfull;
  int t_wr [32];
  logic [31:0] epc_seen;

  always @(negedge clk) begin
    if (!rst) begin
      if (imem_addr == A_PC && t_a < 0) t_a = cycle;
      if (imem_addr == EXC_VEC && t_handler < 0) t_handler = cycle;
      if (arf_we) t_wr[arf_waddr] = cycle;
      if (exc_taken) begin n_exc++; t_exc = cycle; epc_seen = exc_epc; end
      if (events.prf_copy) n_copy++;
      if (events.ooo_issue) n_ooo++;
      if (events.iq_full_stall) n_iqfull++;
      if (events.rob_full_stall) n_robfull++;
    end
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run();
    int idle;
    t_a = -1; t_exc = -1; t_handler = -1; n_exc = 0; n_copy = 0;
    for (int r = 0; r < 32; r++) t_wr[r] = -1;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    idle = 0;
    for (int c = 0; c < 3000 && idle < 80; c++) begin
      @(posedge clk);
      if (!busy) idle++; else idle = 0;
    end
    #1;
  endtask

  task automatic compare(string what);
    logic [31:0] ref_regs [32];
    int          ref_exc;
    logic [31:0] ref_epc;
    iss(ref_regs, ref_exc, ref_epc);
    for (int r = 0; r < 32; r++) begin
      dbg_addr = 5'(r);
      #1;
      chk(dbg_data === ref_regs[r],
          $sformatf("%s: r%0d = %0d, expected %0d", what, r, dbg_data, ref_regs[r]));
    end
    chk(n_exc == ref_exc, $sformatf("%s: %0d exceptions, expected %0d", what, n_exc, ref_exc));
    if (ref_exc > 0) chk(epc_seen == ref_epc, $sformatf("%s: epc %h", what, epc_seen));
  endtask

  localparam int DEST [7] = '{1, 11, 5, 7, 12, 13, 14};
  localparam int EXP  [7] = '{8, 9, 12, 16, 17, 18, 19};

  initial begin
    dbg_addr = 0; n_ooo = 0; n_iqfull = 0; n_robfull = 0;
    build_example();
    run();
    compare("example");
    for (int j = 0; j < 7; j++)
      chk(t_wr[DEST[j]] - t_a == EXP[j], $sformatf("instruction %c commits in cycle %0d, expected %0d",
                                                  8'(97 + j), t_wr[DEST[j]] - t_a, EXP[j]));
    chk(t_wr[16] >= 0 && t_wr[16] < t_exc, "older multiply commits before the exception");
    chk(t_wr[17] < 0 && t_wr[18] < 0 && t_wr[19] < 0, "younger instructions never commit");
    chk(n_copy == 31, $sformatf("ARF-to-PRF copy took %0d cycles", n_copy));
    chk(t_handler - t_exc == 32, $sformatf("handler fetched %0d cycles after the exception", t_handler - t_exc));
    for (int round = 0; round < 30; round++) begin
      build_random(25);
      run();
      compare($sformatf("random %0d", round));
    end
    for (int which = 0; which < 7; which++) begin
      build_example_fault(which);
      run();
      compare($sformatf("fault at %c", 8'(97 + which)));
    end
    for (int round = 0; round < 30; round++) begin
      build_random_exc(23);
      run();
      compare($sformatf("random with exception %0d", round));
    end
    chk(n_ooo > 0 && n_iqfull > 0 && n_robfull > 0,
        $sformatf("mechanisms: ooo issue %0d, IQ full %0d, ROB full %0d", n_ooo, n_iqfull, n_robfull));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
