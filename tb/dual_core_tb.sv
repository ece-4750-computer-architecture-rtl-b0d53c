// dual_core_tb: self-checking test of the dual-issue pipeline at its default
// sizes.
//
// It runs the example sequence a..g with the exception sequence and handler,
// then random WAW/WAR-free programs, with and without an illegal instruction
// at a random place, and compares every architectural register, the number of
// exceptions and the faulting pc with the reference model. For the example it
// checks the cycle, counted from the fetch of a, in which each of a..g updates
// the ARF; these follow from the timing rules (fetch two per cycle, X one
// cycle, Y four, bypass from the end of X/Y3 and from W, two commits per
// cycle). It also checks that a..g finish earlier than on the single-issue
// IO2L pipeline, that the architectural register updates of one cycle are in
// program order, and that every mechanism (two allocations, two issues, two
// write-backs and two commits in one cycle, out-of-order issue, each bypass,
// full IQ and ROB, exceptions and the PRF copy) occurred.
module dual_core_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0][31:0] imem_addr, imem_data;
  logic [4:0]       dbg_addr;
  logic [31:0]      dbg_data;
  logic [1:0]       arf_we;
  logic [1:0][4:0]  arf_waddr;
  logic [1:0][31:0] arf_wdata;
  logic             exc_taken;
  logic [31:0]      exc_epc;
  logic             busy;
  dual_events_t     events;

  dual_core dut (.*);

  always_comb begin
    for (int k = 0; k < 2; k++)
      imem_data[k] = (imem_addr[k] < 32'd1024) ? prog[imem_addr[k][9:2]] : 32'h0;
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NEV = 15;
  int          ev_cnt [NEV];
  int          exc_cnt;
  logic [31:0] last_epc;
  int          t_a;
  int          t_wr [32];
  int          order_bad;

  always @(negedge clk) begin
    if (!rst) begin
      for (int k = 0; k < NEV; k++) if (events[k]) ev_cnt[k]++;
      if (exc_taken) begin exc_cnt++; last_epc = exc_epc; end
      if ((imem_addr[0] == A_PC || imem_addr[1] == A_PC) && t_a < 0) t_a = cycle;
      for (int k = 0; k < 2; k++) if (arf_we[k]) t_wr[arf_waddr[k]] = cycle;
      // slot 1 never commits without slot 0
      if (arf_we[1] && !events.dual_commit) order_bad++;
    end
  end

  localparam int E_DALLOC = 14, E_ISX = 13, E_ISY = 12, E_DISS = 11, E_OOO = 10, E_BX = 9,
                 E_BY = 8, E_BW = 7, E_DWB = 6, E_DCOM = 5, E_COM = 4, E_ROBFULL = 3,
                 E_IQFULL = 2, E_EXC = 1, E_COPY = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic reset_and_run(int max_cycles);
    int idle;
    exc_cnt = 0; t_a = -1;
    for (int r = 0; r < 32; r++) t_wr[r] = -1;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    idle = 0;
    for (int c = 0; c < max_cycles && idle < 80; c++) begin
      @(posedge clk);
      if (!busy) idle++; else idle = 0;
    end
    #1;
  endtask

  task automatic compare_regs(string what);
    logic [31:0] ref_regs [32];
    int          n_exc;
    logic [31:0] epc;
    iss(ref_regs, n_exc, epc);
    for (int r = 0; r < 32; r++) begin
      dbg_addr = 5'(r);
      #1;
      check(dbg_data === ref_regs[r],
            $sformatf("%s: r%0d = %0d, expected %0d", what, r, dbg_data, ref_regs[r]));
    end
    check(exc_cnt == n_exc, $sformatf("%s: exceptions %0d, expected %0d", what, exc_cnt, n_exc));
    if (n_exc > 0)
      check(last_epc == epc, $sformatf("%s: epc %h, expected %h", what, last_epc, epc));
  endtask

  localparam int DEST [7]     = '{1, 11, 5, 7, 12, 13, 14};
  localparam int EXP  [7]     = '{8, 8, 12, 16, 16, 17, 17};
  localparam int EXP_IO2L [7] = '{8, 9, 12, 16, 17, 18, 19};

  initial begin
    dbg_addr = '0;
    order_bad = 0;
    for (int k = 0; k < NEV; k++) ev_cnt[k] = 0;

    build_example();
    reset_and_run(2000);
    compare_regs("example");
    for (int j = 0; j < 7; j++)
      check(t_wr[DEST[j]] - t_a == EXP[j],
            $sformatf("instruction %c updates r%0d in cycle %0d, expected %0d",
                      8'(97 + j), DEST[j], t_wr[DEST[j]] - t_a, EXP[j]));
    check(t_wr[14] - t_a < EXP_IO2L[6], "dual issue finishes a..g earlier than IO2L");
    check(t_wr[17] < 0 && t_wr[18] < 0 && t_wr[19] < 0, "younger instructions squashed");

    for (int which = 0; which < 7; which++) begin
      build_example_fault(which);
      reset_and_run(2000);
      compare_regs($sformatf("example with %c illegal", 8'(97 + which)));
    end

    for (int round = 0; round < 40; round++) begin
      build_random(25);
      reset_and_run(2000);
      compare_regs($sformatf("random %0d", round));
    end

    for (int round = 0; round < 30; round++) begin
      build_random_exc(23);
      reset_and_run(2000);
      compare_regs($sformatf("random with exception %0d", round));
    end

    check(order_bad == 0, "second commit slot used only with the first");
    check(ev_cnt[E_DALLOC] > 0, "two instructions allocated in one cycle");
    check(ev_cnt[E_DISS] > 0, "two instructions issued in one cycle");
    check(ev_cnt[E_DWB] > 0, "two write-backs in one cycle");
    check(ev_cnt[E_DCOM] > 0, "two commits in one cycle");
    check(ev_cnt[E_OOO] > 0, "out-of-order issue");
    check(ev_cnt[E_BX] > 0, "bypass from X");
    check(ev_cnt[E_BY] > 0, "bypass from Y3");
    check(ev_cnt[E_BW] > 0, "bypass from W");
    check(ev_cnt[E_IQFULL] > 0, "IQ full");
    check(ev_cnt[E_ROBFULL] > 0, "ROB full");
    check(ev_cnt[E_EXC] > 0, "exception");
    check(ev_cnt[E_COPY] == 31 * ev_cnt[E_EXC], $sformatf("ARF-to-PRF copy cycles %0d", ev_cnt[E_COPY]));
    $display("dual: alloc2=%0d issX=%0d issY=%0d iss2=%0d ooo=%0d bypX=%0d bypY=%0d bypW=%0d wb2=%0d com2=%0d com=%0d robfull=%0d iqfull=%0d exc=%0d copy=%0d",
             ev_cnt[E_DALLOC], ev_cnt[E_ISX], ev_cnt[E_ISY], ev_cnt[E_DISS], ev_cnt[E_OOO],
             ev_cnt[E_BX], ev_cnt[E_BY], ev_cnt[E_BW], ev_cnt[E_DWB], ev_cnt[E_DCOM],
             ev_cnt[E_COM], ev_cnt[E_ROBFULL], ev_cnt[E_IQFULL], ev_cnt[E_EXC], ev_cnt[E_COPY]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
