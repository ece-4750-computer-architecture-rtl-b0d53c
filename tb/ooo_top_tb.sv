// ooo_top_tb: end-to-end test of the five single-issue pipelines and the
// dual-issue pipeline at their default sizes.
//
// Each core gets its own copy of the same program. Part 1 runs the seven-
// instruction example (a..g) followed by an illegal instruction and its
// handler; it checks every architectural register against a reference model,
// the exception count and faulting pc, and the cycle, counted from the fetch
// of instruction a, in which each of a..g updates the architectural register
// file. The expected cycles follow from the pipelines' timing rules: X takes
// one cycle, Y four, results bypass from the end of X/Y3 and from W, the
// write-back port is shared, the IQ has three entries and the ROB four.
// Part 2 runs random WAW/WAR-free programs and compares the final registers;
// part 3 does the same with an illegal instruction at a random place.
// The dual-issue pipeline is checked the same way (registers, exceptions and
// the a..g update cycles). Finally it checks that each mechanism of each
// pipeline occurred.
module ooo_top_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [4:0][31:0]   imem_addr, imem_data;
  logic [4:0][4:0]    dbg_addr;
  logic [4:0][31:0]   dbg_data;
  logic [4:0]         arf_we;
  logic [4:0][4:0]    arf_waddr;
  logic [4:0][31:0]   arf_wdata;
  logic [4:0]         exc_taken;
  logic [4:0][31:0]   exc_epc;
  logic [4:0]         busy;
  core_events_t [4:0] events;
  logic [1:0][31:0]   dual_imem_addr, dual_imem_data;
  logic [4:0]         dual_dbg_addr;
  logic [31:0]        dual_dbg_data;
  logic [1:0]         dual_arf_we;
  logic [1:0][4:0]    dual_arf_waddr;
  logic [1:0][31:0]   dual_arf_wdata;
  logic               dual_exc_taken;
  logic [31:0]        dual_exc_epc;
  logic               dual_busy;
  dual_events_t       dual_events;

  ooo_top dut (.*);

  always_comb begin
    for (int i = 0; i < 5; i++)
      imem_data[i] = (imem_addr[i] < 32'd1024) ? prog[imem_addr[i][9:2]] : 32'h0;
    for (int k = 0; k < 2; k++)
      dual_imem_data[k] = (dual_imem_addr[k] < 32'd1024) ? prog[dual_imem_addr[k][9:2]] : 32'h0;
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;    // dual-issue mechanisms (bit positions in dual_events_t)
    check(d_ev_cnt[14] > 0, "dual: two allocations in one cycle");
    check(d_ev_cnt[11] > 0, "dual: two issues in one cycle");
    check(d_ev_cnt[10] > 0, "dual: out-of-order issue");
    check(d_ev_cnt[9] > 0 && d_ev_cnt[8] > 0 && d_ev_cnt[7] > 0, "dual: bypass from X, Y3 and W");
    check(d_ev_cnt[6] > 0, "dual: two write-backs in one cycle");
    check(d_ev_cnt[5] > 0, "dual: two commits in one cycle");
    check(d_ev_cnt[3] > 0 && d_ev_cnt[2] > 0, "dual: ROB full and IQ full");
    check(d_ev_cnt[1] > 0 && d_ev_cnt[0] == 31 * d_ev_cnt[1], "dual: exceptions and PRF copy");
    $display("dual  alloc2=%0d iss2=%0d ooo=%0d bypX=%0d bypY=%0d bypW=%0d wb2=%0d com2=%0d robfull=%0d iqfull=%0d exc=%0d copy=%0d",
             d_ev_cnt[14], d_ev_cnt[11], d_ev_cnt[10], d_ev_cnt[9], d_ev_cnt[8], d_ev_cnt[7],
             d_ev_cnt[6], d_ev_cnt[5], d_ev_cnt[3], d_ev_cnt[2], d_ev_cnt[1], d_ev_cnt[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters: [core][event]
  localparam int NEV = 15;
  int ev_cnt [5][NEV];
  int exc_cnt [5];
  logic [31:0] last_epc [5];
  int t_a [5];                    // cycle in which a was fetched
  int t_wr [5][32];               // cycle of the last ARF write of each register
  int d_ev_cnt [NEV];             // dual-issue pipeline
  int d_exc_cnt;
  logic [31:0] d_last_epc;
  int d_t_a;
  int d_t_wr [32];

  function automatic logic [NEV-1:0] ev_bits(core_events_t e);
    return NEV'(e);
  endfunction

  // sampled mid-cycle, when the cycle's combinational outputs are settled
  always @(negedge clk) begin
    if (!rst) begin
      for (int i = 0; i < 5; i++) begin
        for (int k = 0; k < NEV; k++) if (ev_bits(events[i])[k]) ev_cnt[i][k]++;
        if (exc_taken[i]) begin exc_cnt[i]++; last_epc[i] = exc_epc[i]; end
        if (imem_addr[i] == A_PC && t_a[i] < 0) t_a[i] = cycle;
        if (arf_we[i]) t_wr[i][arf_waddr[i]] = cycle;
      end
      for (int k = 0; k < NEV; k++) if (dual_events[k]) d_ev_cnt[k]++;
      if (dual_exc_taken) begin d_exc_cnt++; d_last_epc = dual_exc_epc; end
      if ((dual_imem_addr[0] == A_PC || dual_imem_addr[1] == A_PC) && d_t_a < 0) d_t_a = cycle;
      for (int k = 0; k < 2; k++) if (dual_arf_we[k]) d_t_wr[dual_arf_waddr[k]] = cycle;
    end
  end

  // bit positions in core_events_t (first field is the most significant)
  localparam int E_ISSUE = 14, E_RAW = 13, E_STRUCT = 12, E_WAW = 11, E_BX = 10, E_BY = 9,
                 E_BW = 8, E_BXPAD = 7, E_ROBFULL = 6, E_IQFULL = 5, E_OOOISS = 4,
                 E_OOOCMP = 3, E_COMMIT = 2, E_EXC = 1, E_COPY = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic reset_and_run(int max_cycles);
    int idle;
    for (int i = 0; i < 5; i++) begin
      exc_cnt[i] = 0; t_a[i] = -1;
      for (int r = 0; r < 32; r++) t_wr[i][r] = -1;
    end
    d_exc_cnt = 0; d_t_a = -1;
    for (int r = 0; r < 32; r++) d_t_wr[r] = -1;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    idle = 0;
    for (int c = 0; c < max_cycles && idle < 80; c++) begin
      @(posedge clk);
      if (busy == '0 && !dual_busy) idle++; else idle = 0;
    end
    #1;
  endtask

  task automatic compare_regs(string what);
    logic [31:0] ref_regs [32];
    int          n_exc;
    logic [31:0] epc;
    int          bad;
    iss(ref_regs, n_exc, epc);
    for (int i = 0; i < 5; i++) begin
      bad = 0;
      for (int r = 0; r < 32; r++) begin
        dbg_addr[i] = 5'(r);
        #1;
        if (dbg_data[i] !== ref_regs[r]) begin
          bad++;
          $display("  core %0d r%0d = %0d, expected %0d", i, r, dbg_data[i], ref_regs[r]);
        end
      end
      check(bad == 0, $sformatf("%s: core %0d architectural registers", what, i));
      check(exc_cnt[i] == n_exc, $sformatf("%s: core %0d exceptions %0d, expected %0d",
                                           what, i, exc_cnt[i], n_exc));
      if (n_exc > 0)
        check(last_epc[i] == epc, $sformatf("%s: core %0d epc %h, expected %h",
                                            what, i, last_epc[i], epc));
    end
    bad = 0;
    for (int r = 0; r < 32; r++) begin
      dual_dbg_addr = 5'(r);
      #1;
      if (dual_dbg_data !== ref_regs[r]) begin
        bad++;
        $display("  dual r%0d = %0d, expected %0d", r, dual_dbg_data, ref_regs[r]);
      end
    end
    check(bad == 0, $sformatf("%s: dual-issue architectural registers", what));
    check(d_exc_cnt == n_exc, $sformatf("%s: dual-issue exceptions %0d, expected %0d",
                                        what, d_exc_cnt, n_exc));
    if (n_exc > 0)
      check(d_last_epc == epc, $sformatf("%s: dual-issue epc %h, expected %h",
                                         what, d_last_epc, epc));
  endtask

  // Expected ARF-update cycle of a..g (relative to the fetch of a).
  // Destinations of a..g: r1, r11, r5, r7, r12, r13, r14.
  localparam int DEST [7] = '{1, 11, 5, 7, 12, 13, 14};
  localparam int EXP  [5][7] = '{
    '{7, 8, 11, 15, 16, 17, 18},   // I3L : in-order W
    '{7, 5, 11, 15, 13, 14, 16},   // I2OE: W out of order
    '{8, 9, 12, 16, 17, 18, 19},   // I2OL: C in order
    '{7, 5, 11, 15,  9, 10, 14},   // IO2E: out-of-order issue
    '{8, 9, 12, 16, 17, 18, 19}    // IO2L: C in order, D held by the 4-entry ROB
  };
  localparam int D_EXP [7] = '{8, 8, 12, 16, 16, 17, 17};   // dual issue
  localparam string NAME [5] = '{"I3L", "I2OE", "I2OL", "IO2E", "IO2L"};

  initial begin
    dbg_addr = '0;
    dual_dbg_addr = '0;
    for (int i = 0; i < 5; i++) for (int k = 0; k < NEV; k++) ev_cnt[i][k] = 0;
    for (int k = 0; k < NEV; k++) d_ev_cnt[k] = 0;

    // ---- part 1: example sequence and a precise exception ----
    build_example();
    reset_and_run(2000);
    compare_regs("example");
    for (int i = 0; i < 5; i++) begin
      for (int j = 0; j < 7; j++) begin
        check(t_wr[i][DEST[j]] - t_a[i] == EXP[i][j],
              $sformatf("%s: instruction %c updates r%0d in cycle %0d, expected %0d", NAME[i],
                        8'(97 + j), DEST[j], t_wr[i][DEST[j]] - t_a[i], EXP[i][j]));
      end
      // instructions after the illegal one never reach the ARF
      check(t_wr[i][17] < 0 && t_wr[i][18] < 0 && t_wr[i][19] < 0,
            $sformatf("%s: younger instructions squashed", NAME[i]));
    end
    for (int j = 0; j < 7; j++)
      check(d_t_wr[DEST[j]] - d_t_a == D_EXP[j],
            $sformatf("dual: instruction %c updates r%0d in cycle %0d, expected %0d",
                      8'(97 + j), DEST[j], d_t_wr[DEST[j]] - d_t_a, D_EXP[j]));
    check(d_t_wr[17] < 0 && d_t_wr[18] < 0 && d_t_wr[19] < 0, "dual: younger instructions squashed");

    // ---- part 2: random programs ----
    for (int round = 0; round < 40; round++) begin
      build_random(25);
      reset_and_run(2000);
      compare_regs($sformatf("random %0d", round));
    end

    // ---- part 3: random programs interrupted by an exception ----
    for (int round = 0; round < 30; round++) begin
      build_random_exc(23);
      reset_and_run(2000);
      compare_regs($sformatf("random with exception %0d", round));
    end

    // ---- mechanisms ----
    for (int i = 0; i < 5; i++) begin
      check(ev_cnt[i][E_ISSUE] > 0, $sformatf("%s issued", NAME[i]));
      check(ev_cnt[i][E_BX] > 0, $sformatf("%s bypass from X", NAME[i]));
      check(ev_cnt[i][E_BY] > 0, $sformatf("%s bypass from Y3", NAME[i]));
      check(ev_cnt[i][E_BW] > 0, $sformatf("%s bypass from W", NAME[i]));
      check(ev_cnt[i][E_EXC] > 0, $sformatf("%s exception", NAME[i]));
      check(ev_cnt[i][E_COMMIT] > 0, $sformatf("%s commit", NAME[i]));
      if (i <= 2) check(ev_cnt[i][E_RAW] > 0, $sformatf("%s RAW stall", NAME[i]));
      if (i == 0) begin
        check(ev_cnt[i][E_BXPAD] > 0, "I3L bypass from X0..X2");
        check(ev_cnt[i][E_OOOCMP] == 0, "I3L completes in order");
      end else begin
        check(ev_cnt[i][E_OOOCMP] > 0, $sformatf("%s out-of-order completion", NAME[i]));
      end
      if (i == 1 || i == 2)
        check(ev_cnt[i][E_STRUCT] > 0, $sformatf("%s write-port stall", NAME[i]));
      if (i == 2 || i == 4) begin
        check(ev_cnt[i][E_ROBFULL] > 0, $sformatf("%s ROB full", NAME[i]));
        check(ev_cnt[i][E_COPY] == 31 * ev_cnt[i][E_EXC],
              $sformatf("%s ARF-to-PRF copy cycles %0d", NAME[i], ev_cnt[i][E_COPY]));
      end else begin
        check(ev_cnt[i][E_COPY] == 0, $sformatf("%s no PRF copy", NAME[i]));
      end
      if (i >= 3) begin
        check(ev_cnt[i][E_OOOISS] > 0, $sformatf("%s out-of-order issue", NAME[i]));
        check(ev_cnt[i][E_IQFULL] > 0, $sformatf("%s IQ full", NAME[i]));
      end else begin
        check(ev_cnt[i][E_OOOISS] == 0, $sformatf("%s issues in order", NAME[i]));
      end
      $display("%-5s issue=%0d raw=%0d struct=%0d bypX=%0d bypY=%0d bypW=%0d bypXpad=%0d robfull=%0d iqfull=%0d oooiss=%0d ooocmp=%0d commit=%0d exc=%0d copy=%0d",
               NAME[i], ev_cnt[i][E_ISSUE], ev_cnt[i][E_RAW], ev_cnt[i][E_STRUCT], ev_cnt[i][E_BX],
               ev_cnt[i][E_BY], ev_cnt[i][E_BW], ev_cnt[i][E_BXPAD], ev_cnt[i][E_ROBFULL],
               ev_cnt[i][E_IQFULL], ev_cnt[i][E_OOOISS], ev_cnt[i][E_OOOCMP], ev_cnt[i][E_COMMIT],
               ev_cnt[i][E_EXC], ev_cnt[i][E_COPY]);
    end
    // dual-issue mechanisms (bit positions in dual_events_t)
    check(d_ev_cnt[14] > 0, "dual: two allocations in one cycle");
    check(d_ev_cnt[11] > 0, "dual: two issues in one cycle");
    check(d_ev_cnt[10] > 0, "dual: out-of-order issue");
    check(d_ev_cnt[9] > 0 && d_ev_cnt[8] > 0 && d_ev_cnt[7] > 0, "dual: bypass from X, Y3 and W");
    check(d_ev_cnt[6] > 0, "dual: two write-backs in one cycle");
    check(d_ev_cnt[5] > 0, "dual: two commits in one cycle");
    check(d_ev_cnt[3] > 0 && d_ev_cnt[2] > 0, "dual: ROB full and IQ full");
    check(d_ev_cnt[1] > 0 && d_ev_cnt[0] == 31 * d_ev_cnt[1], "dual: exceptions and PRF copy");
    $display("dual  alloc2=%0d iss2=%0d ooo=%0d bypX=%0d bypY=%0d bypW=%0d wb2=%0d com2=%0d robfull=%0d iqfull=%0d exc=%0d copy=%0d",
             d_ev_cnt[14], d_ev_cnt[11], d_ev_cnt[10], d_ev_cnt[9], d_ev_cnt[8], d_ev_cnt[7],
             d_ev_cnt[6], d_ev_cnt[5], d_ev_cnt[3], d_ev_cnt[2], d_ev_cnt[1], d_ev_cnt[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
