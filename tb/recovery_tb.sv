// recovery_tb: the late-commit pipelines (I2OL and IO2L) built with
// RECOVERY_BITS, the recovery that keeps one ARF-or-PRF bit per register in
// the issue stage instead of copying the ARF into the PRF after an exception.
//
// Each program is run on both; the final architectural registers, the number
// of exceptions and the faulting pc must match the reference model. The
// handler must be fetched in the cycle after the exception, and no PRF copy
// cycle may occur. Programs: the example with each of a..g in turn made
// illegal, the example with its exception sequence, and random WAW/WAR-free
// programs with an illegal instruction at a random place, so that the
// handler reads registers last written before and after the exception.
module recovery_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam arch_e ARCHS [2] = '{ARCH_I2OL, ARCH_IO2L};
  localparam string NAME  [2] = '{"I2OL", "IO2L"};

  logic [1:0][31:0]   imem_addr, imem_data;
  logic [1:0][4:0]    dbg_addr;
  logic [1:0][31:0]   dbg_data;
  logic [1:0]         arf_we;
  logic [1:0][4:0]    arf_waddr;
  logic [1:0][31:0]   arf_wdata;
  logic [1:0]         exc_taken;
  logic [1:0][31:0]   exc_epc;
  logic [1:0]         busy;
  core_events_t [1:0] events;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    proc_core #(.ARCH(ARCHS[i]), .RECOVERY_BITS(1'b1)) dut (
      .clk, .rst,
      .imem_addr(imem_addr[i]), .imem_data(imem_data[i]),
      .dbg_addr(dbg_addr[i]), .dbg_data(dbg_data[i]),
      .arf_we(arf_we[i]), .arf_waddr(arf_waddr[i]), .arf_wdata(arf_wdata[i]),
      .exc_taken(exc_taken[i]), .exc_epc(exc_epc[i]),
      .busy(busy[i]), .events(events[i])
    );
  end

  always_comb
    for (int i = 0; i < 2; i++)
      imem_data[i] = (imem_addr[i] < 32'd1024) ? prog[imem_addr[i][9:2]] : 32'h0;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          n_exc [2], n_copy [2], t_exc [2], t_handler [2];
  logic [31:0] epc [2];

  always @(negedge clk)
    if (!rst)
      for (int i = 0; i < 2; i++) begin
        if (exc_taken[i]) begin n_exc[i]++; epc[i] = exc_epc[i]; t_exc[i] = cycle; end
        if (events[i].prf_copy) n_copy[i]++;
        if (imem_addr[i] == EXC_VEC && t_handler[i] < 0) t_handler[i] = cycle;
      end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_and_compare(string what);
    logic [31:0] ref_regs [32];
    int          ref_exc, idle, bad;
    logic [31:0] ref_epc;
    iss(ref_regs, ref_exc, ref_epc);
    for (int i = 0; i < 2; i++) begin n_exc[i] = 0; n_copy[i] = 0; t_exc[i] = -1; t_handler[i] = -1; end
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    idle = 0;
    for (int c = 0; c < 2000 && idle < 80; c++) begin
      @(posedge clk);
      if (busy == '0) idle++; else idle = 0;
    end
    #1;
    for (int i = 0; i < 2; i++) begin
      bad = 0;
      for (int r = 0; r < 32; r++) begin
        dbg_addr[i] = 5'(r); #1;
        if (dbg_data[i] !== ref_regs[r]) begin
          bad++;
          $display("  %s %s: r%0d = %0d, expected %0d", NAME[i], what, r, dbg_data[i], ref_regs[r]);
        end
      end
      chk(bad == 0, $sformatf("%s %s: register state", NAME[i], what));
      chk(n_exc[i] == ref_exc, $sformatf("%s %s: %0d exceptions, expected %0d", NAME[i], what, n_exc[i], ref_exc));
      if (ref_exc > 0) begin
        chk(epc[i] == ref_epc, $sformatf("%s %s: epc %h, expected %h", NAME[i], what, epc[i], ref_epc));
        chk(t_handler[i] == t_exc[i] + 1,
            $sformatf("%s %s: handler fetched %0d cycles after the exception, expected 1",
                      NAME[i], what, t_handler[i] - t_exc[i]));
      end
      chk(n_copy[i] == 0, $sformatf("%s %s: %0d PRF copy cycles", NAME[i], what, n_copy[i]));
    end
  endtask

  initial begin
    dbg_addr = '0;
    build_example();
    run_and_compare("example");
    for (int which = 0; which < 7; which++) begin
      build_example_fault(which);
      run_and_compare($sformatf("fault at %c", 8'(97 + which)));
    end
    for (int round = 0; round < 30; round++) begin
      build_random_exc(23);
      run_and_compare($sformatf("random with exception %0d", round));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
