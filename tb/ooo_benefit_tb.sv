// ooo_benefit_tb: how much out-of-order issue gains on the example sequence
// when the issue queue can hold all seven instructions.
//
// Three cores run the example side by side: in-order issue (I2OE), and
// out-of-order issue with an 8-entry issue queue, with early commit (IO2E) and
// with late commit and an 8-entry reorder buffer (IO2L). The testbench checks
// the cycle, from the fetch of instruction a, in which each instruction
// updates the architectural registers, worked out by hand from the pipeline
// rules, and that every core ends with the reference register values.
module ooo_benefit_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [2:0][31:0]   imem_addr, imem_data, dbg_data, arf_wdata, exc_epc;
  logic [2:0][4:0]    dbg_addr, arf_waddr;
  logic [2:0]         arf_we, exc_taken, busy;
  core_events_t [2:0] events;

  proc_core #(.ARCH(ARCH_I2OE)) u_io (
    .clk, .rst, .imem_addr(imem_addr[0]), .imem_data(imem_data[0]), .dbg_addr(dbg_addr[0]),
    .dbg_data(dbg_data[0]), .arf_we(arf_we[0]), .arf_waddr(arf_waddr[0]), .arf_wdata(arf_wdata[0]),
    .exc_taken(exc_taken[0]), .exc_epc(exc_epc[0]), .busy(busy[0]), .events(events[0]));
  proc_core #(.ARCH(ARCH_IO2E), .IQ_ENTRIES(8)) u_ooo_e (
    .clk, .rst, .imem_addr(imem_addr[1]), .imem_data(imem_data[1]), .dbg_addr(dbg_addr[1]),
    .dbg_data(dbg_data[1]), .arf_we(arf_we[1]), .arf_waddr(arf_waddr[1]), .arf_wdata(arf_wdata[1]),
    .exc_taken(exc_taken[1]), .exc_epc(exc_epc[1]), .busy(busy[1]), .events(events[1]));
  proc_core #(.ARCH(ARCH_IO2L), .IQ_ENTRIES(8), .ROB_ENTRIES(8)) u_ooo_l (
    .clk, .rst, .imem_addr(imem_addr[2]), .imem_data(imem_data[2]), .dbg_addr(dbg_addr[2]),
    .dbg_data(dbg_data[2]), .arf_we(arf_we[2]), .arf_waddr(arf_waddr[2]), .arf_wdata(arf_wdata[2]),
    .exc_taken(exc_taken[2]), .exc_epc(exc_epc[2]), .busy(busy[2]), .events(events[2]));

  always_comb
    for (int i = 0; i < 3; i++)
      imem_data[i] = (imem_addr[i] < 32'd1024) ? prog[imem_addr[i][9:2]] : 32'h0;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int t_a [3];
  int t_wr [3][32];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (!rst)
      for (int i = 0; i < 3; i++) begin
        if (imem_addr[i] == A_PC && t_a[i] < 0) t_a[i] = cycle;
        if (arf_we[i]) t_wr[i][arf_waddr[i]] = cycle;
      end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int DEST [7] = '{1, 11, 5, 7, 12, 13, 14};
  localparam int EXP  [3][7] = '{
    '{7, 5, 11, 15, 13, 14, 16},   // I2OE
    '{7, 5, 11, 15,  9, 10, 13},   // IO2E, 8-entry IQ
    '{8, 9, 12, 16, 17, 18, 19}    // IO2L, 8-entry IQ and ROB
  };
  localparam string NAME [3] = '{"I2OE", "IO2E/IQ8", "IO2L/IQ8/ROB8"};

  initial begin
    logic [31:0] ref_regs [32];
    int          ref_exc, idle;
    logic [31:0] ref_epc;
    dbg_addr = '0;
    build_example_fault(0);
    prog[A_PC/4] = enc_mul(1, 2, 3);            // restore a: no fault in this test
    iss(ref_regs, ref_exc, ref_epc);
    for (int i = 0; i < 3; i++) begin
      t_a[i] = -1;
      for (int r = 0; r < 32; r++) t_wr[i][r] = -1;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    idle = 0;
    for (int c = 0; c < 1000 && idle < 80; c++) begin
      @(posedge clk);
      if (busy == '0) idle++; else idle = 0;
    end
    #1;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 7; j++)
        chk(t_wr[i][DEST[j]] - t_a[i] == EXP[i][j],
            $sformatf("%s: %c updates r%0d in cycle %0d, expected %0d", NAME[i], 8'(97 + j),
                      DEST[j], t_wr[i][DEST[j]] - t_a[i], EXP[i][j]));
      for (int r = 0; r < 32; r++) begin
        dbg_addr[i] = 5'(r); #1;
        chk(dbg_data[i] == ref_regs[r], $sformatf("%s: r%0d = %0d, expected %0d", NAME[i], r, dbg_data[i], ref_regs[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
