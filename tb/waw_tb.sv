// waw_tb: write-after-write ordering in the in-order-issue pipelines.
//
// A multiply and a younger add write the same register; further pairs vary
// the distance between them. I3L keeps the order because every instruction
// takes the same time to reach W; I2OE and I2OL rely on the issue stage
// holding the younger write until the older one is within a cycle of W. The
// final registers must equal the reference model's, the ARF must see the
// multiply's value before the add's, and the WAW stall must have occurred in
// the two scoreboard pipelines.
module waw_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [2:0][31:0]   imem_addr, imem_data, dbg_data, arf_wdata, exc_epc;
  logic [2:0][4:0]    dbg_addr, arf_waddr;
  logic [2:0]         arf_we, exc_taken, busy;
  core_events_t [2:0] events;

  localparam arch_e ARCHS [3] = '{ARCH_I3L, ARCH_I2OE, ARCH_I2OL};
  localparam string NAME [3] = '{"I3L", "I2OE", "I2OL"};

  for (genvar i = 0; i < 3; i++) begin : g_core
    proc_core #(.ARCH(ARCHS[i])) u_core (
      .clk, .rst, .imem_addr(imem_addr[i]), .imem_data(imem_data[i]), .dbg_addr(dbg_addr[i]),
      .dbg_data(dbg_data[i]), .arf_we(arf_we[i]), .arf_waddr(arf_waddr[i]), .arf_wdata(arf_wdata[i]),
      .exc_taken(exc_taken[i]), .exc_epc(exc_epc[i]), .busy(busy[i]), .events(events[i]));
  end

  always_comb
    for (int i = 0; i < 3; i++)
      imem_data[i] = (imem_addr[i] < 32'd1024) ? prog[imem_addr[i][9:2]] : 32'h0;

  int checks = 0, failures = 0;
  int n_waw [3];
  int r8_seq [3][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (!rst)
      for (int i = 0; i < 3; i++) begin
        if (events[i].waw_stall) n_waw[i]++;
        if (arf_we[i] && arf_waddr[i] == 5'd8) r8_seq[i].push_back(int'(arf_wdata[i]));
      end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [31:0] ref_regs [32];
    int          ref_exc, idle;
    logic [31:0] ref_epc;
    dbg_addr = '0;
    clear();
    prog[0] = enc_addiu(2, 0, 6);
    prog[1] = enc_addiu(3, 0, 7);
    prog[8]  = enc_mul(8, 2, 3);       // r8 = 42
    prog[9]  = enc_addiu(8, 0, 5);     // r8 = 5, right behind
    prog[16] = enc_mul(9, 2, 2);       // r9 = 36
    prog[17] = enc_addiu(4, 0, 1);
    prog[18] = enc_addu(9, 2, 3);      // r9 = 13, two instructions later
    prog[24] = enc_mul(10, 3, 3);      // r10 = 49
    prog[25] = enc_addiu(10, 10, 1);   // r10 = 50, also a RAW
    iss(ref_regs, ref_exc, ref_epc);
    for (int i = 0; i < 3; i++) n_waw[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    idle = 0;
    for (int c = 0; c < 1000 && idle < 80; c++) begin
      @(posedge clk);
      if (busy == '0) idle++; else idle = 0;
    end
    #1;
    for (int i = 0; i < 3; i++) begin
      for (int r = 0; r < 32; r++) begin
        dbg_addr[i] = 5'(r); #1;
        chk(dbg_data[i] == ref_regs[r], $sformatf("%s: r%0d = %0d, expected %0d", NAME[i], r, dbg_data[i], ref_regs[r]));
      end
      chk(r8_seq[i].size() == 2 && r8_seq[i][0] == 42 && r8_seq[i][1] == 5,
          $sformatf("%s: r8 updates in program order", NAME[i]));
      if (i > 0) chk(n_waw[i] > 0, $sformatf("%s: WAW stall occurred (%0d)", NAME[i], n_waw[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
