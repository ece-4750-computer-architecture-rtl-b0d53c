// scoreboard_tb: random issue of X-pipe and Y-pipe writers against a model
// that keeps, per register, the number of cycles until the producer reaches W
// (1 after an X issue, 4 after a Y issue, minus one per cycle). Every cycle
// it compares the pending bits, FU fields, one-hot when-available columns and
// the column-2 structural-hazard flag, and finally checks flush.
module scoreboard_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic                       flush, set_val;
  logic [4:0]                 set_reg;
  fu_e                        set_fu;
  logic [NREGS-1:0]           pending;
  fu_e  [NREGS-1:0]           fu;
  logic [NREGS-1:0][WA_W-1:0] wa;
  logic                       col2_busy;
  scoreboard dut (.*);

  int checks = 0, failures = 0;
  int cnt [32];
  fu_e mfu [32];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int c);
    logic c2;
    c2 = 0;
    for (int r = 0; r < 32; r++) begin
      logic [4:0] exp_wa;
      exp_wa = (cnt[r] >= 0) ? 5'(1 << cnt[r]) : 5'b0;
      if (cnt[r] == 2) c2 = 1;
      checks++;
      if (pending[r] !== (cnt[r] >= 0) || wa[r] !== exp_wa || (cnt[r] >= 0 && fu[r] !== mfu[r])) begin
        failures++;
        $display("FAIL cycle %0d r%0d: p=%b wa=%b fu=%0d, expected cnt %0d", c, r, pending[r], wa[r], fu[r], cnt[r]);
      end
    end
    checks++;
    if (col2_busy !== c2) begin failures++; $display("FAIL cycle %0d col2", c); end
  endtask

  initial begin
    flush = 0; set_val = 0; set_reg = 0; set_fu = FU_X;
    for (int r = 0; r < 32; r++) cnt[r] = -1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 1500; c++) begin
      compare(c);
      set_val = ($urandom % 3) != 0;
      set_reg = 5'($urandom % 8);
      set_fu  = ($urandom % 2) ? FU_Y : FU_X;
      // the pipeline never re-issues to a register more than one cycle from W
      if (cnt[set_reg] >= 1) set_val = 0;
      @(posedge clk);
      for (int r = 0; r < 32; r++) if (cnt[r] >= 0) cnt[r]--;
      if (set_val) begin cnt[set_reg] = (set_fu == FU_Y) ? 4 : 1; mfu[set_reg] = set_fu; end
      #1;
    end
    set_val = 0; flush = 1;
    @(posedge clk); #1 flush = 0;
    for (int r = 0; r < 32; r++) cnt[r] = -1;
    compare(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
