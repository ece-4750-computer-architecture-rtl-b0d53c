// scoreboard_fu_tb: random entry of X-pipe and multiply writers, up to one of
// each per cycle, into the functional-unit-indexed scoreboard, against a model
// that keeps, per register, the number of cycles until its youngest producer
// reaches W (1 after an X entry, 4 after a Y entry, minus one per cycle) and
// that producer's unit. Every cycle it compares the pending bits, FU fields,
// one-hot when-available columns and the column-2 flag, and finally checks
// flush. Stimulus follows the pipeline's rules: a register is written again
// only once its previous write is in column 0 or done, and the two writers of
// one cycle target different registers.
module scoreboard_fu_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic                       flush, set_x_val, set_y_val;
  logic [4:0]                 set_x_reg, set_y_reg;
  logic [NREGS-1:0]           pending;
  fu_e  [NREGS-1:0]           fu;
  logic [NREGS-1:0][WA_W-1:0] wa;
  logic                       col2_busy;
  scoreboard_fu dut (.*);

  int checks = 0, failures = 0;
  int cnt [32];
  fu_e mfu [32];
  int n_both = 0, n_shadow = 0;

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
    flush = 0; set_x_val = 0; set_y_val = 0; set_x_reg = 0; set_y_reg = 0;
    for (int r = 0; r < 32; r++) cnt[r] = -1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 1500; c++) begin
      compare(c);
      set_x_val = ($urandom % 3) != 0;
      set_y_val = ($urandom % 3) != 0;
      set_x_reg = 5'($urandom % 8);
      set_y_reg = 5'($urandom % 8);
      if (cnt[set_x_reg] >= 1) set_x_val = 0;
      if (cnt[set_y_reg] >= 1) set_y_val = 0;
      if (set_x_val && set_y_val && set_x_reg == set_y_reg) set_y_val = 0;
      if (set_x_val && set_y_val) n_both++;
      if ((set_x_val && cnt[set_x_reg] == 0) || (set_y_val && cnt[set_y_reg] == 0)) n_shadow++;
      @(posedge clk);
      for (int r = 0; r < 32; r++) if (cnt[r] >= 0) cnt[r]--;
      if (set_x_val) begin cnt[set_x_reg] = 1; mfu[set_x_reg] = FU_X; end
      if (set_y_val) begin cnt[set_y_reg] = 4; mfu[set_y_reg] = FU_Y; end
      #1;
    end
    set_x_val = 0; set_y_val = 0; flush = 1;
    @(posedge clk); #1 flush = 0;
    for (int r = 0; r < 32; r++) cnt[r] = -1;
    compare(-1);
    // both writers in one cycle, and a new write while the old one is in column 0
    checks++; if (n_both == 0) begin failures++; $display("FAIL: never two entries in one cycle"); end
    checks++; if (n_shadow == 0) begin failures++; $display("FAIL: never an entry over a column-0 write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
