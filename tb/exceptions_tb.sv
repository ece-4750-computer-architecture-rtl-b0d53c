// exceptions_tb: precise exceptions in every position of the example sequence.
//
// For each of the seven instructions a..g in turn, that instruction is replaced
// by an illegal word and the program is run on all five single-issue
// pipelines and on the dual-issue pipeline. Each must
// end with exactly the register state of a reference model that stops at the
// faulting instruction and runs the handler: every older instruction's result
// present, no younger one's, one exception with the right pc. The late-commit
// pipelines (I2OL, IO2L and the dual-issue one) must spend 31 cycles restoring
// the PRF from the ARF per exception.
module exceptions_tb;
  import ooo_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
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
  int n_exc [6], n_copy [6];       // [5]: dual-issue pipeline
  logic [31:0] epc [6];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (!rst) begin
      for (int i = 0; i < 5; i++) begin
        if (exc_taken[i]) begin n_exc[i]++; epc[i] = exc_epc[i]; end
        if (events[i].prf_copy) n_copy[i]++;
      end
      if (dual_exc_taken) begin n_exc[5]++; epc[5] = dual_exc_epc; end
      if (dual_events.prf_copy) n_copy[5]++;
    end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam string NAME [6] = '{"I3L", "I2OE", "I2OL", "IO2E", "IO2L", "dual"};

  initial begin
    logic [31:0] ref_regs [32];
    int          ref_exc, idle, bad;
    logic [31:0] ref_epc;
    dbg_addr = '0;
    dual_dbg_addr = '0;
    for (int which = 0; which < 7; which++) begin
      build_example_fault(which);
      iss(ref_regs, ref_exc, ref_epc);
      for (int i = 0; i < 6; i++) begin n_exc[i] = 0; n_copy[i] = 0; end
      rst = 1;
      repeat (3) @(posedge clk);
      #1 rst = 0;
      idle = 0;
      for (int c = 0; c < 2000 && idle < 80; c++) begin
        @(posedge clk);
        if (busy == '0 && !dual_busy) idle++; else idle = 0;
      end
      #1;
      for (int i = 0; i < 6; i++) begin
        logic [31:0] val;
        bad = 0;
        for (int r = 0; r < 32; r++) begin
          if (i < 5) begin dbg_addr[i] = 5'(r); #1; val = dbg_data[i]; end
          else       begin dual_dbg_addr = 5'(r); #1; val = dual_dbg_data; end
          if (val !== ref_regs[r]) begin
            bad++;
            $display("  %s fault at %c: r%0d = %0d, expected %0d", NAME[i], 8'(97 + which), r, val, ref_regs[r]);
          end
        end
        chk(bad == 0, $sformatf("%s, fault at %c: register state", NAME[i], 8'(97 + which)));
        chk(n_exc[i] == 1 && epc[i] == ref_epc,
            $sformatf("%s, fault at %c: %0d exceptions, pc %h", NAME[i], 8'(97 + which), n_exc[i], epc[i]));
        chk(n_copy[i] == ((i == 2 || i >= 4) ? 31 : 0),
            $sformatf("%s, fault at %c: %0d PRF restore cycles", NAME[i], 8'(97 + which), n_copy[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
