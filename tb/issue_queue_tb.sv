// issue_queue_tb: random allocation, wakeup and hazard inputs against an
// age-ordered model of the issue queue. The model keeps the entries from
// oldest to youngest (freed entries stay in place until every older entry has
// left, as in a circular buffer), applies the pending-bit rules at allocation
// and on wakeup, and selects the oldest entry with both sources ready, no
// write-port block (for non-multiplies) and no busy destination. Each cycle it
// compares full, empty, the selected instruction and whether it was the oldest.
module issue_queue_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic             flush, alloc_val, full, x_blocked, iss_val, iss_not_oldest, empty;
  uop_t             alloc_uop, iss_uop;
  logic [1:0]       alloc_src_busy;
  logic [1:0]       wake_val;
  logic [1:0][4:0]  wake_reg;
  logic [NREGS-1:0] reg_busy;
  issue_queue dut (.*);

  typedef struct { bit v; uop_t u; bit p0; bit p1; } ent_t;
  ent_t q [$];
  int checks = 0, failures = 0;
  int n_issue = 0, n_ooo = 0, n_full = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit ready(ent_t e);
    return e.v && !e.p0 && !e.p1 && (e.u.op == OP_MUL || !x_blocked) && !(e.u.rd_v && reg_busy[e.u.rd]);
  endfunction

  function automatic bit woken(logic [4:0] r);
    return (wake_val[0] && wake_reg[0] == r) || (wake_val[1] && wake_reg[1] == r);
  endfunction

  initial begin
    int sel;
    bit older;
    logic [31:0] pc = 0;
    flush = 0; alloc_val = 0; alloc_uop = '0; alloc_src_busy = 0;
    wake_val = 0; wake_reg = '0; x_blocked = 0; reg_busy = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 6000; c++) begin
      // stimulus (hazard inputs first: select depends on them)
      x_blocked = ($urandom % 4 == 0);
      reg_busy  = '0;
      if ($urandom % 4 == 0) reg_busy[1 + $urandom % 4] = 1'b1;
      wake_val  = 2'($urandom);
      wake_reg[0] = 5'(1 + $urandom % 4);
      wake_reg[1] = 5'(1 + $urandom % 4);
      alloc_val = ($urandom % 3 != 0) && (q.size() < 3);
      alloc_uop = '0;
      alloc_uop.pc = pc;
      case ($urandom % 3)
        0: alloc_uop.op = OP_ADDU;
        1: alloc_uop.op = OP_ADDIU;
        default: alloc_uop.op = OP_MUL;
      endcase
      alloc_uop.rd_v = 1; alloc_uop.rd = 5'(1 + $urandom % 4);
      alloc_uop.rs_v = 1; alloc_uop.rs = 5'(1 + $urandom % 4);
      alloc_uop.rt_v = (alloc_uop.op != OP_ADDIU);
      alloc_uop.rt = 5'(1 + $urandom % 4);
      alloc_src_busy = 2'($urandom % 4 == 0 ? 2'b11 : 2'b00);
      #1;
      // model select
      sel = -1; older = 0;
      foreach (q[i]) begin
        if (sel < 0 && ready(q[i])) sel = i;
        if (sel < 0 && q[i].v) older = 1;
      end
      chk(full == (q.size() == 3), $sformatf("cycle %0d full %b size %0d", c, full, q.size()));
      chk(empty == (q.size() == 0), $sformatf("cycle %0d empty", c));
      chk(iss_val == (sel >= 0), $sformatf("cycle %0d issue valid %b expected %b", c, iss_val, sel >= 0));
      if (sel >= 0 && iss_val) begin
        chk(iss_uop.pc == q[sel].u.pc, $sformatf("cycle %0d issued pc %0d expected %0d", c, iss_uop.pc, q[sel].u.pc));
        chk(iss_not_oldest == older, $sformatf("cycle %0d oldest flag", c));
        n_issue++; if (older) n_ooo++;
      end
      if (full) n_full++;
      alloc_val = alloc_val && !full;
      @(posedge clk);
      // model update: wakeup, dealloc, allocate, retire freed head entries
      foreach (q[i]) begin
        if (woken(q[i].u.rs)) q[i].p0 = 0;
        if (woken(q[i].u.rt)) q[i].p1 = 0;
      end
      if (alloc_val) begin
        ent_t e;
        e.v = 1; e.u = alloc_uop;
        e.p0 = alloc_src_busy[0]; e.p1 = alloc_src_busy[1];
        foreach (q[i]) begin
          if (q[i].v && q[i].u.rd_v && (i != sel || q[i].u.op == OP_MUL)) begin
            if (q[i].u.rd == alloc_uop.rs) e.p0 = 1;
            if (alloc_uop.rt_v && q[i].u.rd == alloc_uop.rt) e.p1 = 1;
          end
        end
        if (!alloc_uop.rt_v) e.p1 = 0;
        q.push_back(e);
        pc++;
      end
      if (sel >= 0) q[sel].v = 0;
      while (q.size() > 0 && !q[0].v) void'(q.pop_front());
      #1;
    end
    chk(n_issue > 100 && n_ooo > 10 && n_full > 10,
        $sformatf("coverage: %0d issued, %0d out of order, %0d cycles full", n_issue, n_ooo, n_full));
    alloc_val = 0; flush = 1;
    @(posedge clk); #1 flush = 0;
    chk(empty && !full && !iss_val, "flush empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
