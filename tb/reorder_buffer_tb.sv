// reorder_buffer_tb: random allocation, out-of-order completion and in-order
// commit against a queue model. Each cycle it compares full/empty and the
// head entry (valid, pending, destination, exception flag and pc); completions
// pick a random still-pending entry; commits pop the head when it is done.
// Also checks that the buffer fills to exactly ENTRIES and that flush empties it.
module reorder_buffer_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic                 flush, alloc_val, alloc_dest_v;
  logic [4:0]           alloc_rd;
  logic [ROB_IDX_W-1:0] alloc_idx;
  logic                 full;
  logic                 upd_val, upd_exc;
  logic [ROB_IDX_W-1:0] upd_idx;
  logic [31:0]          upd_pc;
  logic                 head_val, head_pending, head_dest_v, head_exc;
  logic [4:0]           head_rd;
  logic [31:0]          head_pc;
  logic [ROB_IDX_W-1:0] head_idx;
  logic                 commit_pop, empty;
  reorder_buffer dut (.*);

  typedef struct { int idx; bit p; bit dv; int rd; bit exc; logic [31:0] pc; } ent_t;
  ent_t q [$];
  int checks = 0, failures = 0;
  int saw_full = 0;
  int tail_m = 0;    // expected allocation index

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int pend [$];
    int k;
    flush = 0; alloc_val = 0; alloc_dest_v = 0; alloc_rd = 0;
    upd_val = 0; upd_idx = 0; upd_exc = 0; upd_pc = 0; commit_pop = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      chk(full == (q.size() == 4), $sformatf("cycle %0d full=%b size=%0d", c, full, q.size()));
      chk(empty == (q.size() == 0), $sformatf("cycle %0d empty", c));
      if (full) saw_full++;
      if (q.size() > 0) begin
        chk(head_val && head_pending == q[0].p && head_dest_v == q[0].dv &&
            head_rd == 5'(q[0].rd) && int'(head_idx) == q[0].idx,
            $sformatf("cycle %0d head entry", c));
        if (!q[0].p) chk(head_exc == q[0].exc && (!q[0].exc || head_pc == q[0].pc),
                         $sformatf("cycle %0d head exception", c));
      end else begin
        chk(!head_val, $sformatf("cycle %0d head valid while empty", c));
      end
      // stimulus
      alloc_val    = !full && ($urandom % 2 == 0);
      alloc_dest_v = $urandom % 4 != 0;
      alloc_rd     = 5'($urandom);
      pend.delete();
      foreach (q[i]) if (q[i].p) pend.push_back(i);
      upd_val = (pend.size() > 0) && ($urandom % 2 == 0);
      k = (pend.size() > 0) ? pend[$urandom % pend.size()] : 0;
      upd_idx = (pend.size() > 0) ? ROB_IDX_W'(q[k].idx) : '0;
      upd_exc = ($urandom % 8 == 0);
      upd_pc  = $urandom;
      commit_pop = (q.size() > 0) && !q[0].p && ($urandom % 3 != 0);
      #1;
      if (alloc_val) chk(int'(alloc_idx) == tail_m, $sformatf("cycle %0d allocation index", c));
      @(posedge clk);
      if (commit_pop) void'(q.pop_front());
      if (upd_val) begin
        foreach (q[i]) if (q[i].idx == int'(upd_idx) && q[i].p) begin
          q[i].p = 0; q[i].exc = upd_exc; q[i].pc = upd_pc;
        end
      end
      if (alloc_val) begin
        ent_t e;
        e.idx = int'(alloc_idx); e.p = 1; e.dv = alloc_dest_v; e.rd = int'(alloc_rd);
        e.exc = 0; e.pc = 0;
        q.push_back(e);
        tail_m = (tail_m + 1) % 4;
      end
      #1;
    end
    chk(saw_full > 0, "buffer filled up");
    alloc_val = 0; upd_val = 0; commit_pop = 0; flush = 1;
    @(posedge clk); #1 flush = 0;
    chk(empty && !full && !head_val, "flush empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
