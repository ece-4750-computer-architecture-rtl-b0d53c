// x_pipe_tb: checks the integer pipe as the single X stage (default) and as
// the padded X0..X3 pipe. The sum must appear in the first stage one cycle
// after issue and, in the padded pipe, be carried unchanged through X1..X3,
// each stage's valid bit and tag following one cycle behind the previous.
module x_pipe_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        flush, in_val;
  uop_t        in_uop;
  logic [31:0] in_a, in_b;
  logic [0:0]        v1;
  uop_t [0:0]        u1;
  logic [0:0][31:0]  r1;
  logic [3:0]        v4;
  uop_t [3:0]        u4;
  logic [3:0][31:0]  r4;
  x_pipe dut1 (.clk, .rst, .flush, .in_val, .in_uop, .in_a, .in_b,
               .st_val(v1), .st_uop(u1), .st_res(r1));
  x_pipe #(.NSTAGES(4)) dut4 (.clk, .rst, .flush, .in_val, .in_uop, .in_a, .in_b,
                              .st_val(v4), .st_uop(u4), .st_res(r4));

  int checks = 0, failures = 0;
  logic        h_val [4];
  logic [31:0] h_sum [4];
  logic [4:0]  h_rd [4];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_val = 0; in_uop = '0; in_a = 0; in_b = 0;
    for (int k = 0; k < 4; k++) h_val[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 1500; c++) begin
      checks++;
      if (v1[0] !== h_val[0] || (h_val[0] && (r1[0] !== h_sum[0] || u1[0].rd !== h_rd[0]))) begin
        failures++; $display("FAIL cycle %0d: single stage", c);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (v4[k] !== h_val[k] || (h_val[k] && (r4[k] !== h_sum[k] || u4[k].rd !== h_rd[k]))) begin
          failures++; $display("FAIL cycle %0d: stage X%0d", c, k);
        end
      end
      in_val = ($urandom % 3) != 0;
      in_a = $urandom; in_b = $urandom;
      in_uop = '0; in_uop.rd = 5'($urandom);
      @(posedge clk);
      for (int k = 3; k > 0; k--) begin
        h_val[k] = h_val[k-1]; h_sum[k] = h_sum[k-1]; h_rd[k] = h_rd[k-1];
      end
      h_val[0] = in_val; h_sum[0] = in_a + in_b; h_rd[0] = in_uop.rd;
      #1;
    end
    in_val = 1; flush = 1;
    @(posedge clk); #1 flush = 0; in_val = 0;
    checks++;
    if (v4 !== 4'b0 || v1 !== 1'b0) begin failures++; $display("FAIL: flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
