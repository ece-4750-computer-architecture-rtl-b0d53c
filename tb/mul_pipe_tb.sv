// mul_pipe_tb: streams random and corner-case operand pairs into the
// multiplier, one per cycle with random gaps, and checks that the low 32 bits
// of each product appear at the end of Y3 exactly four cycles after issue, in
// order, with the matching tag. Also checks that flush empties the pipe.
module mul_pipe_tb;
  import ooo_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        flush, in_val;
  uop_t        in_uop;
  logic [31:0] in_a, in_b;
  logic [3:0]  st_val;
  uop_t [3:0]  st_uop;
  logic [31:0] out_res;
  mul_pipe dut (.*);

  int checks = 0, failures = 0;
  logic        h_val [4];
  logic [31:0] h_prod [4];
  logic [31:0] h_pc [4];

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
    for (int c = 0; c < 2000; c++) begin
      // history: h_*[k] is what was issued k+1 cycles ago
      checks++;
      if (st_val[3] !== h_val[3] || (h_val[3] && (out_res !== h_prod[3] || st_uop[3].pc !== h_pc[3]))) begin
        failures++;
        $display("FAIL cycle %0d: val %b res %h expected %b %h", c, st_val[3], out_res, h_val[3], h_prod[3]);
      end
      in_val = ($urandom % 4) != 0;
      case (c % 5)
        0: begin in_a = 32'hffff_ffff; in_b = $urandom; end
        1: begin in_a = $urandom; in_b = 32'h8000_0001; end
        default: begin in_a = $urandom; in_b = $urandom; end
      endcase
      in_uop = '0; in_uop.pc = $urandom;
      @(posedge clk);
      for (int k = 3; k > 0; k--) begin
        h_val[k] = h_val[k-1]; h_prod[k] = h_prod[k-1]; h_pc[k] = h_pc[k-1];
      end
      h_val[0] = in_val; h_prod[0] = in_a * in_b; h_pc[0] = in_uop.pc;
      #1;
    end
    in_val = 1; flush = 1;
    @(posedge clk); #1 flush = 0; in_val = 0;
    checks++;
    if (st_val !== 4'b0) begin failures++; $display("FAIL: flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
