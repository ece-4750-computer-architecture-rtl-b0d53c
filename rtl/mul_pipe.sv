// mul_pipe: four-stage pipelined 32-bit integer multiplier (stages Y0..Y3).
//
// It returns the low 32 bits of a * b. Each stage multiplies the
// multiplicand by one byte of the multiplier and adds the shifted partial
// product into a running sum: Y0 uses b[7:0], Y1 b[15:8], Y2 b[23:16] and Y3
// b[31:24]. One multiply can enter every cycle; the product of the instruction
// in Y3 is available combinationally at the end of Y3 (out_res), four cycles
// after it entered. The byte-per-stage split is this design's choice; the
// four-cycle pipelined multiplier is the pipelines' Y unit. st_val/st_uop give
// the occupant of each stage for hazard checks. flush kills all stages.
module mul_pipe
  import ooo_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              flush,
  input  logic              in_val,
  input  uop_t              in_uop,
  input  logic [31:0]       in_a,
  input  logic [31:0]       in_b,
  output logic [3:0]        st_val,
  output uop_t [3:0]        st_uop,
  output logic [31:0]       out_res
);
  logic [3:0][31:0] a_q, b_q, acc_q;
  logic [3:0][31:0] acc_next;

  always_comb begin
    for (int k = 0; k < 4; k++)
      acc_next[k] = acc_q[k] + ((a_q[k] * {24'd0, b_q[k][8*k +: 8]}) << (8 * k));
  end
  assign out_res = acc_next[3];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      st_val <= '0;
    end else begin
      st_val[0] <= in_val;
      for (int k = 1; k < 4; k++) st_val[k] <= st_val[k-1];
    end
  end

  always_ff @(posedge clk) begin
    a_q[0]    <= in_a;
    b_q[0]    <= in_b;
    acc_q[0]  <= '0;
    st_uop[0] <= in_uop;
    for (int k = 1; k < 4; k++) begin
      a_q[k]    <= a_q[k-1];
      b_q[k]    <= b_q[k-1];
      acc_q[k]  <= acc_next[k-1];
      st_uop[k] <= st_uop[k-1];
    end
  end
endmodule
