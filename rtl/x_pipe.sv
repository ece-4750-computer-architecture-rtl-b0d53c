// x_pipe: the integer pipe for addu and addiu.
//
// The sum (rs + rt, or rs + sign-extended immediate) is formed in the first
// stage, X or X0. With NSTAGES = 1 this is the single X stage of the pipelines
// with out-of-order completion. With NSTAGES = 4 the result is carried through
// the "dummy" stages X1..X3 so that the X pipe is as long as the multiplier,
// as in the in-order-completion pipeline (I3L). Every stage's valid bit, tag
// and result are brought out: the issue stage bypasses from them. Stage k
// outputs describe the instruction that is in stage k in the current cycle;
// res[0] is the combinational sum of the instruction in the first stage.
// flush kills all stages.
module x_pipe
  import ooo_pkg::*;
#(
  parameter int NSTAGES = 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         flush,
  input  logic                         in_val,
  input  uop_t                         in_uop,
  input  logic [31:0]                  in_a,
  input  logic [31:0]                  in_b,
  output logic [NSTAGES-1:0]           st_val,
  output uop_t [NSTAGES-1:0]           st_uop,
  output logic [NSTAGES-1:0][31:0]     st_res
);
  logic [31:0] a_q, b_q;
  logic [NSTAGES-1:0][31:0] res_q;   // results carried through X1..X3 (index 0 unused)

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      st_val <= '0;
    end else begin
      st_val[0] <= in_val;
      for (int k = 1; k < NSTAGES; k++) st_val[k] <= st_val[k-1];
    end
  end

  always_ff @(posedge clk) begin
    a_q       <= in_a;
    b_q       <= in_b;
    st_uop[0] <= in_uop;
    for (int k = 1; k < NSTAGES; k++) begin
      st_uop[k] <= st_uop[k-1];
      res_q[k]  <= st_res[k-1];
    end
  end

  always_comb begin
    st_res[0] = a_q + b_q;
    for (int k = 1; k < NSTAGES; k++) st_res[k] = res_q[k];
  end
endmodule
