// scoreboard_fu: the scoreboard organised by functional unit, used by the
// dual-issue pipeline.
//
// There is one row per pipe (X and Y) and five columns 4..0 per row; column c
// holds the instruction that reaches W in c cycles. Each cell has a valid bit
// V and the destination register rdest, and all cells shift right by one
// column every cycle. An X-pipe instruction enters its row at column 1 (it is
// in X in the next cycle), a multiply enters the Y row at column 4 (Y0). As
// each row has its own entry cell, one X-pipe instruction and one multiply can
// be entered in the same cycle.
//
// The lookup compares a register with every valid cell. The outputs present
// the result in the same form as the register-indexed scoreboard: pending[r]
// is set when some cell holds r, wa[r] is one-hot on the column of the
// youngest such cell (the highest column: a second write to a register can
// only issue once the first is in column 0, and it then enters column 1 or 4)
// and fu[r] names the row of that cell. col2_busy is the column-2 valid bit of
// either row, the write-back-port check of the single-issue pipelines. The
// many comparators are this organisation's cost; its benefit is that entries
// are added per unit rather than per register.
//
// The cell layout (V, rdest, shifting right) follows the functional-unit-
// indexed form of the scoreboard; the five columns of the X row (of which only
// 1 and 0 are ever used) and the port arrangement are this design's choice.
module scoreboard_fu
  import ooo_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       flush,
  input  logic                       set_x_val,
  input  logic [REG_W-1:0]           set_x_reg,
  input  logic                       set_y_val,
  input  logic [REG_W-1:0]           set_y_reg,
  output logic [NREGS-1:0]           pending,
  output fu_e  [NREGS-1:0]           fu,
  output logic [NREGS-1:0][WA_W-1:0] wa,
  output logic                       col2_busy
);
  logic [WA_W-1:0]            x_v_q, y_v_q;
  logic [WA_W-1:0][REG_W-1:0] x_rd_q, y_rd_q;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      x_v_q <= '0;
      y_v_q <= '0;
    end else begin
      x_v_q <= x_v_q >> 1;
      y_v_q <= y_v_q >> 1;
      if (set_x_val) x_v_q[1] <= 1'b1;
      if (set_y_val) y_v_q[4] <= 1'b1;
    end
    for (int c = 0; c < WA_W - 1; c++) begin
      x_rd_q[c] <= x_rd_q[c+1];
      y_rd_q[c] <= y_rd_q[c+1];
    end
    x_rd_q[WA_W-1] <= '0;
    y_rd_q[WA_W-1] <= set_y_reg;
    if (set_x_val) x_rd_q[1] <= set_x_reg;
  end

  always_comb begin
    for (int r = 0; r < NREGS; r++) begin
      pending[r] = 1'b0;
      fu[r]      = FU_X;
      wa[r]      = '0;
      // ascending, so the highest matching column wins
      for (int c = 0; c < WA_W; c++) begin
        if (x_v_q[c] && x_rd_q[c] == REG_W'(r)) begin
          pending[r] = 1'b1; fu[r] = FU_X; wa[r] = WA_W'(1) << c;
        end
        if (y_v_q[c] && y_rd_q[c] == REG_W'(r)) begin
          pending[r] = 1'b1; fu[r] = FU_Y; wa[r] = WA_W'(1) << c;
        end
      end
    end
    col2_busy = x_v_q[2] || y_v_q[2];
  end
endmodule
