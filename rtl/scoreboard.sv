// scoreboard: register-indexed scoreboard for centralised hazard detection.
//
// One entry per architectural register holds a pending bit P (a write to the
// register is in flight), the functional unit FU producing it (X or Y) and a
// one-hot "when available" field WA[4:0]. WA column c means the producer
// reaches W in c cycles: an instruction in Y0 is in column 4, Y1 in 3, Y2 in 2,
// Y3 and X in 1, W in 0. Every cycle all WA fields shift right by one; the
// entry stops being pending when its bit shifts out of column 0. An issuing
// instruction sets its destination's entry so that in the next cycle it sits
// in column 1 (X pipe) or column 4 (Y pipe).
//
// Outputs: the whole table (the issue stage reads P/FU/WA for its sources to
// choose stall, bypass or register-file read) and col2_busy, the structural
// hazard on the write-back port: an X-pipe instruction may not issue while any
// column-2 bit is set. Column 2 can only hold a multiply in Y2.
// flush clears every entry (used when the pipeline is squashed).
module scoreboard
  import ooo_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   flush,
  input  logic                   set_val,
  input  logic [REG_W-1:0]       set_reg,
  input  fu_e                    set_fu,
  output logic [NREGS-1:0]       pending,
  output fu_e  [NREGS-1:0]       fu,
  output logic [NREGS-1:0][WA_W-1:0] wa,
  output logic                   col2_busy
);
  always_ff @(posedge clk) begin
    if (rst || flush) begin
      pending <= '0;
      wa      <= '0;
      for (int r = 0; r < NREGS; r++) fu[r] <= FU_X;
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        wa[r]      <= wa[r] >> 1;
        pending[r] <= (wa[r] >> 1) != '0;
      end
      if (set_val) begin
        pending[set_reg] <= 1'b1;
        fu[set_reg]      <= set_fu;
        wa[set_reg]      <= (set_fu == FU_Y) ? 5'b10000 : 5'b00010;
      end
    end
  end

  always_comb begin
    col2_busy = 1'b0;
    for (int r = 0; r < NREGS; r++) col2_busy |= wa[r][2];
  end
endmodule
