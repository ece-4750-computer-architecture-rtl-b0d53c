// regfile: 32 x 32-bit register file with NREAD combinational read ports and
// NWRITE write ports. Register 0 always reads as zero and ignores writes. If
// two ports write the same register in one cycle the higher-numbered port
// wins (the pipelines never do this).
//
// The same module serves as the architectural register file (ARF) and as the
// physical register file (PRF) of the late-commit pipelines, which is indexed
// by architectural register number and holds results not yet committed (a
// future file). A write becomes visible to reads in the next cycle; same-cycle
// forwarding is the issue stage's bypass network's job. Reset clears every
// register (the reset value is this design's choice). The single-issue
// pipelines use one write port, the dual-issue pipeline two.
module regfile #(
  parameter int NREAD  = 2,
  parameter int NWRITE = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NREAD-1:0][4:0]    raddr,
  output logic [NREAD-1:0][31:0]   rdata,
  input  logic [NWRITE-1:0]        we,
  input  logic [NWRITE-1:0][4:0]   waddr,
  input  logic [NWRITE-1:0][31:0]  wdata
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NWRITE; p++)
        if (we[p] && waddr[p] != 5'd0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NREAD; p++)
      rdata[p] = (raddr[p] == 5'd0) ? 32'd0 : regs[raddr[p]];
  end
endmodule
