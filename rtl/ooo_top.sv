// ooo_top: the five single-issue pipelines and the dual-issue pipeline side
// by side.
//
// Core 0 is I3L (in-order issue and completion, late commit), core 1 I2OE
// (out-of-order completion, early commit, scoreboard), core 2 I2OL (adds a
// future/physical register file and reorder buffer for late commit), core 3
// IO2E (adds an issue queue for out-of-order issue, early commit) and core 4
// IO2L (scoreboard, issue queue, PRF and ROB). They share nothing but the
// clock and reset, so the same program can be run on all five at once and
// their timing compared. Every port is an array indexed by core number: an
// instruction-memory read port (combinational: imem_data[i] must hold the word
// at imem_addr[i] in the same cycle), an ARF debug read port, the stream of
// architectural register updates, exceptions, a busy flag and the per-cycle
// event flags. The dual-issue pipeline (dual_core, a two-wide IO2L) has its
// own dual_* ports: two instruction-memory read ports, two architectural
// register update slots (slot 0 the older) and its own event flags. The
// instruction memories are outside this design.
module ooo_top
  import ooo_pkg::*;
#(
  parameter int          ROB_ENTRIES  = 4,
  parameter int          IQ_ENTRIES   = 3,
  parameter int          DUAL_ROB_ENTRIES = 8,
  parameter int          DUAL_IQ_ENTRIES  = 4,
  parameter logic [31:0] RESET_VECTOR = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR   = 32'h0000_0100
) (
  input  logic                    clk,
  input  logic                    rst,
  output logic [4:0][31:0]        imem_addr,
  input  logic [4:0][31:0]        imem_data,
  input  logic [4:0][4:0]         dbg_addr,
  output logic [4:0][31:0]        dbg_data,
  output logic [4:0]              arf_we,
  output logic [4:0][4:0]         arf_waddr,
  output logic [4:0][31:0]        arf_wdata,
  output logic [4:0]              exc_taken,
  output logic [4:0][31:0]        exc_epc,
  output logic [4:0]              busy,
  output core_events_t [4:0]      events,
  // dual-issue pipeline
  output logic [1:0][31:0]        dual_imem_addr,
  input  logic [1:0][31:0]        dual_imem_data,
  input  logic [4:0]              dual_dbg_addr,
  output logic [31:0]             dual_dbg_data,
  output logic [1:0]              dual_arf_we,
  output logic [1:0][4:0]         dual_arf_waddr,
  output logic [1:0][31:0]        dual_arf_wdata,
  output logic                    dual_exc_taken,
  output logic [31:0]             dual_exc_epc,
  output logic                    dual_busy,
  output dual_events_t            dual_events
);
  localparam arch_e ARCHS [5] = '{ARCH_I3L, ARCH_I2OE, ARCH_I2OL, ARCH_IO2E, ARCH_IO2L};

  for (genvar i = 0; i < 5; i++) begin : g_core
    proc_core #(
      .ARCH(ARCHS[i]), .ROB_ENTRIES(ROB_ENTRIES), .IQ_ENTRIES(IQ_ENTRIES),
      .RESET_VECTOR(RESET_VECTOR), .EXC_VECTOR(EXC_VECTOR)
    ) u_core (
      .clk, .rst,
      .imem_addr(imem_addr[i]), .imem_data(imem_data[i]),
      .dbg_addr(dbg_addr[i]), .dbg_data(dbg_data[i]),
      .arf_we(arf_we[i]), .arf_waddr(arf_waddr[i]), .arf_wdata(arf_wdata[i]),
      .exc_taken(exc_taken[i]), .exc_epc(exc_epc[i]),
      .busy(busy[i]), .events(events[i])
    );
  end

  dual_core #(
    .ROB_ENTRIES(DUAL_ROB_ENTRIES), .IQ_ENTRIES(DUAL_IQ_ENTRIES),
    .RESET_VECTOR(RESET_VECTOR), .EXC_VECTOR(EXC_VECTOR)
  ) u_dual (
    .clk, .rst,
    .imem_addr(dual_imem_addr), .imem_data(dual_imem_data),
    .dbg_addr(dual_dbg_addr), .dbg_data(dual_dbg_data),
    .arf_we(dual_arf_we), .arf_waddr(dual_arf_waddr), .arf_wdata(dual_arf_wdata),
    .exc_taken(dual_exc_taken), .exc_epc(dual_exc_epc),
    .busy(dual_busy), .events(dual_events)
  );
endmodule
