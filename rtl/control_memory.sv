// control_memory: the control memory (CM) of the microprogrammed controller.
//
// Each word is one microinstruction with three fields: f1, the internal
// function number (input of the IFU); f2, the internal function parameter
// number (input of the IFPU); f3, the external operation number, which is
// the datapath control. The CM does not hold the next address: it only
// selects how the next address is formed (semi-implicit addressing). The
// three-field layout follows the source design; the widths, the depth
// (2**ADDR_W) and the write port used to load a microprogram are this
// design's choices.
//
// Timing: synchronous read. When rd_en is high, the word at rd_addr is
// registered at the rising clock edge and appears on f1/f2/f3 in the next
// cycle, so this output register is the microinstruction register of the
// controller. With rd_en low the register holds (used while waiting for a
// fork join). A write at wr_addr happens at the same edge; a read of the
// address being written returns the old word. The output register has no
// reset: the microsequencer presents address 0 while reset is asserted, so
// the register holds word 0 when reset is released.
module control_memory #(
  parameter int unsigned ADDR_W = cmc_pkg::DEF_ADDR_W,
  parameter int unsigned IF_W   = cmc_pkg::DEF_IF_W,
  parameter int unsigned PNUM_W = cmc_pkg::DEF_PNUM_W,
  parameter int unsigned OP_W   = cmc_pkg::DEF_OP_W
) (
  input  logic              clk,
  // microprogram load port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [IF_W-1:0]   wr_f1,
  input  logic [PNUM_W-1:0] wr_f2,
  input  logic [OP_W-1:0]   wr_f3,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [IF_W-1:0]   f1,
  output logic [PNUM_W-1:0] f2,
  output logic [OP_W-1:0]   f3
);

  localparam int unsigned MI_W = IF_W + PNUM_W + OP_W;

  logic [MI_W-1:0] mem [2**ADDR_W];
  logic [MI_W-1:0] mi_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_f1, wr_f2, wr_f3};
    if (rd_en) mi_q <= mem[rd_addr];
  end

  assign {f1, f2, f3} = mi_q;

endmodule
