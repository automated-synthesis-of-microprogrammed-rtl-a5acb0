// ifpu: Internal Function Parameter Unit.
//
// Supplies the parameter of the current internal function: a jump, call or
// fork target, a loop count, or, for a conditional or multi-way jump, the
// target chosen by the machine status. Its inputs are the encoded parameter
// number (field f2 of the microinstruction) and the machine status, as in
// the source design, which realises the unit as a PLA whose contents are
// the list of parameter values of the microprogram.
//
// Here the PLA is programmable: ROWS product terms, each with a valid bit,
// the parameter number it answers to, a status cube (care mask and value)
// and the parameter word it drives. A row matches when it is valid, its
// parameter number equals pnum and (status & mask) == (value & mask). The
// output param is the OR of the words of all matching rows, as in a PLA
// OR-plane, and hit says that at least one row matched. An unconditional
// parameter is a row with an all-zero mask. A single conditional jump is
// one row testing one status bit; a multi-way jump is one row per status
// combination. When no row matches, the IFU treats a conditional jump as not
// taken. The programming port and the row format are this design's choices.
//
// Interface: wr_en writes row wr_row with {wr_valid, wr_pnum, wr_mask,
// wr_val, wr_param}. Every row, used or not, must be written once before
// use: like the control memory, the table is contents, not state, and has
// no reset, so that it can be loaded while the controller is held in reset.
// Timing: rows are written at the rising clock edge; param and hit are
// combinational from pnum and status.
module ifpu #(
  parameter int unsigned PNUM_W   = cmc_pkg::DEF_PNUM_W,
  parameter int unsigned STATUS_W = cmc_pkg::DEF_STATUS_W,
  parameter int unsigned PARAM_W  = cmc_pkg::DEF_ADDR_W,
  parameter int unsigned ROWS     = cmc_pkg::DEF_IFPU_ROWS
) (
  input  logic                    clk,
  // programming port
  input  logic                    wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  logic                    wr_valid,
  input  logic [PNUM_W-1:0]       wr_pnum,
  input  logic [STATUS_W-1:0]     wr_mask,
  input  logic [STATUS_W-1:0]     wr_val,
  input  logic [PARAM_W-1:0]      wr_param,
  // lookup
  input  logic [PNUM_W-1:0]       pnum,
  input  logic [STATUS_W-1:0]     status,
  output logic [PARAM_W-1:0]      param,
  output logic                    hit
);

  typedef struct packed {
    logic [PNUM_W-1:0]   pnum;
    logic [STATUS_W-1:0] mask;
    logic [STATUS_W-1:0] val;
    logic [PARAM_W-1:0]  param;
  } row_t;

  logic [ROWS-1:0] valid;
  row_t            rows [ROWS];
  logic [ROWS-1:0] match;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      valid[wr_row] <= wr_valid;
      rows[wr_row]  <= '{pnum: wr_pnum, mask: wr_mask, val: wr_val, param: wr_param};
    end
  end

  // AND plane
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      match[r] = valid[r] && (rows[r].pnum == pnum)
                 && ((status & rows[r].mask) == (rows[r].val & rows[r].mask));
  end

  // OR plane
  always_comb begin
    param = '0;
    for (int r = 0; r < ROWS; r++)
      if (match[r]) param = param | rows[r].param;
  end

  assign hit = |match;

endmodule
