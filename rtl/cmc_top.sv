// cmc_top: complex microprogrammed controller in the fully distributed
// organisation.
//
// The control task is split over three units. The control memory holds,
// per microinstruction, only an internal function number f1, a parameter
// number f2 and the external operation number f3 (the datapath control).
// The internal function unit (IFU) decodes f1 into internal controls; the
// internal function parameter unit (IFPU) maps f2 and the machine status to
// a sequencing parameter (target address, loop count, fork parameter); the
// microsequencer forms the next address from register1, the IFPU, its stack
// or the external bus. The control memory's output register is the
// microinstruction register, so one microinstruction completes per clock.
// Supported sequencing: sequential, jump, conditional and multi-way jump,
// call/return, counted nested loops, fork with join wait, external mapping.
//
// Interface:
//   cm_wr_*     load port of the control memory (load while in reset)
//   ifpu_wr_*   load port of the IFPU product terms (write every row once)
//   status      machine status (condition inputs of the IFPU)
//   ext_bus     external address for Map
//   dp_op       external operation number of the current microinstruction
//   cm_addr     address being fetched (next microinstruction)
//   fork_req / fork_param / fork_done
//               control transfer to a nanoprogram unit and its join; the
//               nanoprogram unit itself is outside this design
//   loop_count, stack_level, stack_err: observation of the sequencer
// Timing: after reset is released the first microinstruction is word 0;
// the microprogram and IFPU rows must be written at least one clock before
// reset is released. Asynchronous active-low reset; the clock must run
// during reset.
//
// The unit split, the CM fields and the sequencer parts follow the source
// design; widths, encodings, the load ports and the fork handshake are this
// design's choices.
module cmc_top
  import cmc_pkg::*;
#(
  parameter int unsigned ADDR_W      = cmc_pkg::DEF_ADDR_W,
  parameter int unsigned IF_W        = cmc_pkg::DEF_IF_W,
  parameter int unsigned PNUM_W      = cmc_pkg::DEF_PNUM_W,
  parameter int unsigned OP_W        = cmc_pkg::DEF_OP_W,
  parameter int unsigned STATUS_W    = cmc_pkg::DEF_STATUS_W,
  parameter int unsigned STACK_DEPTH = cmc_pkg::DEF_STACK_DEPTH,
  parameter int unsigned IFPU_ROWS   = cmc_pkg::DEF_IFPU_ROWS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // control memory load port
  input  logic                         cm_wr_en,
  input  logic [ADDR_W-1:0]            cm_wr_addr,
  input  logic [IF_W-1:0]              cm_wr_f1,
  input  logic [PNUM_W-1:0]            cm_wr_f2,
  input  logic [OP_W-1:0]              cm_wr_f3,
  // IFPU load port
  input  logic                         ifpu_wr_en,
  input  logic [$clog2(IFPU_ROWS)-1:0] ifpu_wr_row,
  input  logic                         ifpu_wr_valid,
  input  logic [PNUM_W-1:0]            ifpu_wr_pnum,
  input  logic [STATUS_W-1:0]          ifpu_wr_mask,
  input  logic [STATUS_W-1:0]          ifpu_wr_val,
  input  logic [ADDR_W-1:0]            ifpu_wr_param,
  // run-time inputs
  input  logic [STATUS_W-1:0]          status,
  input  logic [ADDR_W-1:0]            ext_bus,
  input  logic                         fork_done,
  // outputs
  output logic [OP_W-1:0]              dp_op,
  output logic [ADDR_W-1:0]            cm_addr,
  output logic                         fork_req,
  output logic [ADDR_W-1:0]            fork_param,
  output logic [ADDR_W-1:0]            loop_count,
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_level,
  output logic                         stack_err
);

  logic [IF_W-1:0]   f1;
  logic [PNUM_W-1:0] f2;
  logic [ADDR_W-1:0] param;
  logic              hit, loop_zero, cm_rd_en;
  ictl_t             ictl;

  control_memory #(.ADDR_W(ADDR_W), .IF_W(IF_W), .PNUM_W(PNUM_W), .OP_W(OP_W)) u_cm (
    .clk     (clk),
    .wr_en   (cm_wr_en),
    .wr_addr (cm_wr_addr),
    .wr_f1   (cm_wr_f1),
    .wr_f2   (cm_wr_f2),
    .wr_f3   (cm_wr_f3),
    .rd_en   (cm_rd_en),
    .rd_addr (cm_addr),
    .f1      (f1),
    .f2      (f2),
    .f3      (dp_op)
  );

  ifpu #(.PNUM_W(PNUM_W), .STATUS_W(STATUS_W), .PARAM_W(ADDR_W), .ROWS(IFPU_ROWS)) u_ifpu (
    .clk      (clk),
    .wr_en    (ifpu_wr_en),
    .wr_row   (ifpu_wr_row),
    .wr_valid (ifpu_wr_valid),
    .wr_pnum  (ifpu_wr_pnum),
    .wr_mask  (ifpu_wr_mask),
    .wr_val   (ifpu_wr_val),
    .wr_param (ifpu_wr_param),
    .pnum     (f2),
    .status   (status),
    .param    (param),
    .hit      (hit)
  );

  ifu #(.IF_W(IF_W)) u_ifu (
    .f1        (f1),
    .ifpu_hit  (hit),
    .loop_zero (loop_zero),
    .fork_done (fork_done),
    .ictl      (ictl)
  );

  microsequencer #(.ADDR_W(ADDR_W), .STACK_DEPTH(STACK_DEPTH)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .ictl        (ictl),
    .ifpu_param  (param),
    .ext_bus     (ext_bus),
    .cm_addr     (cm_addr),
    .cm_rd_en    (cm_rd_en),
    .loop_zero   (loop_zero),
    .loop_count  (loop_count),
    .upc         (),
    .stack_level (stack_level),
    .stack_err   (stack_err)
  );

  assign fork_req   = ictl.fork_req;
  assign fork_param = param;

  // Fork handshake: the request stays up until the join arrives.
  a_fork_hold: assert property (@(posedge clk) disable iff (!rst_n)
                 (fork_req && !fork_done) |=> fork_req);

endmodule
