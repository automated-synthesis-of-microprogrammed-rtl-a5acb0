// microsequencer: next-address logic of the microprogrammed controller.
//
// Built from the parts of the source design's sequencer figure: an
// incrementer, register1, a stack, a loop counter with decrementer and zero
// detect, and a multiplexer that forms the control-memory address from
//   register1   the incremented address (sequential addressing),
//   the IFPU    the sequencing parameter (jump, call, taken branch),
//   the stack   top of stack (return, jump back to a loop start),
//   the external bus (address mapping).
// The multiplexer select and all other internal controls come from the IFU
// (ictl). The incrementer adds one to the multiplexer output and register1
// keeps the result, so register1 holds the address after the one being
// fetched; Call and Loop push register1, which is then the return address
// or the loop start.
//
// Timing: cm_addr is combinational and is the address the control memory
// registers at the next rising edge; with the control memory's output
// register this gives one microinstruction per clock. When ictl.advance is
// low (a fork waiting for its join) register1, the stack and the loop
// counter hold and cm_rd_en is low, so the current microinstruction stays.
// While rst_n is low, cm_addr is 0 and cm_rd_en is 1, so the first
// microinstruction after reset is word 0; register1 resets to 1.
// Asynchronous active-low reset.
//
// Which register feeds the stack, the use of the stack for saved loop
// counts and the reset address are this design's choices.
module microsequencer
  import cmc_pkg::*;
#(
  parameter int unsigned ADDR_W      = cmc_pkg::DEF_ADDR_W,
  parameter int unsigned STACK_DEPTH = cmc_pkg::DEF_STACK_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ictl_t             ictl,       // internal control from the IFU
  input  logic [ADDR_W-1:0] ifpu_param, // sequencing parameter from the IFPU
  input  logic [ADDR_W-1:0] ext_bus,    // external address (Map)
  output logic [ADDR_W-1:0] cm_addr,    // control-memory address
  output logic              cm_rd_en,   // control-memory read enable
  output logic              loop_zero,  // zero detect, feedback to the IFU
  output logic [ADDR_W-1:0] loop_count, // current loop count
  output logic [ADDR_W-1:0] upc,        // register1
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_level, // words on the stack
  output logic              stack_err   // sticky stack overflow/underflow
);

  logic [ADDR_W-1:0] stk_top, stk_below;
  stk_op_e           stk_op;

  // Next-address multiplexer
  always_comb begin
    if (!rst_n) cm_addr = '0;
    else begin
      unique case (ictl.nsel)
        SEL_INC:   cm_addr = upc;
        SEL_IFPU:  cm_addr = ifpu_param;
        SEL_STACK: cm_addr = stk_top;
        SEL_EXT:   cm_addr = ext_bus;
        default:   cm_addr = upc;
      endcase
    end
  end

  assign cm_rd_en = !rst_n || ictl.advance;

  // Incrementer and register1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            upc <= ADDR_W'(1);
    else if (ictl.advance) upc <= cm_addr + ADDR_W'(1);
  end

  assign stk_op = ictl.advance ? ictl.stk_op : STK_NONE;

  // Loop pushes the saved count first and the loop start on top;
  // Call pushes the return address.
  useq_stack #(.W(ADDR_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (stk_op),
    .d0    (stk_op == STK_PUSH2 ? loop_count : upc),
    .d1    (upc),
    .top   (stk_top),
    .below (stk_below),
    .level (stack_level),
    .err   (stack_err)
  );

  loop_unit #(.W(ADDR_W)) u_loop (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (ictl.advance && ictl.loop_load),
    .load_val    (ifpu_param),
    .dec         (ictl.advance && ictl.loop_dec),
    .restore     (ictl.advance && ictl.loop_restore),
    .restore_val (stk_below),
    .count       (loop_count),
    .zero        (loop_zero)
  );

endmodule
