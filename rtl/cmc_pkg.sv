// cmc_pkg: shared constants and types of the complex microprogrammed
// controller (CMC).
//
// The controller follows a "fully distributed" organisation: the control
// memory (CM) only names the sequencing behaviour of each microinstruction
// (an internal function number f1 and a parameter number f2) next to the
// external operation number f3. The internal function unit (IFU) turns f1
// into internal control signals, the internal function parameter unit
// (IFPU) turns f2 and the machine status into a sequencing parameter, and
// the microsequencer forms the next control-memory address.
//
// The list of internal functions (Sequ, Jump, Cjump/If, Call, Return, Loop,
// End-loop, Fork, Map) follows the source design. Their binary codes are
// this design's choice; Cjump = 2 matches the worked example "MI (2 9 2)" in
// which internal function 2 is a conditional jump. All widths below are
// this design's choice: the source gives none.
package cmc_pkg;

  // Default sizes.
  localparam int unsigned DEF_ADDR_W     = 8;   // control-memory address width
  localparam int unsigned DEF_IF_W       = 4;   // f1: internal function number
  localparam int unsigned DEF_PNUM_W     = 4;   // f2: internal function parameter number
  localparam int unsigned DEF_OP_W       = 8;   // f3: external operation number
  localparam int unsigned DEF_STATUS_W   = 4;   // machine status bits into the IFPU
  localparam int unsigned DEF_STACK_DEPTH = 8;  // entries of the sequencer stack
  localparam int unsigned DEF_IFPU_ROWS  = 32;  // product terms of the IFPU PLA

  // Internal functions (field f1).
  typedef enum logic [3:0] {
    IF_SEQU    = 4'd0,  // sequential addressing, no parameter
    IF_JUMP    = 4'd1,  // unconditional jump to the IFPU address (Goto)
    IF_CJUMP   = 4'd2,  // conditional / multi-way jump (If)
    IF_CALL    = 4'd3,  // push return address, jump to the IFPU address
    IF_RETURN  = 4'd4,  // pop, continue at the popped address
    IF_LOOP    = 4'd5,  // push, push, load loop count, continue
    IF_ENDLOOP = 4'd6,  // zero test: jump back to loop start or exit loop
    IF_FORK    = 4'd7,  // hand control to the nanoprogram unit, wait for join
    IF_MAP     = 4'd8   // next address from the external bus
  } ifunc_e;

  // Next-address multiplexer select (Fig. 4 MUX inputs).
  typedef enum logic [1:0] {
    SEL_INC   = 2'd0,   // register1: incremented address
    SEL_IFPU  = 2'd1,   // sequencing parameter from the IFPU
    SEL_STACK = 2'd2,   // top of stack
    SEL_EXT   = 2'd3    // external bus (address mapping)
  } nsel_e;

  // Stack operation for one cycle.
  typedef enum logic [2:0] {
    STK_NONE  = 3'd0,
    STK_PUSH1 = 3'd1,   // push one word (Call)
    STK_PUSH2 = 3'd2,   // push two words (Loop: saved count, then loop start)
    STK_POP1  = 3'd3,   // pop one word (Return)
    STK_POP2  = 3'd4    // pop two words (loop exit)
  } stk_op_e;

  // Internal control bundle from the IFU to the microsequencer.
  typedef struct packed {
    nsel_e   nsel;       // next-address source
    stk_op_e stk_op;     // stack operation
    logic    loop_load;  // load loop counter from the IFPU parameter
    logic    loop_dec;   // decrement loop counter
    logic    loop_restore; // restore the outer loop count from the stack
    logic    fork_req;   // fork: control transfer to the nanoprogram unit
    logic    advance;    // 0 = hold the current microinstruction (fork wait)
  } ictl_t;

endpackage
