// useq_stack: the microsequencer stack (the "stack" box of the sequencer).
//
// A last-in first-out store of DEPTH words of W bits, built from a register
// array and a stack pointer. It keeps subroutine return addresses (Call /
// Return) and, for every open loop, two words: the saved count of the
// enclosing loop and, on top of it, the loop-start address (Loop pushes
// twice, the loop exit pops twice). Hence one or two words can be pushed or
// popped in one cycle.
//
// Interface: op (stk_op_e) with d0/d1 as push data. STK_PUSH1 pushes d0;
// STK_PUSH2 pushes d0 and then d1, so d1 ends on top. top and below are the
// two uppermost words, read combinationally. level is the number of words
// held. An overflow or underflow leaves the stack unchanged and sets the
// sticky err flag (cleared by reset); simulation assertions flag it too.
//
// Timing: the operation takes effect at the rising clock edge; top and
// below reflect it in the next cycle. Asynchronous active-low reset empties
// the stack. The source design names the stack but gives neither its depth
// nor its width, nor its error handling: these are this design's choices.
module useq_stack
  import cmc_pkg::*;
#(
  parameter int unsigned W     = cmc_pkg::DEF_ADDR_W,
  parameter int unsigned DEPTH = cmc_pkg::DEF_STACK_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  stk_op_e                    op,
  input  logic [W-1:0]               d0,
  input  logic [W-1:0]               d1,
  output logic [W-1:0]               top,
  output logic [W-1:0]               below,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic                       err
);

  localparam int unsigned LW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [LW-1:0] sp;            // number of words held; top is mem[sp-1]
  logic          ok;            // the requested operation fits

  always_comb begin
    unique case (op)
      STK_PUSH1: ok = (32'(sp) + 1 <= DEPTH);
      STK_PUSH2: ok = (32'(sp) + 2 <= DEPTH);
      STK_POP1:  ok = (sp >= LW'(1));
      STK_POP2:  ok = (sp >= LW'(2));
      default:   ok = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (!ok) begin
      err <= 1'b1;
    end else begin
      unique case (op)
        STK_PUSH1: sp <= sp + LW'(1);
        STK_PUSH2: sp <= sp + LW'(2);
        STK_POP1:  sp <= sp - LW'(1);
        STK_POP2:  sp <= sp - LW'(2);
        default:   ;
      endcase
    end
  end

  // Storage: written only on a push that fits.
  always_ff @(posedge clk) begin
    if (ok) begin
      if (op == STK_PUSH1 || op == STK_PUSH2)
        mem[sp[$clog2(DEPTH)-1:0]] <= d0;
      if (op == STK_PUSH2)
        mem[sp[$clog2(DEPTH)-1:0] + 1'b1] <= d1;
    end
  end

  // Reads of an empty slot return zero.
  always_comb begin
    top   = (sp >= LW'(1)) ? mem[sp[$clog2(DEPTH)-1:0] - 1'b1] : '0;
    below = (sp >= LW'(2)) ? mem[sp[$clog2(DEPTH)-1:0] - 2'd2] : '0;
  end

  assign level = sp;

  // Rules of use: the assembler must never overflow or underflow the stack.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                    (op == STK_PUSH1 || op == STK_PUSH2) |-> ok);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                    (op == STK_POP1 || op == STK_POP2) |-> ok);

endmodule
