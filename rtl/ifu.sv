// ifu: Internal Function Unit.
//
// Decodes the internal function number (field f1 of the current
// microinstruction) into the internal control signals of the
// microsequencer: next-address select, stack push/pop, loop counter load,
// decrement and restore, and the fork request. Feedback inputs are the
// IFPU hit (some product term of the IFPU matched the parameter number and
// the machine status), the loop zero detect and the join signal of the
// nanoprogram unit.
//
// Behaviour per function, following the source design's table of internal
// functions and controls:
//   Sequ     continue at register1 (address + 1)
//   Jump     address <= IFPU parameter
//   Cjump    IFPU parameter if a product term matched, else continue
//   Call     push register1, address <= IFPU parameter
//   Return   pop, address <= top of stack
//   Loop     push saved count, push loop start (register1), load the
//            counter with the IFPU parameter, continue
//   End-loop zero test: not zero -> decrement and jump to the loop start
//            on top of the stack; zero -> pop both words, restore the
//            outer count, continue
//   Fork     request control transfer to the nanoprogram unit with the
//            IFPU parameter and hold the current microinstruction until
//            fork_done (the join)
//   Map      address <= external bus
// Codes not in the list behave as Sequ. Waiting for the join in the Fork
// microinstruction and the behaviour of unused codes are this design's
// choices. The source design realises this unit as a PLA trimmed to the
// functions a program uses; here the full function set is decoded.
//
// Timing: purely combinational.
module ifu
  import cmc_pkg::*;
#(
  parameter int unsigned IF_W = cmc_pkg::DEF_IF_W
) (
  input  logic [IF_W-1:0] f1,
  input  logic            ifpu_hit,
  input  logic            loop_zero,
  input  logic            fork_done,
  output ictl_t           ictl
);

  always_comb begin
    ictl              = '0;
    ictl.nsel         = SEL_INC;
    ictl.stk_op       = STK_NONE;
    ictl.advance      = 1'b1;
    unique case (f1)
      IF_W'(IF_JUMP):   ictl.nsel = SEL_IFPU;
      IF_W'(IF_CJUMP):  ictl.nsel = ifpu_hit ? SEL_IFPU : SEL_INC;
      IF_W'(IF_CALL): begin
        ictl.nsel   = SEL_IFPU;
        ictl.stk_op = STK_PUSH1;
      end
      IF_W'(IF_RETURN): begin
        ictl.nsel   = SEL_STACK;
        ictl.stk_op = STK_POP1;
      end
      IF_W'(IF_LOOP): begin
        ictl.stk_op    = STK_PUSH2;
        ictl.loop_load = 1'b1;
      end
      IF_W'(IF_ENDLOOP): begin
        if (loop_zero) begin
          ictl.stk_op       = STK_POP2;
          ictl.loop_restore = 1'b1;
        end else begin
          ictl.nsel     = SEL_STACK;
          ictl.loop_dec = 1'b1;
        end
      end
      IF_W'(IF_FORK): begin
        ictl.fork_req = 1'b1;
        ictl.advance  = fork_done;
      end
      IF_W'(IF_MAP):    ictl.nsel = SEL_EXT;
      default:          ;
    endcase
  end

endmodule
