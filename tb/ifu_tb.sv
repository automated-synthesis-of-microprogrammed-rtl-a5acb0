// ifu_tb: self-checking test of the internal function unit.
//
// Every combination of f1 (all 16 codes), IFPU hit, loop zero and fork
// join is applied, and the internal controls are compared with a table
// written out per internal function below. Ends with a TB_RESULT line; a
// watchdog bounds the run.
module ifu_tb;
  import cmc_pkg::*;

  logic [3:0] f1;
  logic ifpu_hit, loop_zero, fork_done;
  ictl_t ictl;
  int checks = 0, failures = 0;

  ifu #(.IF_W(4)) dut (.*);

  // expected controls: nsel, stack op, load, dec, restore, fork, advance
  function automatic ictl_t expect_ctl(int f, bit hit, bit z, bit done);
    ictl_t e;
    e = '{nsel: SEL_INC, stk_op: STK_NONE, loop_load: 0, loop_dec: 0,
          loop_restore: 0, fork_req: 0, advance: 1};
    case (f)
      1: e.nsel = SEL_IFPU;                                  // Jump
      2: if (hit) e.nsel = SEL_IFPU;                         // Cjump
      3: begin e.nsel = SEL_IFPU; e.stk_op = STK_PUSH1; end  // Call
      4: begin e.nsel = SEL_STACK; e.stk_op = STK_POP1; end  // Return
      5: begin e.stk_op = STK_PUSH2; e.loop_load = 1; end    // Loop
      6: if (z) begin e.stk_op = STK_POP2; e.loop_restore = 1; end
         else   begin e.nsel = SEL_STACK; e.loop_dec = 1; end // End-loop
      7: begin e.fork_req = 1; e.advance = done; end          // Fork
      8: e.nsel = SEL_EXT;                                    // Map
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++)
      for (int c = 0; c < 8; c++) begin
        ictl_t e;
        f1 = 4'(f); ifpu_hit = c[0]; loop_zero = c[1]; fork_done = c[2];
        #1;
        e = expect_ctl(f, c[0], c[1], c[2]);
        checks++;
        if (ictl !== e) begin
          failures++;
          $display("FAIL f1=%0d hit=%0b zero=%0b done=%0b: got %b expected %b",
                   f, c[0], c[1], c[2], ictl, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
