// simc_examples_tb: runs the two worked microinstruction examples of the
// design description on the full controller at its default sizes.
//
// Example 1, "(Loop 3 op1)": a Loop microinstruction with count 3 and
// operation 1, followed by a two-word body (a plain step and the End-loop).
// The body must execute exactly three times and the loop must take exactly
// 1 + 3 * 2 clock cycles, one microinstruction per clock.
// Example 2, the microinstruction "(2 9 2)": internal function 2 (the
// conditional jump), parameter number 9 and operation 2. The IFPU holds,
// for parameter number 9, the targets selected by the machine status:
// status[0] = 1 -> 0x10, status[1:0] = 2'b10 -> 0x20, otherwise the jump
// is not taken and the next word (0x05) follows. Each status case is run
// after a fresh reset. Ends with a TB_RESULT line; a watchdog bounds the
// run.
module simc_examples_tb;
  import cmc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cm_wr_en;
  logic [7:0] cm_wr_addr, ifpu_wr_param, ext_bus, cm_addr, fork_param, loop_count;
  logic [3:0] cm_wr_f1, cm_wr_f2, ifpu_wr_pnum, ifpu_wr_mask, ifpu_wr_val, status;
  logic [7:0] cm_wr_f3, dp_op;
  logic ifpu_wr_en, ifpu_wr_valid, fork_done, fork_req, stack_err;
  logic [4:0] ifpu_wr_row;
  logic [3:0] stack_level;
  int checks = 0, failures = 0;

  cmc_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic cm(int a, ifunc_e f, int p, int op);
    cm_wr_en = 1; cm_wr_addr = 8'(a); cm_wr_f1 = 4'(f); cm_wr_f2 = 4'(p); cm_wr_f3 = 8'(op);
    @(posedge clk); #1 cm_wr_en = 0;
  endtask

  task automatic row(int r, bit v, int p, int mk, int vl, int pa);
    ifpu_wr_en = 1; ifpu_wr_row = 5'(r); ifpu_wr_valid = v; ifpu_wr_pnum = 4'(p);
    ifpu_wr_mask = 4'(mk); ifpu_wr_val = 4'(vl); ifpu_wr_param = 8'(pa);
    @(posedge clk); #1 ifpu_wr_en = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int body, cycles;
    cm_wr_en = 0; ifpu_wr_en = 0; status = '0; ext_bus = '0; fork_done = 0;
    cm_wr_addr = '0; cm_wr_f1 = '0; cm_wr_f2 = '0; cm_wr_f3 = '0;
    ifpu_wr_row = '0; ifpu_wr_valid = 0; ifpu_wr_pnum = '0; ifpu_wr_mask = '0;
    ifpu_wr_val = '0; ifpu_wr_param = '0;
    @(posedge clk); #1;
    // microprogram
    cm(8'h00, IF_LOOP,    1, 1);      // (Loop 3 op1)
    cm(8'h01, IF_SEQU,    0, 8'h31);  //   body
    cm(8'h02, IF_ENDLOOP, 0, 8'h32);  //   End-l
    cm(8'h03, IF_CJUMP,   9, 2);      // (2 9 2)
    cm(8'h04, IF_SEQU,    0, 8'h44);  // not reached
    cm(8'h05, IF_SEQU,    0, 8'h05);
    cm(8'h10, IF_SEQU,    0, 8'h10);
    cm(8'h20, IF_SEQU,    0, 8'h20);
    // IFPU: unused rows first, then the parameters
    for (int r = 0; r < 32; r++) row(r, 0, 0, 0, 0, 0);
    row(0, 1, 1, 4'b0000, 4'b0000, 3);      // loop count 3
    row(1, 1, 9, 4'b0001, 4'b0001, 8'h10);  // status[0] = 1
    row(2, 1, 9, 4'b0011, 4'b0010, 8'h20);  // status[1:0] = 10
    cm(8'h04, IF_JUMP, 10, 8'h44);          // 0x04: goto 0x05 (param 10)
    row(3, 1, 10, 4'b0000, 4'b0000, 8'h05);
    for (int run = 0; run < 3; run++) begin
      int exp_after;
      rst_n = 0;
      status = (run == 0) ? 4'b0001 : (run == 1) ? 4'b0010 : 4'b0100;
      exp_after = (run == 0) ? 8'h10 : (run == 1) ? 8'h20 : 8'h04;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      check("first op", int'(dp_op), 1);
      body = 0; cycles = 0;
      while (dp_op != 8'd2 && cycles < 50) begin
        if (dp_op == 8'h31) body++;
        @(posedge clk); #1 cycles++;
      end
      check("loop body passes", body, 3);
      check("cycles to the (2 9 2) word", cycles, 1 + 3 * 2);
      check("loop count restored", int'(loop_count), 0);
      check("stack empty after loop", int'(stack_level), 0);
      check("(2 9 2) target", int'(cm_addr), exp_after);
      @(posedge clk); #1;
      check("op after (2 9 2)", int'(dp_op), (run == 2) ? 8'h44 : exp_after);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
