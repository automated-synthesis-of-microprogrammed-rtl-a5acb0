// useq_stack_tb: self-checking test of the sequencer stack.
//
// Random single and double pushes and pops (never beyond full or empty)
// are applied and top, below and level are compared every cycle with a
// queue-based reference. A reset in the middle checks that the stack
// empties. A last phase switches the assertions off and overflows and
// underflows the stack on purpose: the operation must be dropped and the
// sticky err flag set. Ends with a TB_RESULT line; a watchdog bounds the
// run.
module useq_stack_tb;
  import cmc_pkg::*;

  localparam int W = 8, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  stk_op_e op;
  logic [W-1:0] d0, d1, top, below;
  logic [$clog2(DEPTH+1)-1:0] level;
  logic err;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  useq_stack #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic compare();
    int n = model.size();
    check("level", 32'(level), 32'(n));
    check("top", 32'(top), n >= 1 ? 32'(model[n-1]) : 0);
    check("below", 32'(below), n >= 2 ? 32'(model[n-2]) : 0);
    check("err", 32'(err), 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = STK_NONE; d0 = '0; d1 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int n, r;
      n = model.size();
      r = $urandom_range(0, 4);
      d0 = W'($urandom); d1 = W'($urandom);
      unique case (r)
        1: op = (n + 1 <= DEPTH) ? STK_PUSH1 : STK_NONE;
        2: op = (n + 2 <= DEPTH) ? STK_PUSH2 : STK_NONE;
        3: op = (n >= 1) ? STK_POP1 : STK_NONE;
        4: op = (n >= 2) ? STK_POP2 : STK_NONE;
        default: op = STK_NONE;
      endcase
      @(posedge clk);
      unique case (op)
        STK_PUSH1: model.push_back(d0);
        STK_PUSH2: begin model.push_back(d0); model.push_back(d1); end
        STK_POP1:  void'(model.pop_back());
        STK_POP2:  begin void'(model.pop_back()); void'(model.pop_back()); end
        default: ;
      endcase
      #1 compare();
      if (i == 1500) begin
        op = STK_NONE;
        rst_n = 0; #2 rst_n = 1;
        model.delete();
        compare();
      end
    end
    // error handling, with the usage assertions switched off
    $assertoff;
    op = STK_NONE; rst_n = 0; #2 rst_n = 1; model.delete();
    op = STK_POP1; @(posedge clk); #1;                 // underflow
    check("underflow level", 32'(level), 0);
    check("underflow err", 32'(err), 1);
    rst_n = 0; #2 rst_n = 1;
    check("err cleared", 32'(err), 0);
    for (int k = 0; k < DEPTH - 1; k++) begin
      op = STK_PUSH1; d0 = W'(k + 1); @(posedge clk); #1;
    end
    op = STK_PUSH2; d0 = 8'hee; d1 = 8'hff; @(posedge clk); #1;   // 7 + 2 > 8
    check("overflow level", 32'(level), DEPTH - 1);
    check("overflow top", 32'(top), DEPTH - 1);
    check("overflow err", 32'(err), 1);
    op = STK_NONE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
