// loop_unit_tb: self-checking test of the loop counter, decrementer and
// zero detect.
//
// Random load / decrement / restore commands are applied and the count and
// the zero flag are compared every cycle with a reference. A directed part
// loads a count of 3 and checks that zero is seen only in the third pass,
// i.e. that End-loop would jump back twice and exit once. Ends with a
// TB_RESULT line; a watchdog bounds the run.
module loop_unit_tb;
  localparam int W = 8;

  logic clk = 0, rst_n = 0;
  logic load, dec, restore, zero;
  logic [W-1:0] load_val, restore_val, count;
  logic [W-1:0] ref_cnt;
  int checks = 0, failures = 0;

  loop_unit #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passes;
    load = 0; dec = 0; restore = 0; load_val = '0; restore_val = '0;
    repeat (2) @(posedge clk);
    #1 check("reset count", 32'(count), 0);
    rst_n = 1;
    ref_cnt = '0;
    // directed: a loop of 3 passes
    load = 1; load_val = 8'd3;
    @(posedge clk); #1 load = 0;
    passes = 0;
    for (int k = 0; k < 10; k++) begin
      passes++;
      if (zero) break;
      dec = 1; @(posedge clk); #1 dec = 0;
    end
    check("passes for count 3", 32'(passes), 3);
    ref_cnt = count;
    // random
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom); dec = 1'($urandom); restore = ($urandom_range(0, 3) == 0);
      load_val = W'($urandom); restore_val = W'($urandom);
      check("zero", 32'(zero), 32'(ref_cnt == 8'd1));
      @(posedge clk);
      if (restore)   ref_cnt = restore_val;
      else if (load) ref_cnt = load_val;
      else if (dec)  ref_cnt = ref_cnt - 1'b1;
      #1 check("count", 32'(count), 32'(ref_cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
