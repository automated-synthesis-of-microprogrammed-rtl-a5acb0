// control_memory_tb: self-checking test of the control memory.
//
// Writes random microinstructions to every address, then reads random
// addresses with random read enables and checks the one-cycle read latency,
// the hold of the output register while rd_en is low and the split of the
// word into the f1, f2 and f3 fields. Ends with a TB_RESULT line; a watchdog
// bounds the run.
module control_memory_tb;
  localparam int ADDR_W = 8, IF_W = 4, PNUM_W = 4, OP_W = 8;

  logic clk = 0;
  logic wr_en, rd_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [IF_W-1:0] wr_f1, f1;
  logic [PNUM_W-1:0] wr_f2, f2;
  logic [OP_W-1:0] wr_f3, f3;
  logic [15:0] model [256];
  logic [15:0] exp_q;
  int checks = 0, failures = 0;

  control_memory #(.ADDR_W(ADDR_W), .IF_W(IF_W), .PNUM_W(PNUM_W), .OP_W(OP_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_f1 = '0; wr_f2 = '0; wr_f3 = '0;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      wr_en = 1; wr_addr = 8'(a);
      {wr_f1, wr_f2, wr_f3} = 16'($urandom);
      model[a] = {wr_f1, wr_f2, wr_f3};
      @(posedge clk); #1;
    end
    wr_en = 0;
    rd_en = 1; rd_addr = 8'd0; @(posedge clk); #1;
    exp_q = model[0];
    for (int i = 0; i < 3000; i++) begin
      checks++;
      if ({f1, f2, f3} !== exp_q || f1 !== exp_q[15:12] || f3 !== exp_q[7:0]) begin
        failures++;
        $display("FAIL read: got %h %h %h expected %h", f1, f2, f3, exp_q);
      end
      rd_en = ($urandom_range(0, 3) != 0);
      rd_addr = 8'($urandom);
      // occasional overwrite of a random word
      wr_en = ($urandom_range(0, 7) == 0);
      wr_addr = 8'($urandom);
      {wr_f1, wr_f2, wr_f3} = 16'($urandom);
      @(posedge clk);
      if (rd_en) exp_q = model[rd_addr];   // read returns the old word
      if (wr_en) model[wr_addr] = {wr_f1, wr_f2, wr_f3};
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
