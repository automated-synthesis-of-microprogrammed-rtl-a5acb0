// microsequencer_tb: self-checking test of the next-address logic.
//
// Random internal-control words (every select, every stack operation kept
// within the stack bounds, loop load / decrement / restore, advance low to
// hold) are driven with random IFPU parameters and external-bus values.
// Every cycle the address, read enable, register1, loop count, zero detect
// and stack level are compared with a reference model that keeps its own
// register1, stack and counter. The reset behaviour (address 0, register1
// = 1) is checked too. Ends with a TB_RESULT line; a watchdog bounds the
// run.
module microsequencer_tb;
  import cmc_pkg::*;
  localparam int ADDR_W = 8, STACK_DEPTH = 8;

  logic clk = 0, rst_n = 0;
  ictl_t ictl;
  logic [ADDR_W-1:0] ifpu_param, ext_bus, cm_addr, loop_count, upc;
  logic cm_rd_en, loop_zero, stack_err;
  logic [$clog2(STACK_DEPTH+1)-1:0] stack_level;
  int checks = 0, failures = 0;

  logic [7:0] m_upc, m_cnt, m_addr;
  logic [7:0] m_stk[$];

  microsequencer #(.ADDR_W(ADDR_W), .STACK_DEPTH(STACK_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ictl = '0; ifpu_param = '0; ext_bus = '0;
    ictl.advance = 1;
    ictl.nsel = SEL_IFPU; ifpu_param = 8'h55;
    repeat (2) @(posedge clk);
    #1 check("reset addr", 32'(cm_addr), 0);
    check("reset rd_en", 32'(cm_rd_en), 1);
    check("reset upc", 32'(upc), 1);
    check("reset level", 32'(stack_level), 0);
    rst_n = 1;
    m_upc = 8'd1; m_cnt = 8'd0;
    for (int i = 0; i < 5000; i++) begin
      int n, so;
      logic [7:0] top, below;
      n = m_stk.size();
      ictl = '0;
      ictl.nsel = nsel_e'($urandom_range(0, 3));
      so = $urandom_range(0, 4);
      if (so == 1 && n + 1 > STACK_DEPTH) so = 0;
      if (so == 2 && n + 2 > STACK_DEPTH) so = 0;
      if (so == 3 && n < 1) so = 0;
      if (so == 4 && n < 2) so = 0;
      ictl.stk_op = stk_op_e'(so);
      ictl.loop_load = ($urandom_range(0, 3) == 0);
      ictl.loop_dec = 1'($urandom);
      ictl.loop_restore = ($urandom_range(0, 5) == 0);
      ictl.advance = ($urandom_range(0, 7) != 0);
      ifpu_param = 8'($urandom); ext_bus = 8'($urandom);
      top = n >= 1 ? m_stk[n-1] : 8'd0;
      below = n >= 2 ? m_stk[n-2] : 8'd0;
      unique case (ictl.nsel)
        SEL_INC:   m_addr = m_upc;
        SEL_IFPU:  m_addr = ifpu_param;
        SEL_STACK: m_addr = top;
        SEL_EXT:   m_addr = ext_bus;
      endcase
      #1;
      check("cm_addr", 32'(cm_addr), 32'(m_addr));
      check("rd_en", 32'(cm_rd_en), 32'(ictl.advance));
      check("zero", 32'(loop_zero), 32'(m_cnt == 8'd1));
      @(posedge clk);
      if (ictl.advance) begin
        unique case (ictl.stk_op)
          STK_PUSH1: m_stk.push_back(m_upc);
          STK_PUSH2: begin m_stk.push_back(m_cnt); m_stk.push_back(m_upc); end
          STK_POP1:  void'(m_stk.pop_back());
          STK_POP2:  begin void'(m_stk.pop_back()); void'(m_stk.pop_back()); end
          default: ;
        endcase
        if (ictl.loop_restore)   m_cnt = below;
        else if (ictl.loop_load) m_cnt = ifpu_param;
        else if (ictl.loop_dec)  m_cnt = m_cnt - 1'b1;
        m_upc = m_addr + 1'b1;
      end
      #1;
      check("upc", 32'(upc), 32'(m_upc));
      check("count", 32'(loop_count), 32'(m_cnt));
      check("level", 32'(stack_level), 32'(m_stk.size()));
      check("err", 32'(stack_err), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
