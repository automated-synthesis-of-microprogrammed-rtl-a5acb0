// cmc_top_tb: end-to-end test of the microprogrammed controller at its
// default sizes.
//
// A small microprogram is loaded through the control-memory and IFPU load
// ports while reset is held. It uses every internal function: sequential
// steps, jumps, a single conditional jump on a status bit, a four-way jump
// on two status bits, two nested counted loops with a subroutine call in
// the inner body, a one-word loop inside a second subroutine, returns, a
// fork that waits for its join, and an external address mapping that
// restarts the program. Status bits, the external bus and the fork join are
// random every cycle.
//
// The reference is an interpreter of the same microprogram at the level of
// the internal functions (program counter, a list of open calls and loops
// with remaining pass counts), which knows nothing of register1, the stack
// layout or the loop counter. Every cycle it predicts the external
// operation, the next address and the fork request; the controller must
// match it cycle by cycle, which also checks one microinstruction per clock
// and the hold while a fork waits. Each mechanism is counted and a failure
// is counted for any that never happened. Ends with a TB_RESULT line; a
// watchdog bounds the run.
module cmc_top_tb;
  import cmc_pkg::*;

  localparam int ADDR_W = DEF_ADDR_W, PNUM_W = DEF_PNUM_W, OP_W = DEF_OP_W;
  localparam int STATUS_W = DEF_STATUS_W, IFPU_ROWS = DEF_IFPU_ROWS;
  localparam int STACK_DEPTH = DEF_STACK_DEPTH;
  localparam int CYCLES = 4000;

  logic clk = 0, rst_n = 0;
  logic cm_wr_en;
  logic [ADDR_W-1:0] cm_wr_addr;
  logic [DEF_IF_W-1:0] cm_wr_f1;
  logic [PNUM_W-1:0] cm_wr_f2;
  logic [OP_W-1:0] cm_wr_f3;
  logic ifpu_wr_en, ifpu_wr_valid;
  logic [$clog2(IFPU_ROWS)-1:0] ifpu_wr_row;
  logic [PNUM_W-1:0] ifpu_wr_pnum;
  logic [STATUS_W-1:0] ifpu_wr_mask, ifpu_wr_val, status;
  logic [ADDR_W-1:0] ifpu_wr_param, ext_bus;
  logic fork_done, fork_req, stack_err;
  logic [OP_W-1:0] dp_op;
  logic [ADDR_W-1:0] cm_addr, fork_param, loop_count;
  logic [$clog2(STACK_DEPTH+1)-1:0] stack_level;

  cmc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- the microprogram (reference copy) ----
  typedef struct { int f1; int f2; int f3; } mi_s;
  typedef struct { int pnum; int mask; int val; int param; } row_s;
  mi_s  prog [int];
  row_s rows [$];

  task automatic mi(int a, ifunc_e f, int p, int op);
    prog[a] = '{int'(f), p, op};
  endtask

  task automatic build_program();
    // main
    mi(8'h00, IF_SEQU,    0, 8'h10);
    mi(8'h01, IF_LOOP,    1, 8'h11);   // outer loop, 3 passes
    mi(8'h02, IF_LOOP,    2, 8'h12);   //   inner loop, 2 passes
    mi(8'h03, IF_CALL,    3, 8'h13);   //     call 0x40
    mi(8'h04, IF_ENDLOOP, 0, 8'h14);   //   end inner
    mi(8'h05, IF_CJUMP,   4, 8'h15);   //   if status[0] goto 0x08
    mi(8'h06, IF_SEQU,    0, 8'h16);
    mi(8'h07, IF_JUMP,    5, 8'h17);   //   goto 0x09
    mi(8'h08, IF_SEQU,    0, 8'h18);
    mi(8'h09, IF_ENDLOOP, 0, 8'h19);   // end outer
    mi(8'h0a, IF_CJUMP,   6, 8'h1a);   // 4-way on status[3:2] -> 0x20..0x23
    mi(8'h0c, IF_FORK,    8, 8'h1c);   // fork, parameter 0x80
    mi(8'h0d, IF_MAP,     0, 8'h1d);   // next address from the external bus
    mi(8'h0e, IF_CALL,    9, 8'h1e);   // call 0x50
    mi(8'h0f, IF_JUMP,   10, 8'h1f);   // goto 0x00
    for (int k = 0; k < 4; k++)
      mi(8'h20 + k, IF_JUMP, 7, 8'h20 + k);  // goto 0x0c
    // subroutine at 0x40
    mi(8'h40, IF_SEQU,    0, 8'h40);
    mi(8'h41, IF_CJUMP,  11, 8'h41);   // if status[1] goto 0x43
    mi(8'h42, IF_SEQU,    0, 8'h42);
    mi(8'h43, IF_RETURN,  0, 8'h43);
    // subroutine at 0x50: a one-word loop of 4 passes
    mi(8'h50, IF_LOOP,   12, 8'h50);
    mi(8'h51, IF_ENDLOOP, 0, 8'h51);
    mi(8'h52, IF_RETURN,  0, 8'h52);
    // IFPU product terms
    rows.push_back('{1,  0, 0, 3});
    rows.push_back('{2,  0, 0, 2});
    rows.push_back('{3,  0, 0, 8'h40});
    rows.push_back('{4,  1, 1, 8'h08});
    rows.push_back('{5,  0, 0, 8'h09});
    for (int k = 0; k < 4; k++) rows.push_back('{6, 4'b1100, k << 2, 8'h20 + k});
    rows.push_back('{7,  0, 0, 8'h0c});
    rows.push_back('{8,  0, 0, 8'h80});
    rows.push_back('{9,  0, 0, 8'h50});
    rows.push_back('{10, 0, 0, 8'h00});
    rows.push_back('{11, 2, 2, 8'h43});
    rows.push_back('{12, 0, 0, 4});
  endtask

  function automatic bit lookup(int pnum, int st, output int param);
    bit h = 0;
    param = 0;
    foreach (rows[r])
      if (rows[r].pnum == pnum && ((st ^ rows[r].val) & rows[r].mask) == 0) begin
        h = 1; param |= rows[r].param;
      end
    return h;
  endfunction

  // ---- reference interpreter state ----
  typedef struct { bit is_loop; int addr; int remaining; } frame_s;
  frame_s frames [$];
  int pc;

  // mechanism counters
  int n_seq, n_jump, n_cj_taken, n_cj_not, n_mway[4], n_call, n_ret;
  int n_loop, n_loop_back, n_loop_exit, n_nested, n_fork_wait, n_fork_go, n_map;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc %0h: got %0h expected %0h", what, pc, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next, prm, cyc;
    bit h, adv, freq;
    cm_wr_en = 0; cm_wr_addr = '0; cm_wr_f1 = '0; cm_wr_f2 = '0; cm_wr_f3 = '0;
    ifpu_wr_en = 0; ifpu_wr_row = '0; ifpu_wr_valid = 0; ifpu_wr_pnum = '0;
    ifpu_wr_mask = '0; ifpu_wr_val = '0; ifpu_wr_param = '0;
    status = '0; ext_bus = '0; fork_done = 0;
    build_program();
    // load while in reset
    @(posedge clk); #1;
    foreach (prog[a]) begin
      cm_wr_en = 1; cm_wr_addr = ADDR_W'(a);
      cm_wr_f1 = DEF_IF_W'(prog[a].f1); cm_wr_f2 = PNUM_W'(prog[a].f2); cm_wr_f3 = OP_W'(prog[a].f3);
      @(posedge clk); #1;
    end
    cm_wr_en = 0;
    for (int r = rows.size(); r < IFPU_ROWS; r++) begin   // unused rows
      ifpu_wr_en = 1; ifpu_wr_row = 5'(r); ifpu_wr_valid = 0;
      @(posedge clk); #1;
    end
    foreach (rows[r]) begin
      ifpu_wr_en = 1; ifpu_wr_row = 5'(r); ifpu_wr_valid = 1;
      ifpu_wr_pnum = 4'(rows[r].pnum); ifpu_wr_mask = 4'(rows[r].mask);
      ifpu_wr_val = 4'(rows[r].val); ifpu_wr_param = 8'(rows[r].param);
      @(posedge clk); #1;
    end
    ifpu_wr_en = 0;
    @(posedge clk); #1;
    rst_n = 1;
    pc = 0;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      status = STATUS_W'($urandom);
      ext_bus = ($urandom_range(0, 1) != 0) ? 8'h0e : 8'h00;
      fork_done = ($urandom_range(0, 2) == 0);
      // reference step
      next = pc + 1; adv = 1; freq = 0;
      h = lookup(prog[pc].f2, int'(status), prm);
      case (ifunc_e'(prog[pc].f1))
        IF_SEQU:   n_seq++;
        IF_JUMP:   begin next = prm; n_jump++; end
        IF_CJUMP:  begin
          if (h) begin next = prm; if (prog[pc].f2 == 6) n_mway[prm - 8'h20]++; else n_cj_taken++; end
          else n_cj_not++;
        end
        IF_CALL:   begin frames.push_back('{0, pc + 1, 0}); next = prm; n_call++; end
        IF_RETURN: begin next = frames[$].addr; void'(frames.pop_back()); n_ret++; end
        IF_LOOP:   begin
          foreach (frames[f]) if (frames[f].is_loop) begin n_nested++; break; end
          frames.push_back('{1, pc + 1, prm}); n_loop++;
        end
        IF_ENDLOOP: begin
          frames[$].remaining--;
          if (frames[$].remaining == 0) begin void'(frames.pop_back()); n_loop_exit++; end
          else begin next = frames[$].addr; n_loop_back++; end
        end
        IF_FORK:   begin
          freq = 1; adv = fork_done;
          if (fork_done) n_fork_go++; else begin n_fork_wait++; next = pc; end
        end
        IF_MAP:    begin next = int'(ext_bus); n_map++; end
        default: ;
      endcase
      #1;
      check("dp_op", 32'(dp_op), 32'(prog[pc].f3));
      check("fork_req", 32'(fork_req), 32'(freq));
      if (freq) check("fork_param", 32'(fork_param), 32'h80);
      if (adv) check("cm_addr", 32'(cm_addr), 32'(next));
      check("stack_err", 32'(stack_err), 0);
      @(posedge clk); #1;
      pc = next;
    end
    $display("mechanisms: seq=%0d jump=%0d cjump taken=%0d not=%0d 4-way=%0d/%0d/%0d/%0d call=%0d ret=%0d",
             n_seq, n_jump, n_cj_taken, n_cj_not, n_mway[0], n_mway[1], n_mway[2], n_mway[3], n_call, n_ret);
    $display("            loop=%0d nested=%0d back=%0d exit=%0d fork wait=%0d go=%0d map=%0d",
             n_loop, n_nested, n_loop_back, n_loop_exit, n_fork_wait, n_fork_go, n_map);
    foreach (n_mway[k]) begin checks++; if (n_mway[k] == 0) failures++; end
    checks += 13;
    if (n_seq == 0) failures++;       if (n_jump == 0) failures++;
    if (n_cj_taken == 0) failures++;  if (n_cj_not == 0) failures++;
    if (n_call == 0) failures++;      if (n_ret == 0) failures++;
    if (n_loop == 0) failures++;      if (n_nested == 0) failures++;
    if (n_loop_back == 0) failures++; if (n_loop_exit == 0) failures++;
    if (n_fork_wait == 0) failures++; if (n_fork_go == 0) failures++;
    if (n_map == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
