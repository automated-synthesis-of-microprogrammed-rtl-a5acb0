// ifpu_tb: self-checking test of the internal function parameter unit.
//
// Several random PLA programs are loaded (random parameter numbers, status
// cubes and words, some rows left invalid), and for every parameter number
// and every status value the output word and hit flag are compared with a
// reference that evaluates the product terms in software. A directed part
// loads a two-way conditional branch and a four-way branch. Ends with a TB_RESULT line; a watchdog bounds the
// run.
module ifpu_tb;
  localparam int PNUM_W = 4, STATUS_W = 4, PARAM_W = 8, ROWS = 32;

  logic clk = 0;
  logic wr_en, wr_valid;
  logic [$clog2(ROWS)-1:0] wr_row;
  logic [PNUM_W-1:0] wr_pnum, pnum;
  logic [STATUS_W-1:0] wr_mask, wr_val, status;
  logic [PARAM_W-1:0] wr_param, param;
  logic hit;
  int checks = 0, failures = 0;

  bit           m_valid [ROWS];
  logic [3:0]   m_pnum  [ROWS];
  logic [3:0]   m_mask  [ROWS];
  logic [3:0]   m_val   [ROWS];
  logic [7:0]   m_param [ROWS];

  ifpu #(.PNUM_W(PNUM_W), .STATUS_W(STATUS_W), .PARAM_W(PARAM_W), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic write_row(int r, bit v, int pn, int mk, int vl, int pa);
    wr_en = 1; wr_row = 5'(r); wr_valid = v; wr_pnum = 4'(pn);
    wr_mask = 4'(mk); wr_val = 4'(vl); wr_param = 8'(pa);
    @(posedge clk); #1 wr_en = 0;
    m_valid[r] = v; m_pnum[r] = 4'(pn); m_mask[r] = 4'(mk); m_val[r] = 4'(vl); m_param[r] = 8'(pa);
  endtask

  task automatic check_all();
    for (int p = 0; p < 16; p++)
      for (int s = 0; s < 16; s++) begin
        logic [7:0] ep = '0;
        bit eh = 0;
        pnum = 4'(p); status = 4'(s);
        for (int r = 0; r < ROWS; r++)
          if (m_valid[r] && m_pnum[r] == 4'(p) && ((4'(s) ^ m_val[r]) & m_mask[r]) == 0) begin
            ep |= m_param[r]; eh = 1;
          end
        #1;
        checks++;
        if (param !== ep || hit !== eh) begin
          failures++;
          $display("FAIL pnum=%0d status=%h: got %h/%b expected %h/%b", p, s, param, hit, ep, eh);
        end
      end
  endtask

  task automatic check_one(string what, int p, int s, bit eh, int ep);
    pnum = 4'(p); status = 4'(s); #1;
    checks++;
    if (hit !== eh || (eh && param !== 8'(ep))) begin
      failures++;
      $display("FAIL %s: got %h/%b expected %h/%b", what, param, hit, ep, eh);
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
    wr_en = 0; wr_valid = 0; wr_row = '0; wr_pnum = '0; wr_mask = '0; wr_val = '0;
    wr_param = '0; pnum = '0; status = '0;
    foreach (m_valid[r]) m_valid[r] = 0;
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) write_row(r, 0, 0, 0, 0, 0);
    check_all();                       // nothing valid
    // directed: If on status bit 1 -> 0x40 ; 4-way on bits 3:2 -> 0x80..0x83
    write_row(0, 1, 9, 4'b0010, 4'b0010, 8'h40);
    for (int k = 0; k < 4; k++) write_row(1 + k, 1, 5, 4'b1100, k << 2, 8'h80 + k);
    write_row(5, 1, 3, 4'b0000, 4'b0000, 8'd7);   // loop count 7, no condition
    check_one("cjump taken",     9, 4'b0010, 1, 8'h40);
    check_one("cjump not taken", 9, 4'b1101, 0, 0);
    for (int k = 0; k < 4; k++) check_one("4-way", 5, (k << 2) | 1, 1, 8'h80 + k);
    check_one("loop count",      3, 4'b1010, 1, 7);
    // random programs
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < ROWS; r++)
        write_row(r, ($urandom_range(0, 3) != 0), $urandom_range(0, 15),
                  $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 255));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
