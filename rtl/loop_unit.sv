// loop_unit: loop counter, decrementer and zero detect of the microsequencer.
//
// The counter holds the remaining pass count of the innermost open loop. A
// Loop microinstruction loads it with the loop count taken from the IFPU
// (load). Each End-loop either decrements it (dec) when another pass
// follows, or, on loop exit, restores the count of the enclosing loop that
// was saved on the stack (restore). The zero detect looks at the
// decremented value, so zero is high in the last pass: End-loop then exits
// instead of jumping back. The result goes to the IFU as feedback.
//
// The source design shows a loop register, a decrementer, a loop counter
// and a zero detector whose output goes to the IFU, and defines End-loop as
// "zero-test, jump or continue". Folding the loop register and the loop
// counter into one count register, testing the decremented value and
// saving outer counts on the stack are this design's choices. A count of N
// (N >= 1) runs the loop body N times; a count of 0 is not meaningful.
//
// Timing: count changes at the rising clock edge; zero is combinational
// from count. Priority: restore, then load, then dec. Asynchronous
// active-low reset clears the counter.
module loop_unit #(
  parameter int unsigned W = cmc_pkg::DEF_ADDR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         dec,
  input  logic         restore,
  input  logic [W-1:0] restore_val,
  output logic [W-1:0] count,
  output logic         zero
);

  logic [W-1:0] dec_val;

  assign dec_val = count - W'(1);      // decrementer
  assign zero    = (dec_val == '0);    // zero detect, to the IFU

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (restore) count <= restore_val;
    else if (load)    count <= load_val;
    else if (dec)     count <= dec_val;
  end

endmodule
