// One memory cell of the device under test: a D flip-flop with a clock
// enable and asynchronous set and reset terminals.
//
// The cell stores d on the rising clock edge when en is high, and holds its
// value otherwise. clr forces q to 0 and set forces q to 1 immediately; clr
// wins when both are high. Holding set high makes the cell stuck-at-1, and
// holding clr high makes it stuck-at-0. This is how faults are injected into
// the array to exercise the test algorithms. If clr is released while set is
// still held, q becomes 1 at the next clock edge rather than at once. q is the stored bit; in the
// board build it also lights the cell's LED.
//
// The D flip-flop with enable, set and reset follows the document. The
// asynchronous set/reset and the priority of clear over set are this
// design's choices.
module mem_cell (
  input  logic clk,
  input  logic clr,   // asynchronous reset terminal, active high
  input  logic set,   // asynchronous set terminal, active high
  input  logic en,    // write enable (row switch AND cell enable)
  input  logic d,     // data from the tester
  output logic q      // stored bit, drives the LED
);

  // set and reset share one asynchronous load; its value is 0 under reset.
  logic force_q;
  assign force_q = clr | set;

  always_ff @(posedge clk or posedge force_q) begin
    if (force_q) q <= ~clr;
    else if (en) q <= d;
  end

endmodule
