// The device under test: a ROWS x COLS grid of D flip-flop memory cells.
//
// Every cell has its own data input d[r][c] from the tester, its own enable
// cell_en[r][c], and set/reset terminals for fault injection. A cell loads
// its data input on the clock edge only when its row is selected by the row
// decoder (row_en[r]) and its own enable is high: the per-row gating stands
// for the switching transistors that connect a selected row's flip-flops,
// which replace a column decoder. Every cell's stored bit is visible at
// q[r][c] (the LED of that cell); reads therefore take no clock cycle.
//
// rst_n clears the whole array asynchronously (power-on state all zeros).
// fault_set / fault_clr force single cells to 1 / 0 to emulate faults.
//
// The grid of D flip-flops, the per-cell data inputs, enables and set/reset
// terminals, and the row-level switching follow the document. The write
// strobe we, the global reset and the flat packed-array ports are this
// design's choices.
module mem_array #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ROWS-1:0]           row_en,     // from the row decoder
  input  logic                      we,         // write strobe from the tester
  input  logic [ROWS-1:0][COLS-1:0] cell_en,    // per-cell enable
  input  logic [ROWS-1:0][COLS-1:0] d,          // per-cell data input
  input  logic [ROWS-1:0][COLS-1:0] fault_set,  // set terminals
  input  logic [ROWS-1:0][COLS-1:0] fault_clr,  // reset terminals
  output logic [ROWS-1:0][COLS-1:0] q           // stored bits / LEDs
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    // switching transistors of row r: pass the enables only when selected
    logic [COLS-1:0] row_sw;
    assign row_sw = {COLS{row_en[r] & we}} & cell_en[r];

    for (genvar c = 0; c < COLS; c++) begin : g_col
      mem_cell u_cell (
        .clk (clk),
        .clr (~rst_n | fault_clr[r][c]),
        .set (fault_set[r][c]),
        .en  (row_sw[c]),
        .d   (d[r][c]),
        .q   (q[r][c])
      );
    end
  end

endmodule
