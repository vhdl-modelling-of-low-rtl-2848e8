// Low-cost memory fault detection testbed: tester, row decoder and a
// ROWS x COLS D flip-flop memory array.
//
// The tester runs a test program (zero-one scan plus any of eight March
// algorithms, repeated `loops` times) on the array. Its row address goes
// through the row decoder; within the selected row the per-cell enables pick
// the cells to write, standing in for a column decoder. Every cell's stored
// bit is brought out on led, as on the board where each flip-flop drives an
// LED. fault_set / fault_clr drive the set and reset terminals of each cell,
// so faults can be injected while the program runs. The tester reports a
// per-iteration and an accumulated fail map, the test time in cycles, and
// one log record per read for an external logger.
//
// Timing: a start pulse while idle launches the program; busy rises in the
// next cycle and done pulses when the last operation has been checked. See
// mem_tester for the exact cycle count. rst_n is an asynchronous active-low
// reset of the tester and clears every memory cell.
//
// The arrangement of tester, row decoder and flip-flop array follows the
// document; the default 4 x 4 array is the size of its hardware testbed. Port
// names and the log format are this design's own.
module mem_tester_top
  import mt_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned RBITS = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [7:0]                loops,
  input  logic                      run_scan,
  input  logic [NUM_ALGS-1:0]       march_mask,
  input  logic [ROWS-1:0][COLS-1:0] fault_set,
  input  logic [ROWS-1:0][COLS-1:0] fault_clr,
  output logic [ROWS-1:0][COLS-1:0] led,
  output logic                      busy,
  output logic                      done,
  output logic                      pass,
  output logic                      iter_done,
  output logic [7:0]                iter_num,
  output logic [ROWS-1:0][COLS-1:0] iter_fail_map,
  output logic [ROWS-1:0][COLS-1:0] fail_map,
  output logic [31:0]               test_cycles,
  output logic                      log_valid,
  output logic [31:0]               log_time,
  output phase_e                    log_phase,
  output logic [3:0]                log_test,
  output logic [ROWS-1:0][COLS-1:0] log_mask,
  output logic [ROWS-1:0][COLS-1:0] log_expected,
  output logic [ROWS-1:0][COLS-1:0] log_actual,
  output logic                      log_fail
);

  logic [RBITS-1:0]          row_addr;
  logic                      row_sel, row_all, we;
  logic [ROWS-1:0]           row_en;
  logic [ROWS-1:0][COLS-1:0] cell_en, wdata, q;

  mem_tester #(.ROWS(ROWS), .COLS(COLS)) u_tester (
    .clk, .rst_n, .start, .loops, .run_scan, .march_mask,
    .row_addr, .row_sel, .row_all, .we, .cell_en, .wdata, .q,
    .busy, .done, .pass, .iter_done, .iter_num, .iter_fail_map, .fail_map,
    .test_cycles, .log_valid, .log_time, .log_phase, .log_test, .log_mask,
    .log_expected, .log_actual, .log_fail
  );

  row_decoder #(.ROWS(ROWS)) u_rowdec (
    .addr(row_addr), .en(row_sel), .all_rows(row_all), .row_en(row_en)
  );

  mem_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .row_en, .we, .cell_en, .d(wdata),
    .fault_set, .fault_clr, .q
  );

  assign led = q;

endmodule
