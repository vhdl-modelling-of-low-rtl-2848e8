// Operation sequencer for one March algorithm.
//
// After a one-cycle start pulse the engine walks the algorithm's elements in
// order (read from march_rom). Within an element it applies every operation
// of the element to one cell before moving to the next address, ascending or
// descending as the element says ("either" is walked ascending). It issues
// exactly one operation per clock cycle with no gaps, so an algorithm of
// complexity k*n takes k*ROWS*COLS cycles: the first operation appears in the
// cycle after start and op_last marks the final one.
//
// Cells are addressed linearly, index = row*COLS + col; op_row / op_col give
// the split address. op_write=1 means write op_value; op_write=0 means read
// and expect op_value. The engine does not look at the memory itself: the
// tester compares the reads. alg is sampled every cycle and must be held from
// the cycle after start until op_last (the tester keeps it in a register). A
// start pulse while running restarts the engine; the tester uses this to
// chain algorithms without an idle cycle.
//
// The per-cell operation order and the address orders follow the document;
// the one-operation-per-cycle timing and the interface are this design's.
module march_engine
  import mt_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned RBITS = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CBITS = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  march_alg_e       alg,
  output logic             busy,
  output logic             op_valid,
  output logic [RBITS-1:0] op_row,
  output logic [CBITS-1:0] op_col,
  output logic             op_write,
  output logic             op_value,
  output logic             op_last
);

  localparam int unsigned N    = ROWS * COLS;
  localparam int unsigned PBITS = (N > 1) ? $clog2(N) : 1;

  logic [2:0]       elem_q;
  logic [2:0]       opi_q;
  logic [PBITS-1:0] pos_q;
  logic             run_q;
  march_elem_t      e;
  logic [PBITS-1:0] idx;
  logic             op_end, pos_end;

  march_rom u_rom (.alg(alg), .elem(elem_q), .e(e));

  assign op_end  = (opi_q == e.nops - 3'd1);
  assign pos_end = (32'(pos_q) == N - 1);
  assign idx     = (e.dir == DIR_DOWN) ? PBITS'(N - 1 - 32'(pos_q)) : pos_q;

  assign busy     = run_q;
  assign op_valid = run_q;
  assign op_row   = RBITS'(32'(idx) / COLS);
  assign op_col   = CBITS'(32'(idx) % COLS);
  assign op_write = e.ops[opi_q].is_write;
  assign op_value = e.ops[opi_q].value;
  assign op_last  = run_q && op_end && pos_end && e.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      elem_q <= '0;
      opi_q  <= '0;
      pos_q  <= '0;
    end else if (start) begin
      run_q  <= 1'b1;
      elem_q <= '0;
      opi_q  <= '0;
      pos_q  <= '0;
    end else if (run_q) begin
      if (!op_end) begin
        opi_q <= opi_q + 3'd1;
      end else begin
        opi_q <= '0;
        if (!pos_end) begin
          pos_q <= pos_q + 1'b1;
        end else begin
          pos_q <= '0;
          if (e.last) run_q  <= 1'b0;
          else        elem_q <= elem_q + 3'd1;
        end
      end
    end
  end

endmodule
