// Sequencer of the zero-one scan test.
//
// For each of the twelve data backgrounds, in the order of
// mt_pkg::bg_pattern_e, the engine spends one cycle writing the whole
// background into the array at once (op_write=1) and one cycle reading the
// whole array back at once (op_write=0) for comparison with the same image.
// The time therefore does not depend on the array size: 24 cycles, or 23
// when array_clean is high at start, because the array is then known to hold
// all zeros and the write of the first background (solid zero) is skipped.
//
// After a one-cycle start pulse the first operation appears in the next
// cycle; op_last marks the final read. image is the current background, from
// bg_pattern_gen. A start pulse while running restarts the scan.
//
// The twelve backgrounds, the parallel write-then-read and the saved write
// for solid zero follow the document; the interface is this design's.
module scan_engine
  import mt_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      array_clean,
  output logic                      busy,
  output logic                      op_valid,
  output logic                      op_write,
  output bg_pattern_e               pattern,
  output logic [ROWS-1:0][COLS-1:0] image,
  output logic                      op_last
);

  logic        run_q;
  logic        wr_q;      // 1: write phase of the current background
  bg_pattern_e pat_q;

  bg_pattern_gen #(.ROWS(ROWS), .COLS(COLS)) u_bg (.pattern(pat_q), .image(image));

  assign busy     = run_q;
  assign op_valid = run_q;
  assign op_write = wr_q;
  assign pattern  = pat_q;
  assign op_last  = run_q && !wr_q && (pat_q == BG_DCOL_N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      wr_q  <= 1'b1;
      pat_q <= BG_SOLID0;
    end else if (start) begin
      run_q <= 1'b1;
      pat_q <= BG_SOLID0;
      wr_q  <= !array_clean;
    end else if (run_q) begin
      if (wr_q) begin
        wr_q <= 1'b0;
      end else begin
        wr_q <= 1'b1;
        if (pat_q == BG_DCOL_N) run_q <= 1'b0;
        else                    pat_q <= bg_pattern_e'(pat_q + 4'd1);
      end
    end
  end

endmodule
