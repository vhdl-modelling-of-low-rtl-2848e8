// Memory tester: runs a test program on the flip-flop memory array and
// records which cells fail.
//
// A program is the zero-one scan (run_scan) followed by the March algorithms
// whose bits are set in march_mask, lowest code first (see
// mt_pkg::march_alg_e). A start pulse runs the program `loops` times; the
// tests follow each other without idle cycles, so the test time is exactly
//   loops * (24*run_scan + sum over selected algorithms of k*ROWS*COLS)
// cycles, less one when the first scan starts on an array known to be clear
// (after reset, before any write). test_cycles holds that count once done.
//
// Access to the array: for a scan operation every row is selected (row_all)
// and the whole background is written or read at once. For a March operation
// the row decoder selects row_addr and cell_en enables the one addressed
// column in it; the data bit is driven on every column. The array's stored
// bits come back on q and are compared in the same cycle.
//
// Fail bookkeeping: a read whose data differs from the expected value marks
// the cell failed for the current iteration. A failed cell is disabled (its
// enable is dropped and it is no longer compared) while the other cells carry
// on. At the end of each iteration iter_done pulses with that iteration's
// fail map on iter_fail_map, which is then cleared; fail_map accumulates over
// all iterations and pass is high after done when no cell ever failed.
//
// Every read also produces one log record (log_*) with the time (cycle
// count since reset), the test, the compared cells, the expected data and
// the data read, for an external logger to write to a file.
//
// The test algorithms, the repetition, the per-cell enables, disabling a
// failed cell and the per-iteration pass/fail map follow the document. The
// program encoding, the zero-gap sequencing, clearing the map per iteration
// and the log record format are this design's choices.
module mem_tester
  import mt_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned RBITS = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CBITS = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // program
  input  logic                      start,
  input  logic [7:0]                loops,
  input  logic                      run_scan,
  input  logic [NUM_ALGS-1:0]       march_mask,
  // memory array side
  output logic [RBITS-1:0]          row_addr,
  output logic                      row_sel,     // enable of the row decoder
  output logic                      row_all,     // select every row
  output logic                      we,
  output logic [ROWS-1:0][COLS-1:0] cell_en,
  output logic [ROWS-1:0][COLS-1:0] wdata,
  input  logic [ROWS-1:0][COLS-1:0] q,
  // status
  output logic                      busy,
  output logic                      done,        // one-cycle pulse
  output logic                      pass,
  output logic                      iter_done,   // one-cycle pulse
  output logic [7:0]                iter_num,    // iteration just finished
  output logic [ROWS-1:0][COLS-1:0] iter_fail_map,
  output logic [ROWS-1:0][COLS-1:0] fail_map,
  output logic [31:0]               test_cycles,
  // log record, one per read
  output logic                      log_valid,
  output logic [31:0]               log_time,
  output phase_e                    log_phase,
  output logic [3:0]                log_test,    // background or algorithm code
  output logic [ROWS-1:0][COLS-1:0] log_mask,
  output logic [ROWS-1:0][COLS-1:0] log_expected,
  output logic [ROWS-1:0][COLS-1:0] log_actual,
  output logic                      log_fail
);

  typedef logic [ROWS-1:0][COLS-1:0] map_t;

  // ---------------------------------------------------------------- state --
  phase_e             phase_q;
  march_alg_e         alg_q;
  logic [7:0]         loops_q, iter_q;
  logic               scan_q;
  logic [NUM_ALGS-1:0] mask_q;
  map_t               iter_fail_q, cum_fail_q;
  logic               clean_q;
  logic [31:0]        now_q;

  // ------------------------------------------------------------- engines --
  logic               scan_start, march_start;
  march_alg_e         march_alg;
  logic               s_valid, s_write, s_last, s_busy;
  bg_pattern_e        s_pat;
  map_t               s_image;
  logic               m_valid, m_write, m_value, m_last, m_busy;
  logic [RBITS-1:0]   m_row;
  logic [CBITS-1:0]   m_col;

  scan_engine #(.ROWS(ROWS), .COLS(COLS)) u_scan (
    .clk, .rst_n, .start(scan_start), .array_clean(clean_q),
    .busy(s_busy), .op_valid(s_valid), .op_write(s_write),
    .pattern(s_pat), .image(s_image), .op_last(s_last)
  );

  march_engine #(.ROWS(ROWS), .COLS(COLS)) u_march (
    .clk, .rst_n, .start(march_start), .alg(alg_q),
    .busy(m_busy), .op_valid(m_valid), .op_row(m_row), .op_col(m_col),
    .op_write(m_write), .op_value(m_value), .op_last(m_last)
  );

  // First selected algorithm with code >= from; found=0 when none is left.
  function automatic logic [3:0] next_alg(logic [NUM_ALGS-1:0] mask, int unsigned from);
    for (int unsigned a = 0; a < NUM_ALGS; a++)
      if (a >= from && mask[a]) return {1'b1, 3'(a)};
    return 4'b0;
  endfunction

  // ------------------------------------------------------- array access --
  map_t   col_hit, exp_img, cmp_mask, new_fail, fail_next;
  logic   is_read;

  always_comb begin
    row_addr = '0;
    row_sel  = 1'b0;
    row_all  = 1'b0;
    we       = 1'b0;
    cell_en  = '0;
    wdata    = '0;
    exp_img  = '0;
    cmp_mask = '0;
    is_read  = 1'b0;
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        col_hit[r][c] = (32'(m_col) == c);

    if (phase_q == PH_SCAN && s_valid) begin
      row_sel  = 1'b1;
      row_all  = 1'b1;
      we       = s_write;
      cell_en  = ~iter_fail_q;
      wdata    = s_image;
      exp_img  = s_image;
      is_read  = !s_write;
      cmp_mask = s_write ? '0 : ~iter_fail_q;
    end else if (phase_q == PH_MARCH && m_valid) begin
      row_addr = m_row;
      row_sel  = 1'b1;
      we       = m_write;
      cell_en  = col_hit & ~iter_fail_q;
      wdata    = {(ROWS*COLS){m_value}};
      exp_img  = {(ROWS*COLS){m_value}};
      is_read  = !m_write;
      if (!m_write)
        for (int unsigned r = 0; r < ROWS; r++)
          cmp_mask[r] = (32'(m_row) == r) ? (col_hit[r] & ~iter_fail_q[r]) : '0;
    end
    new_fail  = cmp_mask & (q ^ exp_img);
    fail_next = iter_fail_q | new_fail;
  end

  // ---------------------------------------------------------- sequencing --
  logic       test_end, iter_end;
  logic [3:0] nxt;
  logic [3:0] first_alg;

  assign first_alg = next_alg(mask_q, 0);
  assign test_end  = (phase_q == PH_SCAN && s_last) || (phase_q == PH_MARCH && m_last);
  always_comb begin
    if (phase_q == PH_SCAN) nxt = first_alg;
    else                    nxt = next_alg(mask_q, 32'(alg_q) + 1);
  end
  assign iter_end = test_end && !nxt[3];

  // Starting a new iteration: scan first if selected, else the first algorithm.
  logic launch_prog;   // begin the program (from start or next iteration)
  logic more_iters;
  logic [3:0] start_alg;

  assign more_iters  = (iter_q + 8'd1 < loops_q);
  assign launch_prog = (phase_q == PH_IDLE) ? 1'b0 : (iter_end && more_iters);
  assign start_alg   = next_alg(march_mask, 0);

  always_comb begin
    scan_start  = 1'b0;
    march_start = 1'b0;
    march_alg   = march_alg_e'(nxt[2:0]);
    if (phase_q == PH_IDLE) begin
      if (start && loops != 0) begin
        scan_start  = run_scan;
        march_start = !run_scan && start_alg[3];
        march_alg   = march_alg_e'(start_alg[2:0]);
      end
    end else if (test_end) begin
      if (nxt[3]) begin
        march_start = 1'b1;
      end else if (launch_prog) begin
        scan_start  = scan_q;
        march_start = !scan_q;
        march_alg   = march_alg_e'(first_alg[2:0]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q       <= PH_IDLE;
      alg_q         <= ALG_MATS_P;
      loops_q       <= '0;
      iter_q        <= '0;
      scan_q        <= 1'b0;
      mask_q        <= '0;
      iter_fail_q   <= '0;
      cum_fail_q    <= '0;
      clean_q       <= 1'b1;
      now_q         <= '0;
      test_cycles   <= '0;
      done          <= 1'b0;
      pass          <= 1'b0;
      iter_done     <= 1'b0;
      iter_num      <= '0;
      iter_fail_map <= '0;
    end else begin
      now_q     <= now_q + 32'd1;
      done      <= 1'b0;
      iter_done <= 1'b0;
      if (we) clean_q <= 1'b0;

      if (phase_q == PH_IDLE) begin
        if (start) begin
          loops_q     <= loops;
          scan_q      <= run_scan;
          mask_q      <= march_mask;
          iter_q      <= '0;
          iter_fail_q <= '0;
          cum_fail_q  <= '0;
          test_cycles <= '0;
          pass        <= 1'b0;
          if (loops == 0 || (!run_scan && !start_alg[3])) begin
            done <= 1'b1;           // empty program
            pass <= 1'b1;
          end else if (run_scan) begin
            phase_q <= PH_SCAN;
          end else begin
            phase_q <= PH_MARCH;
            alg_q   <= march_alg_e'(start_alg[2:0]);
          end
        end
      end else begin
        test_cycles <= test_cycles + 32'd1;
        iter_fail_q <= fail_next;
        if (march_start) begin
          phase_q <= PH_MARCH;
          alg_q   <= march_alg;
        end else if (scan_start) begin
          phase_q <= PH_SCAN;
        end
        if (iter_end) begin
          iter_done     <= 1'b1;
          iter_num      <= iter_q;
          iter_fail_map <= fail_next;
          cum_fail_q    <= cum_fail_q | fail_next;
          iter_fail_q   <= '0;
          iter_q        <= iter_q + 8'd1;
          if (!more_iters) begin
            phase_q <= PH_IDLE;
            done    <= 1'b1;
            pass    <= ((cum_fail_q | fail_next) == '0);
          end
        end
      end
    end
  end

  assign busy     = (phase_q != PH_IDLE);
  assign fail_map = cum_fail_q;

  // ------------------------------------------------------------------ log --
  assign log_valid    = busy && is_read;
  assign log_time     = now_q;
  assign log_phase    = phase_q;
  assign log_test     = (phase_q == PH_SCAN) ? 4'(s_pat) : {1'b0, alg_q};
  assign log_mask     = cmp_mask;
  assign log_expected = exp_img;
  assign log_actual   = q;
  assign log_fail     = (new_fail != '0);

  // ----------------------------------------------------------- assertions --
  // Exactly one engine drives the array while the tester is busy.
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (s_busy ^ m_busy));
  // A March operation selects one row and compares at most one cell.
  a_march_one_cell: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == PH_MARCH) |-> (!row_all && $onehot0(cmp_mask)));
  // The phase register always names the engine that is running.
  a_phase_matches: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> ((phase_q == PH_SCAN) == s_busy));

endmodule
