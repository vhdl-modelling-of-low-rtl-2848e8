// End-to-end test of the memory tester testbed at its default 4 x 4 size.
//
// Runs complete test programs on the array and checks them against values
// the bench works out itself:
//   * fault-free: the full program (zero-one scan + MATS+, MATS++, March X,
//     March C, March C-, March Y) ten times; it must pass, take exactly
//     10*24 - 1 + 10*(5+6+6+11+10+8)*n cycles (first solid-zero write saved)
//     and produce the expected number of log records;
//   * all eight March algorithms once, cycle count sum(k)*n;
//   * stuck-at-1 (set terminal held) and stuck-at-0 (reset terminal held)
//     cells: every iteration must flag exactly that cell, and the failed cell
//     must then be skipped (disabled) for the rest of the iteration;
//   * an idempotent coupling fault (a rising aggressor sets a lower-address
//     victim), emulated by pulsing the victim's set terminal: MATS+ must miss
//     it and March C- must find it.
// It counts how often each mechanism happens (solid-zero write skip, failed
// cell disabled, descending walk, iterations, each background, each
// algorithm) and fails on any that never did. Per-iteration fail maps are
// printed as a datalog, '_' for a passing cell and 'X' for a failing one.
`timescale 1ns/1ps
module tb_mem_tester_top;
  import mt_pkg::*;

  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 4;
  localparam int unsigned N    = ROWS * COLS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] loops = 8'd1;
  logic run_scan = 1'b0;
  logic [7:0] march_mask = '0;
  logic [ROWS-1:0][COLS-1:0] fault_set = '0, fault_clr = '0;
  logic [ROWS-1:0][COLS-1:0] led, iter_fail_map, fail_map, log_mask, log_expected, log_actual;
  logic busy, done, pass, iter_done, log_valid, log_fail;
  logic [7:0] iter_num;
  logic [31:0] test_cycles, log_time;
  phase_e log_phase;
  logic [3:0] log_test;

  mem_tester_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ops per cell and reads per cell of each algorithm, in code order.
  function automatic int k_of(int a);
    int k[8] = '{5, 6, 6, 11, 10, 15, 8, 17};
    return k[a];
  endfunction
  function automatic int reads_of(int a);
    int r[8] = '{2, 3, 3, 6, 5, 4, 5, 6};
    return r[a];
  endfunction

  // ---------------------------------------------------------- monitors --
  int n_busy = 0, n_logs = 0, n_fail_logs = 0, n_iters = 0;
  int n_skip_disabled = 0, n_desc_walk = 0, n_solid0_skip = 0;
  int seen_bg[12] = '{default: 0};
  int seen_alg[8] = '{default: 0};
  logic [ROWS-1:0][COLS-1:0] iter_maps[$];

  always @(posedge clk) if (rst_n) begin
    if (busy) n_busy++;
    if (log_valid) begin
      n_logs++;
      if (log_fail) n_fail_logs++;
      if (log_phase == PH_SCAN) seen_bg[log_test]++;
      if (log_phase == PH_MARCH) begin
        seen_alg[log_test[2:0]]++;
        // a March read whose cell has failed before is not compared
        if (log_mask == '0) n_skip_disabled++;
      end
    end
    if (iter_done) begin
      n_iters++;
      iter_maps.push_back(iter_fail_map);
    end
  end

  // descending walks: the row decoder's selected row moving down
  logic [ROWS-1:0] prev_row_en = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.row_sel && !dut.row_all && prev_row_en != 0 &&
        $clog2(dut.u_rowdec.row_en) < $clog2(prev_row_en))
      n_desc_walk++;
    prev_row_en <= (dut.row_sel && !dut.row_all) ? dut.u_rowdec.row_en : '0;
  end

  // coupling-fault emulation: aggressor rising forces victim to 1
  bit cf_on = 0;
  localparam int AR = 2, AC = 3, VR = 0, VC = 1;   // victim below aggressor
  always @(posedge led[AR][AC]) if (cf_on) begin
    #1 fault_set[VR][VC] = 1'b1;
    #1 fault_set[VR][VC] = 1'b0;
  end

  task automatic run(input bit scan, input logic [7:0] mask, input int nl,
                     output int cycles);
    n_busy = 0;
    @(negedge clk);
    loops = 8'(nl); run_scan = scan; march_mask = mask; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);   // let the monitors see the final iter_done / done
    cycles = n_busy;
  endtask

  task automatic print_maps(int from);
    for (int i = from; i < iter_maps.size(); i++) begin
      $display("iteration %0d", i - from + 1);
      for (int r = 0; r < ROWS; r++) begin
        string s = "";
        for (int c = 0; c < COLS; c++) s = {s, iter_maps[i][r][c] ? "X " : "_ "};
        $display("  %s", s);
      end
    end
  endtask

  int cyc, exp_cyc, exp_logs, base;
  logic [ROWS-1:0][COLS-1:0] one;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. fault-free full program, ten iterations --------------------
    n_logs = 0; n_fail_logs = 0;
    base = n_iters;
    run(1'b1, 8'b0101_1111, 10, cyc);
    exp_cyc  = 10 * 24 - 1 + 10 * (5 + 6 + 6 + 11 + 10 + 8) * N;
    exp_logs = 10 * 12 + 10 * (2 + 3 + 3 + 6 + 5 + 5) * N;
    check(cyc == exp_cyc, $sformatf("fault-free cycles %0d exp %0d", cyc, exp_cyc));
    check(test_cycles == 32'(exp_cyc), $sformatf("test_cycles %0d exp %0d", test_cycles, exp_cyc));
    check(pass, "fault-free program passes");
    check(fail_map == '0, "fault-free fail map is empty");
    check(n_logs == exp_logs, $sformatf("log records %0d exp %0d", n_logs, exp_logs));
    check(n_fail_logs == 0, "no failing log record");
    check(n_iters - base == 10, "ten iterations reported");
    n_solid0_skip = (cyc == exp_cyc) ? 1 : 0;
    $display("full program, fault-free, 4x4: %0d cycles", cyc);

    // ---- 2. same program again: array no longer clear, no skip ----------
    run(1'b1, 8'b0000_0000, 1, cyc);
    check(cyc == 24, $sformatf("scan on a written array takes 24 cycles, got %0d", cyc));
    check(pass, "scan alone passes");

    // ---- 3. every algorithm once ----------------------------------------
    n_logs = 0;
    run(1'b0, 8'hFF, 1, cyc);
    exp_cyc = 0; exp_logs = 0;
    for (int a = 0; a < 8; a++) begin
      exp_cyc  += k_of(a) * N;
      exp_logs += reads_of(a) * N;
    end
    check(cyc == exp_cyc, $sformatf("all-algorithm cycles %0d exp %0d", cyc, exp_cyc));
    check(n_logs == exp_logs, $sformatf("all-algorithm logs %0d exp %0d", n_logs, exp_logs));
    check(pass, "all algorithms pass on a good array");

    // ---- 4. stuck-at-1 cell, three iterations --------------------------
    one = '0; one[1][2] = 1'b1;
    fault_set = one;
    base = iter_maps.size();
    run(1'b1, 8'b0101_1111, 3, cyc);
    check(!pass, "stuck-at-1 fails the program");
    check(fail_map == one, $sformatf("stuck-at-1 map %h", fail_map));
    for (int i = base; i < iter_maps.size(); i++)
      check(iter_maps[i] == one, $sformatf("stuck-at-1 iteration map %h", iter_maps[i]));
    check(iter_maps.size() - base == 3, "three iteration maps");
    print_maps(base);
    fault_set = '0;

    // ---- 5. stuck-at-0 cell, March C- only -----------------------------
    one = '0; one[3][0] = 1'b1;
    fault_clr = one;
    run(1'b0, 8'b0001_0000, 2, cyc);
    check(!pass, "stuck-at-0 fails March C-");
    check(fail_map == one, $sformatf("stuck-at-0 map %h", fail_map));
    fault_clr = '0;

    // ---- 6. coupling fault: MATS+ misses it, March C- finds it --------
    cf_on = 1;
    run(1'b0, 8'b0000_0001, 1, cyc);
    check(pass, "MATS+ does not see the idempotent coupling fault");
    run(1'b0, 8'b0001_0000, 1, cyc);
    one = '0; one[VR][VC] = 1'b1;
    check(!pass, "March C- detects the coupling fault");
    check(fail_map == one, $sformatf("coupling-fault map %h", fail_map));
    cf_on = 0;

    // ---- 7. empty program ends at once and passes ----------------------
    run(1'b0, 8'h00, 1, cyc);
    check(pass && cyc == 0, "empty program");

    // ---- mechanisms ----------------------------------------------------
    for (int b = 0; b < 12; b++) check(seen_bg[b] > 0, $sformatf("background %0d read", b));
    for (int a = 0; a < 8; a++)  check(seen_alg[a] > 0, $sformatf("algorithm %0d run", a));
    check(n_solid0_skip > 0, "solid-zero write skipped");
    check(n_skip_disabled > 0, "failed cell disabled");
    check(n_desc_walk > 0, "descending address walk");
    check(n_iters >= 10, "repeated iterations");
    $display("mechanisms: solid0-skip=%0d disabled-reads=%0d descending-steps=%0d iterations=%0d",
             n_solid0_skip, n_skip_disabled, n_desc_walk, n_iters);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
