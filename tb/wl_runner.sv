// Workload runner used by tb_workloads: one mem_tester_top of the given size
// runs the document's evaluated programs and checks them.
//   1. zero-one scan alone, ten iterations: 10*24 - 1 cycles whatever the
//      size (the write of the very first solid zero is saved);
//   2. each of MATS+, MATS++, March X, March C, March C-, March Y alone, ten
//      iterations: 10*k*n cycles;
//   3. the combined scan + MATS+ + March C- program that covers all faults,
//      ten iterations;
//   4. with DATALOG set, five iterations of program 3 on a memory whose odd
//      columns become stuck-at-1 from the fourth iteration on; the fail maps
//      must show those columns failing only in iterations 4 and 5, and are
//      printed as a datalog ('_' pass, 'X' fail).
// All runs must pass (1-3) and take exactly the computed number of cycles.
`timescale 1ns/1ps
module wl_runner #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter bit          DATALOG = 1'b0
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import mt_pkg::*;
  localparam int N = ROWS * COLS;

  logic clk = 0, rst_n = 0, start = 0, run_scan = 0;
  logic [7:0] loops = 1, march_mask = 0;
  logic [ROWS-1:0][COLS-1:0] fault_set = '0, fault_clr = '0;
  logic [ROWS-1:0][COLS-1:0] led, iter_fail_map, fail_map, log_mask, log_expected, log_actual;
  logic busy, done, pass, iter_done, log_valid, log_fail;
  logic [7:0] iter_num;
  logic [31:0] test_cycles, log_time;
  phase_e log_phase;
  logic [3:0] log_test;

  mem_tester_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0dx%0d: %s", ROWS, COLS, what); end
  endtask

  logic [ROWS-1:0][COLS-1:0] maps[$];
  int n_iter_done = 0;
  always @(posedge clk) if (iter_done) begin
    maps.push_back(iter_fail_map);
    n_iter_done++;
  end

  // odd columns stuck-at-1 from the fourth iteration on
  bit inject = 0;
  always @(posedge clk)
    if (inject && n_iter_done >= 3)
      for (int r = 0; r < ROWS; r++)
        for (int c = 1; c < COLS; c += 2) fault_set[r][c] <= 1'b1;

  task automatic run(bit scan, logic [7:0] mask, int nl, int exp_cycles, string name);
    @(negedge clk);
    loops = 8'(nl); run_scan = scan; march_mask = mask; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    if (exp_cycles >= 0) begin
      check(pass, {name, " passes"});
      check(test_cycles == 32'(exp_cycles),
            $sformatf("%s: %0d cycles, expected %0d", name, test_cycles, exp_cycles));
    end
    $display("%0dx%0d %-22s %0d iterations: %0d cycles, %s", ROWS, COLS, name, nl,
             test_cycles, pass ? "pass" : "FAIL");
  endtask

  int ks[6] = '{5, 6, 6, 11, 10, 8};
  int codes[6] = '{0, 1, 2, 3, 4, 6};
  string names[6] = '{"MATS+", "MATS++", "March X", "March C", "March C-", "March Y"};

  initial begin
    checks = 0; failures = 0; finished = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 8'h00, 10, 10 * 24 - 1, "zero-one scan");
    for (int i = 0; i < 6; i++)
      run(0, 8'(1 << codes[i]), 10, 10 * ks[i] * N, names[i]);
    run(1, 8'b0001_0001, 10, 10 * (24 + 15 * N), "scan+MATS+ +March C-");
    if (DATALOG) begin
      int base;
      logic [ROWS-1:0][COLS-1:0] odd;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) odd[r][c] = (c % 2 == 1);
      n_iter_done = 0;
      base = maps.size();
      inject = 1;
      run(1, 8'b0001_0001, 5, -1, "datalog run");
      check(!pass, "datalog run fails");
      check(maps.size() - base == 5, "five iteration maps");
      for (int i = 0; i < 5; i++) begin
        check(maps[base + i] == (i >= 3 ? odd : '0), $sformatf("iteration %0d map", i + 1));
        for (int r = 0; r < ROWS; r++) begin
          string s;
          s = "";
          for (int c = 0; c < COLS; c++) s = {s, maps[base + i][r][c] ? "X " : "_ "};
          $display("  %s", s);
        end
        $display("");
      end
      $display("Total test time = %0d cycles", test_cycles);
    end
    finished = 1;
  end
endmodule
