// Unit test of mem_tester on a 2 x 4 array modelled inside the bench, so
// the tester's accesses can be checked directly:
//   * scan writes select all rows, March accesses one row and one column;
//   * cycle counts of scan-only, one-algorithm and mixed programs over
//     several iterations, including the saved solid-zero write after reset;
//   * a stuck-at-1 and a stuck-at-0 cell in the bench memory are reported in
//     every iteration map, the failed cell is then no longer enabled, and
//     pass / fail_map / iter_num behave;
//   * every log record's expected data matches what the bench wrote last.
`timescale 1ns/1ps
module tb_mem_tester;
  import mt_pkg::*;
  localparam int R = 2, C = 4, N = R * C;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, run_scan = 0;
  logic [7:0] loops = 1, march_mask = 0;
  logic [0:0] row_addr;
  logic row_sel, row_all, we;
  logic [R-1:0][C-1:0] cell_en, wdata, q, iter_fail_map, fail_map, log_mask, log_expected, log_actual;
  logic busy, done, pass, iter_done, log_valid, log_fail;
  logic [7:0] iter_num;
  logic [31:0] test_cycles, log_time;
  phase_e log_phase;
  logic [3:0] log_test;

  mem_tester #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bench memory with stuck bits
  logic [R-1:0][C-1:0] mem = '0, sa1 = '0, sa0 = '0;
  assign q = (mem | sa1) & ~sa0;
  int bad_access = 0, n_disabled_write = 0, n_iter = 0, bad_log = 0;
  logic [R-1:0][C-1:0] shadow = '0;   // what the tester last wrote
  logic [R-1:0][C-1:0] failed_now = '0;
  always @(posedge clk) if (rst_n) begin
    // iter_done shows in the first cycle of the next iteration
    if (iter_done) begin n_iter++; failed_now = '0; end
    if (busy && row_sel) begin
      if (log_phase == PH_SCAN && !row_all) bad_access++;
      if (log_phase == PH_MARCH && (row_all || $countones(cell_en[row_addr]) > 1)) bad_access++;
    end
    if (we)
      for (int r = 0; r < R; r++)
        if (row_all || row_addr == 1'(r))
          for (int c = 0; c < C; c++)
            if (cell_en[r][c]) begin
              mem[r][c] <= wdata[r][c];
              shadow[r][c] = wdata[r][c];
            end
    if (we && (cell_en & failed_now) != '0) n_disabled_write++;
    if (log_valid)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          if (log_mask[r][c] && log_expected[r][c] != shadow[r][c]) bad_log++;
    if (log_valid && log_fail) failed_now = failed_now | (log_mask & (log_actual ^ log_expected));
  end

  task automatic run(bit scan, logic [7:0] mask, int nl, output int cyc);
    @(negedge clk);
    loops = 8'(nl); run_scan = scan; march_mask = mask; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);   // let the monitor see the final iter_done
  endtask

  int cyc, it0;
  logic [R-1:0][C-1:0] m;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 8'h00, 1, cyc);
    check(cyc == 23 && test_cycles == 23, $sformatf("first scan %0d/%0d cycles, exp 23", cyc, test_cycles));
    check(pass, "first scan passes");
    run(1, 8'h00, 3, cyc);
    check(cyc == 72, $sformatf("three scans %0d cycles, exp 72", cyc));
    run(0, 8'b0001_0000, 2, cyc);
    check(cyc == 2 * 10 * N, $sformatf("March C- x2 %0d cycles", cyc));
    run(1, 8'b1000_0001, 2, cyc);
    check(cyc == 2 * (24 + 5 * N + 17 * N), $sformatf("scan+MATS+ +March B x2 %0d cycles", cyc));
    check(pass, "good memory passes");
    // stuck-at-1 and stuck-at-0
    sa1[0][2] = 1; sa0[1][1] = 1;
    it0 = n_iter;
    run(1, 8'b0100_0010, 4, cyc);
    m = '0; m[0][2] = 1; m[1][1] = 1;
    check(!pass, "faulty memory fails");
    check(fail_map == m, $sformatf("fail map %h", fail_map));
    check(iter_fail_map == m, $sformatf("last iteration map %h", iter_fail_map));
    check(iter_num == 3, $sformatf("last iteration number %0d", iter_num));
    check(n_iter - it0 == 4, "four iterations");
    check(n_disabled_write == 0, "failed cells are never written again in the iteration");
    // stuck-at-1 only seen by March: scan off
    sa1 = '0; sa0 = '0; sa1[1][3] = 1;
    run(0, 8'b0000_0001, 1, cyc);
    m = '0; m[1][3] = 1;
    check(!pass && fail_map == m, "MATS+ finds stuck-at-1");
    sa1 = '0;
    run(0, 8'h00, 5, cyc);
    check(pass, "empty mask passes");
    run(1, 8'h01, 0, cyc);
    check(pass, "zero loops passes");
    check(bad_access == 0, $sformatf("%0d bad array accesses", bad_access));
    check(bad_log == 0, $sformatf("%0d log records with wrong expected data", bad_log));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
