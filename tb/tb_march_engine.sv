// Unit test of march_engine: for every algorithm, on the default 4 x 4 array
// and on a 3 x 5 array, the issued operations must equal the sequence built
// from the reference text table, one per cycle starting the cycle after
// start, take exactly k*n cycles and end with op_last. Also checks that a
// start on the op_last cycle chains the next algorithm with no gap.
`timescale 1ns/1ps
module tb_march_engine;
  import mt_pkg::*;
  import march_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;
  march_alg_e alg = ALG_MATS_P;
  logic busy_a, v_a, w_a, val_a, last_a;
  logic [1:0] r_a; logic [1:0] c_a;
  logic busy_b, v_b, w_b, val_b, last_b;
  logic [1:0] r_b; logic [2:0] c_b;

  march_engine dut_a (.clk, .rst_n, .start(start_a), .alg, .busy(busy_a), .op_valid(v_a),
                      .op_row(r_a), .op_col(c_a), .op_write(w_a), .op_value(val_a), .op_last(last_a));
  march_engine #(.ROWS(3), .COLS(5)) dut_b (.clk, .rst_n, .start(start_b), .alg, .busy(busy_b),
                      .op_valid(v_b), .op_row(r_b), .op_col(c_b), .op_write(w_b), .op_value(val_b), .op_last(last_b));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run algorithm a on instance which (0: 4x4, 1: 3x5) and compare.
  task automatic run_one(int a, int which);
    ref_op_t exp[$];
    int unsigned n = which ? 15 : 16;
    int unsigned cols = which ? 5 : 4;
    int bad = 0;
    sequence_of(a, n, exp);
    @(negedge clk);
    alg = march_alg_e'(a);
    if (which) start_b = 1; else start_a = 1;
    @(negedge clk);
    start_a = 0; start_b = 0;
    foreach (exp[i]) begin
      logic v, w, val, last;
      int unsigned idx;
      v    = which ? v_b : v_a;
      w    = which ? w_b : w_a;
      val  = which ? val_b : val_a;
      last = which ? last_b : last_a;
      idx  = which ? r_b * cols + c_b : r_a * cols + c_a;
      if (!v || w != exp[i].wr || val != exp[i].val || idx != exp[i].idx ||
          last != (i == exp.size() - 1)) begin
        if (bad < 3) $display("  alg %0d inst %0d op %0d: got v=%0d idx=%0d w=%0d val=%0d last=%0d exp idx=%0d w=%0d val=%0d",
                              a, which, i, v, idx, w, val, last, exp[i].idx, exp[i].wr, exp[i].val);
        bad++;
      end
      @(negedge clk);
    end
    check(bad == 0, $sformatf("alg %0d on %s: %0d wrong ops", a, which ? "3x5" : "4x4", bad));
    check(exp.size() == march_complexity(march_alg_e'(a)) * n,
          $sformatf("alg %0d length %0d = k*n", a, exp.size()));
    check(!(which ? busy_b : busy_a), $sformatf("alg %0d idle after last op", a));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      run_one(a, 0);
      run_one(a, 1);
    end
    // chaining: restart on the op_last cycle, no idle cycle in between
    begin
      int cyc = 0;
      @(negedge clk); alg = ALG_MATS_P; start_a = 1;
      @(negedge clk); start_a = 0;
      while (!last_a) begin @(negedge clk); cyc++; end
      start_a = 1; alg = ALG_MARCH_X;   // engine reads alg from the next cycle on
      @(negedge clk); start_a = 0; cyc++;
      check(v_a && w_a && r_a == 0 && c_a == 0, "chained algorithm starts at once");
      while (!last_a) begin @(negedge clk); cyc++; end
      check(cyc + 1 == (5 + 6) * 16, $sformatf("chained MATS+ and March X take %0d cycles", cyc + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
