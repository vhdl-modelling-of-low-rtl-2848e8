// Unit test of mem_array (default 4 x 4): random writes through row enables,
// per-cell enables and the write strobe, whole-array broadcast writes,
// asynchronous fault set/reset of single cells and the global reset, all
// compared with a reference array kept by the bench.
`timescale 1ns/1ps
module tb_mem_array;
  localparam int R = 4, C = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [R-1:0] row_en = '0;
  logic [R-1:0][C-1:0] cell_en = '0, d = '0, fault_set = '0, fault_clr = '0, q;
  logic [R-1:0][C-1:0] ref_q;
  int checks = 0, failures = 0;
  mem_array dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 check(q == '0, "reset clears array");
    rst_n = 1; ref_q = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 3) != 0);
      row_en = (i % 5 == 0) ? '1 : R'(1 << $urandom_range(0, R - 1));
      cell_en = (R*C)'($urandom);
      d = (R*C)'($urandom);
      @(posedge clk); #1;
      if (we)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if (row_en[r] && cell_en[r][c]) ref_q[r][c] = d[r][c];
      check(q == ref_q, $sformatf("cycle %0d q=%h ref=%h", i, q, ref_q));
    end
    // fault injection on single cells, asynchronously
    @(negedge clk); we = 0;
    fault_set[2][1] = 1; #1; ref_q[2][1] = 1; check(q == ref_q, "fault set one cell");
    fault_set[2][1] = 0;
    fault_clr[0][3] = 1; #1; ref_q[0][3] = 0; check(q == ref_q, "fault reset one cell");
    // a held reset blocks writes to that cell only
    @(negedge clk); we = 1; row_en = '1; cell_en = '1; d = '1;
    @(posedge clk); #1; ref_q = '1; ref_q[0][3] = 0; check(q == ref_q, "held reset blocks one cell");
    fault_clr = '0; we = 0;
    rst_n = 0; #1 check(q == '0, "global reset"); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
