// Unit test of mem_cell: enabled and disabled writes, asynchronous set and
// reset (taking effect between clock edges), reset winning over set, and a
// held set or reset acting as a stuck-at fault against writes. Compared with
// a reference bit the bench keeps itself.
`timescale 1ns/1ps
module tb_mem_cell;
  logic clk = 0, clr = 0, set = 0, en = 0, d = 0, q;
  int checks = 0, failures = 0;
  mem_cell dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref_q;
  initial begin
    clr = 1; #2; check(q == 0, "reset clears"); clr = 0; ref_q = 0;
    // random enabled / disabled writes
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom); d = 1'($urandom);
      @(posedge clk); #1;
      if (en) ref_q = d;
      check(q == ref_q, $sformatf("write %0d en=%0d d=%0d q=%0d", i, en, d, q));
    end
    // asynchronous set and reset between edges
    @(negedge clk); en = 0; #1 set = 1; #1 check(q == 1, "async set"); set = 0;
    #1 clr = 1; #1 check(q == 0, "async reset"); clr = 0;
    // reset wins over set
    @(negedge clk); set = 1; clr = 1; #1 check(q == 0, "reset wins"); clr = 0;
    @(posedge clk); #1 check(q == 1, "set after reset released, from the next edge");
    // held set: stuck-at-1 against writes of 0
    en = 1; d = 0;
    repeat (3) begin @(posedge clk); #1 check(q == 1, "stuck-at-1 holds"); end
    set = 0;
    @(posedge clk); #1 check(q == 0, "write after set released");
    // held reset: stuck-at-0 against writes of 1
    clr = 1; d = 1;
    repeat (3) begin @(posedge clk); #1 check(q == 0, "stuck-at-0 holds"); end
    clr = 0;
    @(posedge clk); #1 check(q == 1, "write after reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
