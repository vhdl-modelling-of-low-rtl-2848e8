// Unit test of scan_engine (default 4 x 4): after start from a clear array
// the solid-zero write is skipped (23 cycles), otherwise every background is
// written then read (24 cycles); backgrounds come in order, images match
// the reference formula and op_last marks the final read.
`timescale 1ns/1ps
module tb_scan_engine;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, array_clean = 0;
  logic busy, op_valid, op_write, op_last;
  bg_pattern_e pattern;
  logic [3:0][3:0] image;
  scan_engine dut (.*);
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

  function automatic logic [3:0][3:0] ref_img(int pi);
    logic [3:0][3:0] m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        case (pi / 2)
          0: m[r][c] = 0;
          1: m[r][c] = ((r + c) % 2) == 1;
          2: m[r][c] = (r % 2) == 1;
          3: m[r][c] = ((r / 2) % 2) == 1;
          4: m[r][c] = (c % 2) == 1;
          default: m[r][c] = ((c / 2) % 2) == 1;
        endcase
        m[r][c] ^= (pi % 2 == 1);
      end
    return m;
  endfunction

  task automatic run(bit clean);
    int cyc = 0, bad = 0;
    @(negedge clk); array_clean = clean; start = 1;
    @(negedge clk); start = 0;
    for (int pi = 0; pi < 12; pi++) begin
      if (!(clean && pi == 0)) begin
        if (!(op_valid && op_write && pattern == bg_pattern_e'(pi) && image == ref_img(pi) && !op_last)) bad++;
        @(negedge clk); cyc++;
      end
      if (!(op_valid && !op_write && pattern == bg_pattern_e'(pi) && image == ref_img(pi) &&
            op_last == (pi == 11))) bad++;
      @(negedge clk); cyc++;
    end
    check(bad == 0, $sformatf("scan clean=%0d: %0d wrong cycles", clean, bad));
    check(cyc == (clean ? 23 : 24), $sformatf("scan clean=%0d took %0d cycles", clean, cyc));
    check(!busy, "idle after scan");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
