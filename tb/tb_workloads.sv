// The evaluated workloads: the zero-one scan, six March algorithms and the
// combined full-coverage program, each repeated ten times, on 4 x 4, 8 x 8
// and 16 x 16 arrays (one wl_runner per size, run side by side). The 8 x 8
// runner also produces a five-iteration datalog with injected failures.
`timescale 1ns/1ps
module tb_workloads;
  logic f4, f8, f16;
  int c4, c8, c16, x4, x8, x16;

  wl_runner #(.ROWS(4),  .COLS(4))                 r4  (.finished(f4),  .checks(c4),  .failures(x4));
  wl_runner #(.ROWS(8),  .COLS(8), .DATALOG(1'b1)) r8  (.finished(f8),  .checks(c8),  .failures(x8));
  wl_runner #(.ROWS(16), .COLS(16))                r16 (.finished(f16), .checks(c16), .failures(x16));

  int wd_failures = 0;
  initial begin
    #20ms;
    wd_failures = 1;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16, x4 + x8 + x16 + wd_failures);
    $finish;
  end

  initial begin
    #1;
    wait (f4 && f8 && f16);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16, x4 + x8 + x16);
    $finish;
  end
endmodule
