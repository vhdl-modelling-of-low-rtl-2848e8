// Unit test of row_decoder: exhaustive over address, enable and the
// all-rows broadcast, for the 3-to-8 size and the default size.
`timescale 1ns/1ps
module tb_row_decoder;
  int checks = 0, failures = 0;
  logic [2:0] a8;  logic en8, all8;  logic [7:0] r8;
  logic [1:0] a4;  logic en4, all4;  logic [3:0] r4;
  row_decoder #(.ROWS(8)) dut8 (.addr(a8), .en(en8), .all_rows(all8), .row_en(r8));
  row_decoder             dut4 (.addr(a4), .en(en4), .all_rows(all4), .row_en(r4));

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
    for (int e = 0; e < 2; e++)
      for (int b = 0; b < 2; b++) begin
        for (int a = 0; a < 8; a++) begin
          a8 = 3'(a); en8 = 1'(e); all8 = 1'(b); #1;
          check(r8 == (e ? (b ? 8'hFF : 8'(1 << a)) : 8'h00),
                $sformatf("8 rows a=%0d en=%0d all=%0d got %b", a, e, b, r8));
        end
        for (int a = 0; a < 4; a++) begin
          a4 = 2'(a); en4 = 1'(e); all4 = 1'(b); #1;
          check(r4 == (e ? (b ? 4'hF : 4'(1 << a)) : 4'h0),
                $sformatf("4 rows a=%0d en=%0d all=%0d got %b", a, e, b, r4));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
