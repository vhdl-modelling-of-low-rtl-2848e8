// Unit test of march_rom: every element of every algorithm against the
// reference text table (order, operation count, each operation, last flag),
// and the safe value returned past the last element.
`timescale 1ns/1ps
module tb_march_rom;
  import mt_pkg::*;
  import march_ref_pkg::*;
  int checks = 0, failures = 0;
  march_alg_e  alg;
  logic [2:0]  elem;
  march_elem_t e;
  march_rom dut (.*);

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
    ref_elem_t els[$];
    for (int a = 0; a < 8; a++) begin
      parse(a, els);
      alg = march_alg_e'(a);
      foreach (els[k]) begin
        elem = 3'(k); #1;
        check((e.dir == DIR_DOWN) == els[k].down, $sformatf("alg %0d elem %0d order", a, k));
        check(int'(e.nops) == els[k].ops.len() / 2, $sformatf("alg %0d elem %0d nops %0d", a, k, e.nops));
        for (int o = 0; o < els[k].ops.len() / 2; o++) begin
          check(e.ops[o].is_write == (els[k].ops[2*o] == "w"), $sformatf("alg %0d elem %0d op %0d kind", a, k, o));
          check(e.ops[o].value == (els[k].ops[2*o+1] == "1"), $sformatf("alg %0d elem %0d op %0d value", a, k, o));
        end
        check(e.last == (k == els.size() - 1), $sformatf("alg %0d elem %0d last", a, k));
      end
      if (els.size() < 8) begin
        elem = 3'(els.size()); #1;
        check(e.last && e.nops == 1 && !e.ops[0].is_write, $sformatf("alg %0d past end", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
