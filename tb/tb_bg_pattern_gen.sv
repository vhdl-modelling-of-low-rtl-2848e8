// Unit test of bg_pattern_gen: every background on an 8 x 8 array against
// the figures' layouts written out row by row, and on the default 4 x 4 and
// a 16 x 16 array against the formula (complement pairs, stripe periods).
`timescale 1ns/1ps
module tb_bg_pattern_gen;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  bg_pattern_e p;
  logic [7:0][7:0]   img8;
  logic [3:0][3:0]   img4;
  logic [15:0][15:0] img16;
  bg_pattern_gen #(.ROWS(8),  .COLS(8))  g8  (.pattern(p), .image(img8));
  bg_pattern_gen                         g4  (.pattern(p), .image(img4));
  bg_pattern_gen #(.ROWS(16), .COLS(16)) g16 (.pattern(p), .image(img16));

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

  // Row r of the 8 x 8 image as printed, column 0 leftmost.
  function automatic string row_str(logic [7:0] row);
    string s = "";
    for (int c = 0; c < 8; c++) s = {s, row[c] ? "1" : "0"};
    return s;
  endfunction

  // Expected first two and third rows of each 8 x 8 background.
  string exp_rows[12][3] = '{
    '{"00000000", "00000000", "00000000"},   // solid zero
    '{"11111111", "11111111", "11111111"},   // solid one
    '{"01010101", "10101010", "01010101"},   // checkerboard
    '{"10101010", "01010101", "10101010"},   // complement
    '{"00000000", "11111111", "00000000"},   // row stripes
    '{"11111111", "00000000", "11111111"},
    '{"00000000", "00000000", "11111111"},   // double row stripes
    '{"11111111", "11111111", "00000000"},
    '{"01010101", "01010101", "01010101"},   // column stripes
    '{"10101010", "10101010", "10101010"},
    '{"00110011", "00110011", "00110011"},   // double column stripes
    '{"11001100", "11001100", "11001100"}
  };

  function automatic logic ref_bit(int pi, int r, int c);
    logic b;
    case (pi / 2)
      0: b = 0;
      1: b = ((r + c) % 2) == 1;
      2: b = (r % 2) == 1;
      3: b = ((r / 2) % 2) == 1;
      4: b = (c % 2) == 1;
      default: b = ((c / 2) % 2) == 1;
    endcase
    return b ^ (pi % 2 == 1);
  endfunction

  initial begin
    for (int pi = 0; pi < 12; pi++) begin
      p = bg_pattern_e'(pi); #1;
      for (int r = 0; r < 3; r++)
        check(row_str(img8[r]) == exp_rows[pi][r],
              $sformatf("bg %0d row %0d: %s exp %s", pi, r, row_str(img8[r]), exp_rows[pi][r]));
      // rows repeat with period 4 in every background
      for (int r = 4; r < 8; r++) check(img8[r] == img8[r-4], $sformatf("bg %0d period row %0d", pi, r));
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          check(img4[r][c] == ref_bit(pi, r, c), $sformatf("4x4 bg %0d (%0d,%0d)", pi, r, c));
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          check(img16[r][c] == ref_bit(pi, r, c), $sformatf("16x16 bg %0d (%0d,%0d)", pi, r, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
