// Fault coverage of the six evaluated March algorithms (MATS+, MATS++,
// March X, March Y, March C-, March C) on a 4 x 4 memory.
//
// The tester (mem_tester, default size) is connected to a faulty memory
// modelled in this bench. Every single fault of each class is injected in
// turn, the algorithm is run once, and the fault counts as detected when the
// tester reports a failure. Fault classes, all on bit cells:
//   SAF   stuck-at-0 / stuck-at-1 of one cell
//   TF    one cell cannot rise / cannot fall
//   AF    address a reaches cell v instead of its own cell (a != v)
//   CFin  a rising (or falling) write on aggressor a inverts victim v
//   CFid  a rising (or falling) write on a forces v to 0 (or 1)
//   CFst  while a holds s, v is forced to value x (all four s, x)
//   SOF   cell v is open: writes do not reach it and reading it returns the
//         value sensed by the previous March read (a sense-amplifier latch)
// The measured coverage is printed as a table. The bench checks it against
// the published coverage table: an entry published as 100 % must be 100 %, and
// an entry published below 100 % must be below 100 % here. For inversion and
// idempotent coupling faults the published percentages themselves are
// checked; for the other classes they depend on the fault list used.
// Stuck-open faults are checked against what this fault model gives: found
// by the algorithms with a read right after a write of the opposite value in
// the same element (MATS++, March Y), missed by the others. The published
// table lists MATS+ at 100 % and March X near 0 %; since March X begins with
// the whole operation sequence of MATS+, no fault model gives both, and the
// MATS+ entry is not checked.
// The fault classes, the six algorithms and the published figures follow the
// document; the exact fault lists and fault models are this bench's choice.
`timescale 1ns/1ps
module tb_fault_coverage;
  import mt_pkg::*;
  localparam int R = 4, C = 4, N = R * C;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] loops = 8'd1, march_mask = '0;
  logic [1:0] row_addr;
  logic row_sel, row_all, we;
  logic [R-1:0][C-1:0] cell_en, wdata, q, iter_fail_map, fail_map, log_mask, log_expected, log_actual;
  logic busy, done, pass, iter_done, log_valid, log_fail;
  logic [7:0] iter_num;
  logic [31:0] test_cycles, log_time;
  phase_e log_phase;
  logic [3:0] log_test;

  mem_tester dut (.clk, .rst_n, .start, .loops, .run_scan(1'b0), .march_mask,
    .row_addr, .row_sel, .row_all, .we, .cell_en, .wdata, .q, .busy, .done, .pass,
    .iter_done, .iter_num, .iter_fail_map, .fail_map, .test_cycles, .log_valid,
    .log_time, .log_phase, .log_test, .log_mask, .log_expected, .log_actual, .log_fail);
  always #5 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- faulty memory --
  typedef enum int {F_NONE, F_SAF, F_TF, F_AF, F_CFIN, F_CFID, F_CFST, F_SOF} fkind_e;
  fkind_e fk = F_NONE;
  int fa = 0, fv = 0;     // aggressor / alias address, victim cell
  bit fs = 0, fx = 0;     // sub-type bits (see header)
  logic [N-1:0] mem = '0;
  logic sa = 1'b0;        // value sensed by the last March read

  function automatic logic [N-1:0] settle(logic [N-1:0] m);
    if (fk == F_SAF) m[fv] = fx;
    if (fk == F_CFST && m[fa] == fs) m[fv] = fx;
    return m;
  endfunction

  always_comb
    for (int i = 0; i < N; i++)
      q[i / C][i % C] = (fk == F_SOF && i == fv) ? sa :
                        mem[(fk == F_AF && i == fa) ? fv : i];

  always @(posedge clk) begin
    logic [N-1:0] nm;
    nm = mem;
    if (we)
      for (int i = 0; i < N; i++)
        if ((row_all || row_addr == 2'(i / C)) && cell_en[i / C][i % C]) begin
          int t;
          logic d;
          t = (fk == F_AF && i == fa) ? fv : i;
          d = wdata[i / C][i % C];
          if (fk == F_TF && t == fv && mem[t] != d && d == fx) d = mem[t];  // fx: blocked target value
          if (!(fk == F_SOF && t == fv)) nm[t] = d;
        end
    if ((fk == F_CFIN || fk == F_CFID) && mem[fa] != nm[fa] && nm[fa] == fs) begin
      if (fk == F_CFIN) nm[fv] = ~nm[fv];
      else              nm[fv] = fx;
    end
    mem <= settle(nm);
    // a March read senses the one enabled cell of the selected row
    if (row_sel && !row_all && !we)
      for (int c = 0; c < C; c++)
        if (cell_en[row_addr][c]) sa <= q[row_addr][c];
  end

  // ------------------------------------------------------------- runs --
  task automatic run_alg(int code, output bit detected);
    mem = settle('0);
    sa = 1'b0;
    @(negedge clk);
    march_mask = 8'(1 << code); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    detected = !pass;
  endtask

  localparam int NALG = 6;
  int codes[NALG] = '{0, 1, 2, 6, 4, 3};
  string anames[NALG] = '{"MATS+", "MATS++", "March X", "March Y", "March C-", "March C"};
  localparam int NCLS = 7;
  string cnames[NCLS] = '{"SAF", "TF", "AF", "CFin", "CFid", "CFst", "SOF"};
  // published coverage is 100 % (1) or below 100 % (0), same algorithm order
  bit full[NCLS][NALG] = '{
    '{1, 1, 1, 1, 1, 1},   // SAF
    '{0, 1, 1, 1, 1, 1},   // TF
    '{1, 1, 1, 1, 1, 1},   // AF
    '{0, 0, 1, 1, 1, 1},   // CFin
    '{0, 0, 0, 0, 1, 1},   // CFid
    '{0, 0, 0, 0, 1, 1},   // CFst
    '{0, 1, 0, 1, 0, 0}    // SOF (MATS+ entry not checked, see header)
  };

  // published percentages for the two coupling classes whose fault lists
  // match the one used here (inversion and idempotent coupling)
  real pub_cfin[NALG] = '{75.0, 75.0, 100.0, 100.0, 100.0, 100.0};
  real pub_cfid[NALG] = '{37.5, 37.5, 50.0, 50.0, 100.0, 100.0};

  int det[NCLS][NALG] = '{default: 0}, tot[NCLS][NALG] = '{default: 0};

  task automatic one(int cls, int ai);
    bit d;
    run_alg(codes[ai], d);
    tot[cls][ai]++;
    if (d) det[cls][ai]++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fault-free sanity run of each algorithm
    for (int ai = 0; ai < NALG; ai++) begin
      bit d;
      fk = F_NONE;
      run_alg(codes[ai], d);
      check(!d, $sformatf("%s passes a good memory", anames[ai]));
    end
    for (int ai = 0; ai < NALG; ai++) begin
      for (int v = 0; v < N; v++)
        for (int x = 0; x < 2; x++) begin
          fv = v; fx = 1'(x);
          fk = F_SAF; one(0, ai);
          fk = F_TF;  one(1, ai);
          if (x == 0) begin fk = F_SOF; one(6, ai); end
        end
      for (int a = 0; a < N; a++)
        for (int v = 0; v < N; v++) if (a != v) begin
          fa = a; fv = v;
          fk = F_AF; one(2, ai);
          for (int s = 0; s < 2; s++) begin
            fs = 1'(s);
            fk = F_CFIN; one(3, ai);
            for (int x = 0; x < 2; x++) begin
              fx = 1'(x);
              fk = F_CFID; one(4, ai);
              fk = F_CFST; one(5, ai);
            end
          end
        end
    end
    fk = F_NONE;
    $display("measured fault coverage, 4 x 4 memory (%%)");
    $display("%-6s %8s %8s %8s %8s %8s %8s", "", anames[0], anames[1], anames[2], anames[3], anames[4], anames[5]);
    for (int cls = 0; cls < NCLS; cls++) begin
      string s;
      s = $sformatf("%-6s", cnames[cls]);
      for (int ai = 0; ai < NALG; ai++) begin
        s = {s, $sformatf(" %8.1f", 100.0 * det[cls][ai] / tot[cls][ai])};
        if (cls == 6 && ai == 0)
          ;   // published MATS+ stuck-open entry: see header
        else if (full[cls][ai])
          check(det[cls][ai] == tot[cls][ai],
                $sformatf("%s %s coverage %0d/%0d, expected 100%%", anames[ai], cnames[cls], det[cls][ai], tot[cls][ai]));
        else
          check(det[cls][ai] < tot[cls][ai],
                $sformatf("%s %s coverage %0d/%0d, expected below 100%%", anames[ai], cnames[cls], det[cls][ai], tot[cls][ai]));
      end
      $display("%s", s);
    end
    for (int ai = 0; ai < NALG; ai++) begin
      check(100.0 * det[3][ai] / tot[3][ai] == pub_cfin[ai],
            $sformatf("%s CFin coverage equals the published %0.1f%%", anames[ai], pub_cfin[ai]));
      check(100.0 * det[4][ai] / tot[4][ai] == pub_cfid[ai],
            $sformatf("%s CFid coverage equals the published %0.1f%%", anames[ai], pub_cfid[ai]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
