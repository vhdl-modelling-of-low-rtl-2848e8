// Reference description of the March algorithms for the testbenches,
// written as text independent of the RTL table: one string per algorithm,
// elements separated by spaces, each "<order>:<ops>" with order u (up),
// d (down) or e (either, walked up) and ops a run of r0/r1/w0/w1.
package march_ref_pkg;

  localparam string ALG_TEXT[8] = '{
    "e:w0 u:r0w1 d:r1w0",                                  // MATS+
    "e:w0 u:r0w1 d:r1w0r0",                                // MATS++
    "e:w0 u:r0w1 d:r1w0 e:r0",                             // March X
    "e:w0 u:r0w1 u:r1w0 e:r0 d:r0w1 d:r1w0 e:r0",          // March C
    "e:w0 u:r0w1 u:r1w0 d:r0w1 d:r1w0 e:r0",               // March C-
    "e:w0 u:r0w1w0w1 u:r1w0w1 d:r1w0w1w0 d:r0w1w0",        // March A
    "e:w0 u:r0w1r1 d:r1w0r0 e:r0",                         // March Y
    "e:w0 u:r0w1r1w0r0w1 u:r1w0w1 d:r1w0w1w0 d:r0w1w0"     // March B
  };

  typedef struct {
    bit    down;
    string ops;     // e.g. "r0w1"
  } ref_elem_t;

  function automatic void parse(int alg, ref ref_elem_t els[$]);
    string s = ALG_TEXT[alg];
    int i = 0;
    els.delete();
    while (i < s.len()) begin
      ref_elem_t e;
      int j;
      e.down = (s[i] == "d");
      i += 2;
      j = i;
      while (j < s.len() && s[j] != " ") j++;
      e.ops = s.substr(i, j - 1);
      els.push_back(e);
      i = j + 1;
    end
  endfunction

  // One operation of the expected sequence: linear cell index, write, value.
  typedef struct packed {
    int unsigned idx;
    bit          wr;
    bit          val;
  } ref_op_t;

  // Full expected operation sequence of an algorithm on n cells.
  function automatic void sequence_of(int alg, int unsigned n, ref ref_op_t ops[$]);
    ref_elem_t els[$];
    parse(alg, els);
    ops.delete();
    foreach (els[k])
      for (int unsigned p = 0; p < n; p++)
        for (int o = 0; o < els[k].ops.len(); o += 2) begin
          ref_op_t r;
          r.idx = els[k].down ? n - 1 - p : p;
          r.wr  = (els[k].ops[o] == "w");
          r.val = (els[k].ops[o+1] == "1");
          ops.push_back(r);
        end
  endfunction

endpackage
