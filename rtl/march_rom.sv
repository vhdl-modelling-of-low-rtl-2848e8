// Element table of the eight March algorithms.
//
// Given an algorithm and an element number, returns that element: its address
// order, how many operations it applies to each cell, the operations
// themselves (ops[0] first) and whether it is the algorithm's last element.
// Purely combinational; an element number past the end returns a one-read
// "last" element so a sequencer can never run away.
//
//   MATS+    ud(w0); up(r0,w1); dn(r1,w0)
//   MATS++   ud(w0); up(r0,w1); dn(r1,w0,r0)
//   March X  ud(w0); up(r0,w1); dn(r1,w0); ud(r0)
//   March C  ud(w0); up(r0,w1); up(r1,w0); ud(r0); dn(r0,w1); dn(r1,w0); ud(r0)
//   March C- ud(w0); up(r0,w1); up(r1,w0); dn(r0,w1); dn(r1,w0); ud(r0)
//   March A  ud(w0); up(r0,w1,w0,w1); up(r1,w0,w1); dn(r1,w0,w1,w0); dn(r0,w1,w0)
//   March Y  ud(w0); up(r0,w1,r1); dn(r1,w0,r0); ud(r0)
//   March B  ud(w0); up(r0,w1,r1,w0,r0,w1); up(r1,w0,w1); dn(r1,w0,w1,w0); dn(r0,w1,w0)
// (up = increasing address, dn = decreasing, ud = either order.)
//
// The sequences are the document's; the encoding is this design's. The fifth
// element of March C is descending: that is the form that detects every
// idempotent and state coupling fault, which the document credits March C
// with, and the standard form of the test.
module march_rom
  import mt_pkg::*;
(
  input  march_alg_e  alg,
  input  logic [2:0]  elem,
  output march_elem_t e
);

  // Build an element from up to six operations.
  function automatic march_elem_t mk(march_dir_e dir, logic [2:0] n,
                                     march_op_t o0, march_op_t o1 = NOP,
                                     march_op_t o2 = NOP, march_op_t o3 = NOP,
                                     march_op_t o4 = NOP, march_op_t o5 = NOP,
                                     logic last = 1'b0);
    march_elem_t m;
    m.dir    = dir;
    m.nops   = n;
    m.ops[0] = o0;
    m.ops[1] = o1;
    m.ops[2] = o2;
    m.ops[3] = o3;
    m.ops[4] = o4;
    m.ops[5] = o5;
    m.last   = last;
    return m;
  endfunction

  localparam logic L = 1'b1;

  always_comb begin
    e = mk(DIR_EITHER, 3'd1, R0, NOP, NOP, NOP, NOP, NOP, L);
    case (alg)
      ALG_MATS_P: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd2, R0, W1);
        3'd2: e = mk(DIR_DOWN, 3'd2, R1, W0, NOP, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MATS_PP: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd2, R0, W1);
        3'd2: e = mk(DIR_DOWN, 3'd3, R1, W0, R0, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_X: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd2, R0, W1);
        3'd2: e = mk(DIR_DOWN, 3'd2, R1, W0);
        3'd3: e = mk(DIR_EITHER, 3'd1, R0, NOP, NOP, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_C: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd2, R0, W1);
        3'd2: e = mk(DIR_UP, 3'd2, R1, W0);
        3'd3: e = mk(DIR_EITHER, 3'd1, R0);
        3'd4: e = mk(DIR_DOWN, 3'd2, R0, W1);
        3'd5: e = mk(DIR_DOWN, 3'd2, R1, W0);
        3'd6: e = mk(DIR_EITHER, 3'd1, R0, NOP, NOP, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_CM: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd2, R0, W1);
        3'd2: e = mk(DIR_UP, 3'd2, R1, W0);
        3'd3: e = mk(DIR_DOWN, 3'd2, R0, W1);
        3'd4: e = mk(DIR_DOWN, 3'd2, R1, W0);
        3'd5: e = mk(DIR_EITHER, 3'd1, R0, NOP, NOP, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_A: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd4, R0, W1, W0, W1);
        3'd2: e = mk(DIR_UP, 3'd3, R1, W0, W1);
        3'd3: e = mk(DIR_DOWN, 3'd4, R1, W0, W1, W0);
        3'd4: e = mk(DIR_DOWN, 3'd3, R0, W1, W0, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_Y: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd3, R0, W1, R1);
        3'd2: e = mk(DIR_DOWN, 3'd3, R1, W0, R0);
        3'd3: e = mk(DIR_EITHER, 3'd1, R0, NOP, NOP, NOP, NOP, NOP, L);
        default: ;
      endcase
      ALG_MARCH_B: case (elem)
        3'd0: e = mk(DIR_EITHER, 3'd1, W0);
        3'd1: e = mk(DIR_UP, 3'd6, R0, W1, R1, W0, R0, W1);
        3'd2: e = mk(DIR_UP, 3'd3, R1, W0, W1);
        3'd3: e = mk(DIR_DOWN, 3'd4, R1, W0, W1, W0);
        3'd4: e = mk(DIR_DOWN, 3'd3, R0, W1, W0, NOP, NOP, NOP, L);
        default: ;
      endcase
      default: ;
    endcase
  end

endmodule
