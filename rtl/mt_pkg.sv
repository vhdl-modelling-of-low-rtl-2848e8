// Shared types and constants of the memory fault detection tester.
//
// The March algorithms are the eight element sequences of the classic
// bit-oriented March tests (MATS+, MATS++, March X, March C, March C-,
// March A, March Y, March B). Each element is an address order plus a list of
// up to six read/write operations applied to every cell before moving on to
// the next address. The zero-one scan uses twelve data backgrounds, listed
// here in the order the tester runs them.
//
// The encodings (enum values, the 6-operation element limit, an address order
// "either" resolved to ascending) are this design's own choices.
package mt_pkg;

  // ---------------------------------------------------------------- March ---
  typedef enum logic [2:0] {
    ALG_MATS_P  = 3'd0,   // MATS+    5n
    ALG_MATS_PP = 3'd1,   // MATS++   6n
    ALG_MARCH_X = 3'd2,   // March X  6n
    ALG_MARCH_C = 3'd3,   // March C  11n
    ALG_MARCH_CM = 3'd4,  // March C- 10n
    ALG_MARCH_A = 3'd5,   // March A  15n
    ALG_MARCH_Y = 3'd6,   // March Y  8n
    ALG_MARCH_B = 3'd7    // March B  17n
  } march_alg_e;

  localparam int unsigned NUM_ALGS    = 8;
  localparam int unsigned MAX_OPS     = 6;   // longest element (March B)

  typedef enum logic [1:0] {
    DIR_UP     = 2'd0,    // increasing address
    DIR_DOWN   = 2'd1,    // decreasing address
    DIR_EITHER = 2'd2     // either order; the engine walks it ascending
  } march_dir_e;

  // One read or write operation: rd0/rd1 expect a value, wr0/wr1 write it.
  typedef struct packed {
    logic is_write;
    logic value;
  } march_op_t;

  typedef struct packed {
    march_dir_e            dir;
    logic [2:0]            nops;   // 1..MAX_OPS
    march_op_t [MAX_OPS-1:0] ops;  // ops[0] is applied first
    logic                  last;   // final element of the algorithm
  } march_elem_t;

  localparam march_op_t R0 = '{is_write: 1'b0, value: 1'b0};
  localparam march_op_t R1 = '{is_write: 1'b0, value: 1'b1};
  localparam march_op_t W0 = '{is_write: 1'b1, value: 1'b0};
  localparam march_op_t W1 = '{is_write: 1'b1, value: 1'b1};
  localparam march_op_t NOP = '{is_write: 1'b0, value: 1'b0};

  // Operations per cell of each algorithm (the "k" of its kn complexity).
  function automatic int unsigned march_complexity(march_alg_e alg);
    case (alg)
      ALG_MATS_P:   return 5;
      ALG_MATS_PP:  return 6;
      ALG_MARCH_X:  return 6;
      ALG_MARCH_C:  return 11;
      ALG_MARCH_CM: return 10;
      ALG_MARCH_A:  return 15;
      ALG_MARCH_Y:  return 8;
      default:      return 17;   // March B
    endcase
  endfunction

  // --------------------------------------------------------- Zero-one scan ---
  typedef enum logic [3:0] {
    BG_SOLID0     = 4'd0,
    BG_SOLID1     = 4'd1,
    BG_CHECKER    = 4'd2,
    BG_CHECKER_N  = 4'd3,
    BG_ROW        = 4'd4,
    BG_ROW_N      = 4'd5,
    BG_DROW       = 4'd6,
    BG_DROW_N     = 4'd7,
    BG_COL        = 4'd8,
    BG_COL_N      = 4'd9,
    BG_DCOL       = 4'd10,
    BG_DCOL_N     = 4'd11
  } bg_pattern_e;


  // Value of cell (row r, column c) in background p. Odd codes are the
  // complement of the even code below them.
  function automatic logic bg_bit(bg_pattern_e p, int unsigned r, int unsigned c);
    logic b;
    case (p)
      BG_SOLID0, BG_SOLID1:     b = 1'b0;
      BG_CHECKER, BG_CHECKER_N: b = 1'((r + c) & 1);
      BG_ROW, BG_ROW_N:         b = 1'(r & 1);
      BG_DROW, BG_DROW_N:       b = 1'((r >> 1) & 1);
      BG_COL, BG_COL_N:         b = 1'(c & 1);
      BG_DCOL, BG_DCOL_N:       b = 1'((c >> 1) & 1);
      default:                  b = 1'b0;
    endcase
    return b ^ p[0];
  endfunction

  // ------------------------------------------------------------- Program ---
  // What the tester is doing, reported with every log record.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_SCAN  = 2'd1,
    PH_MARCH = 2'd2
  } phase_e;

endpackage
