// Row decoder of the memory array: turns a binary row number into one-hot
// row enables (a 3-to-8 decoder for eight rows).
//
// row_en[i] is high when en is high and addr == i. When all_rows is high
// every row is enabled at once; the zero-one scan uses this to write and read
// the whole array in a single cycle. Purely combinational.
//
// Decoding the row number to a single row enable follows the document; the
// all_rows broadcast input and the enable input are this design's additions.
module row_decoder #(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned ABITS  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [ABITS-1:0] addr,
  input  logic             en,
  input  logic             all_rows,
  output logic [ROWS-1:0]  row_en
);

  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++)
      row_en[i] = en && (all_rows || (32'(addr) == i));
  end

endmodule
