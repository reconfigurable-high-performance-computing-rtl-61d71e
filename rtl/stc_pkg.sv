// stc_pkg: types and constants shared by the Sparse Tensor Core blocks.
//
// A record is one nonzero of a sparse vector: a column index (the merge key)
// and a double-precision value. The largest index value, KEY_MAX, is
// reserved as the "end of list" sentinel that pads a list to a whole number
// of E-record vectors and flushes the merge sorter; it never names a real
// column. E = 8 records per vector is the width of the multiply-and-merge
// unit.
package stc_pkg;
  localparam int unsigned IDX_W = 32;   // index (key) width
  localparam int unsigned VAL_W = 64;   // IEEE double
  localparam int unsigned E     = 8;    // records per merge step

  localparam logic [IDX_W-1:0] KEY_MAX = '1;

  typedef struct packed {
    logic [IDX_W-1:0] idx;
    logic [VAL_W-1:0] val;
  } rec_t;

  // One E-record vector as carried by the sorter's channels
  typedef struct packed {
    rec_t [E-1:0] r;
    logic         last;   // final vector of this list
  } vec_t;
endpackage
