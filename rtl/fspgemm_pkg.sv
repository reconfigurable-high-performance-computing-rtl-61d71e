// fspgemm_pkg: data structures of the FSpGEMM kernel.
//
// a_t, b_t and c_t are the words carried by the QA, QB and QC channels
// (the thesis's aType, bType and cType). bType is sent element by element
// here: every beat carries one (value, column index) of the B row together
// with the row's element count `size`; an empty B row is sent as one beat
// with size 0. csv_t is one nonzero of A as stored in memory in the
// compressed sparse vector (CSV) format: value, row index, column index, plus
// an end-of-row flag prepared by the host. bmem_t is one CSR element of B.
// Values are IEEE single precision.
package fspgemm_pkg;
  localparam int unsigned IDX_W = 32;

  typedef logic [31:0] f32_t;

  typedef struct packed {
    f32_t             val;
    logic [IDX_W-1:0] rowIdx;
    logic             eor;      // last nonzero of this row of A
  } a_t;

  typedef struct packed {
    logic [IDX_W-1:0] size;     // nonzeros in this row of B
    f32_t             val;
    logic [IDX_W-1:0] colIdx;
  } b_t;

  typedef struct packed {
    f32_t             val;
    logic [IDX_W-1:0] rowIdx;
    logic [IDX_W-1:0] colIdx;
  } c_t;

  typedef struct packed {
    f32_t             val;
    logic [IDX_W-1:0] rowIdx;
    logic [IDX_W-1:0] colIdx;
    logic             eor;
  } csv_t;

  typedef struct packed {
    f32_t             val;
    logic [IDX_W-1:0] colIdx;
  } bmem_t;

  // one entry of the PE's partial-row buffers
  typedef struct packed {
    f32_t             val;
    logic [IDX_W-1:0] colIdx;
  } pel_t;
endpackage
