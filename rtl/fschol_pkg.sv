// fschol_pkg: shared constants and the job descriptor of the sparse Cholesky
// factorization engine.
//
// The engine works on single-precision (32-bit) words in vectors of VL
// lanes; VL = 128, N = 4 and M = 2 are the configuration the engine is
// built for. A frontal matrix has at most (N+M)*VL rows and columns, an
// update matrix at most N*VL.
//
// job_t carries the five configuration bits of a job (up, last_c, f_rd,
// f_wr, u_rd) plus the dimensions the engine needs to walk the matrices:
// the order d of the frontal matrix and the number t1 = t+1 of columns of
// the supernode. The dimension fields and their widths are this design's
// own choice.
package fschol_pkg;
  parameter int unsigned WL = 32;
  parameter int unsigned DIM_W = 16;

  typedef struct packed {
    logic             up;      // frontal matrix already partially updated
    logic             last_c;  // this update is by the last child: factorize
    logic             f_rd;    // read partial F from the inter-PE channel
    logic             f_wr;    // write partial F to the inter-PE channel
    logic             u_rd;    // an update matrix is added (else zeros)
    logic [DIM_W-1:0] d;       // order of the frontal matrix
    logic [DIM_W-1:0] t1;      // columns of the supernode (t+1)
  } job_t;
endpackage
