// spmv_pkg: constants and types shared by the sparse matrix-vector (SpMxV)
// processing element, its sub-blocks and the top level.
//
// The matrix is cut into 128 x 128 blocks. A matrix entry carries its value and
// its row and column as offsets inside the block, each with one extra bit that
// picks one half of a ping-pong buffer (partial-sum buffer for the row, vector
// buffer for the column), an end-of-matrix flag and the index of its rowstrip
// (the 128-row band it belongs to). The entry occupies the low 96 bits of the
// 128-bit word delivered by the matrix memory controller; bits 127:96 are unused.
//
// Bit layout of an entry (follows the Blocked-Column-Row format of the design;
// the exact placement above bit 63 and the null flag are this design's choices):
//   [63:0]   value, IEEE-754 double
//   [70:64]  column offset in the block   [71] vector ping-pong buffer
//   [78:72]  row offset in the block      [79] partial-sum ping-pong buffer
//   [80]     end of matrix (last entry of this PE's stream)
//   [81]     null entry: scheduled filler that must not update any partial sum
//   [95:82]  rowstrip index (ROWSTRIP_WIDTH bits)
package spmv_pkg;

  localparam int BLOCK          = 128;             // block edge, rows and columns
  localparam int WORDS          = 4;               // doubles per storage row
  localparam int BUF_DEPTH      = BLOCK / WORDS;   // 32 rows per ping-pong half
  localparam int ROWSTRIP_WIDTH = 14;              // rowstrip index width
  localparam int MULT_LAT       = 15;              // multiplier pipeline depth
  localparam int ADD_LAT        = 12;              // adder pipeline depth
  localparam int VEC_RD_LAT     = 2;               // vector cache read latency
  localparam int PSUM_RD_LAT    = 3;               // psum read -> adder operand
  localparam int INIT_COUNT     = 33;              // floating-point unit start-up wait

  typedef logic [63:0] dword_t;
  typedef logic [ROWSTRIP_WIDTH-1:0] rs_idx_t;

  typedef struct packed {
    rs_idx_t    rowstrip;
    logic       is_null;
    logic       eom;
    logic       pbuf;
    logic [6:0] row;
    logic       vbuf;
    logic [6:0] col;
    dword_t     value;
  } mat_entry_t;

  // Tag carried beside a product from the multiplier to the accumulator.
  typedef struct packed {
    rs_idx_t    rowstrip;
    logic       is_null;
    logic       eom;
    logic       pbuf;
    logic [6:0] row;
  } psum_tag_t;

  localparam int ENTRY_W = $bits(mat_entry_t);
  localparam int TAG_W   = $bits(psum_tag_t);

endpackage
