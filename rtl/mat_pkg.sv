// mat_pkg: types and constants shared by the matrix-chain accelerator.
//
// The accelerator multiplies a series of rectangular matrices on a linear
// systolic array. Everything that travels along the array is a token_t: one
// matrix element plus the control that tells each processing element (PE)
// what to do with it (load it into local memory, multiply-accumulate it,
// swap memory banks, or read a stored word out). The widths below are this
// design's own choice; the matrix sizes they must cover (up to 800 rows or
// columns, series of 15 matrices) are those of the evaluated workloads.
package mat_pkg;

  localparam int DATA_W  = 32;  // element width; arithmetic is modulo 2**DATA_W
  localparam int LADDR_W = 10;  // PE local-memory word address (vectors up to 1023)
  localparam int DIM_W   = 10;  // a matrix row or column count (up to 1023)
  localparam int PE_W    = 8;   // PE index carried by LOAD and READ tokens
  localparam int BADDR_W = 20;  // buffer-memory word address (1 Mi words)

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [BADDR_W-1:0] baddr_t;
  typedef logic [DIM_W-1:0]   dim_t;

  // What a token asks the PEs to do.
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,  // empty pipeline slot
    OP_LOAD = 3'd1,  // PE 'pe' stores 'data' at word 'k' of its resident bank
    OP_MAC  = 3'd2,  // every PE: acc (+)= resident[k] * data; on 'last' store acc at word 'v' of the other bank
    OP_SWAP = 3'd3,  // every PE: the bank just written becomes the resident one
    OP_READ = 3'd4   // PE 'pe' replaces 'data' with resident[k]; 'tag' is the buffer address it returns to
  } op_e;

  typedef struct packed {
    op_e                op;
    logic [PE_W-1:0]    pe;
    logic [LADDR_W-1:0] k;
    logic [LADDR_W-1:0] v;
    logic               first;
    logic               last;
    baddr_t             tag;
    data_t              data;
  } token_t;

  // A matrix held in the buffer memory, row-major from 'base'.
  typedef struct packed {
    baddr_t base;
    dim_t   rows;
    dim_t   cols;
  } mdesc_t;

  // Order in which the series is multiplied.
  typedef enum logic [1:0] {
    ALG_NATURAL    = 2'd0,  // left to right
    ALG_SINGLE_MIN = 2'd1,  // split at the first matrix with the fewest rows
    ALG_ALL_MIN    = 2'd2   // split at every "minimal" matrix
  } alg_e;

  // Direction of one chain product on the array.
  typedef enum logic {
    DIR_LR = 1'b0,  // rows of the leftmost matrix resident, later matrices streamed by columns
    DIR_RL = 1'b1   // columns of the rightmost matrix resident, earlier matrices streamed by rows, right to left
  } dir_e;

  localparam token_t TOKEN_NOP = '{op: OP_NOP, default: '0};

endpackage
