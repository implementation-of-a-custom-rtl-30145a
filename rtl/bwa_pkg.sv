// Shared types and constants of the BWA short-read mapping accelerator.
//
// Bases are coded lexicographically (A=0, C=1, G=2, T=3) so that the base
// code also indexes the C(.) register and the occurrence rows. One row of an
// occurrence array, O(A..T,row), is a single 4 x 32-bit memory word, so one
// memory read returns the counts of all four bases. The '$' column of the
// occurrence array is never used by Eqs. (1) and (2) and is not stored.
// The 32-bit width of counts, k, l, i and z follows the 32-bit adder and
// comparator of the processing element; the read length limit and the
// result record layout are this design's own choices.
package bwa_pkg;

  localparam int unsigned DW           = 32;   // datapath width
  localparam int unsigned MAX_READ_LEN = 128;  // longest short read a PE holds
  localparam int unsigned LEN_W        = 8;    // width of a read length
  localparam int unsigned ZW           = 8;    // width of the allowed-difference count
  localparam int unsigned ADDR_W       = 32;   // memory word address width

  typedef enum logic [1:0] {
    BASE_A = 2'd0,
    BASE_C = 2'd1,
    BASE_G = 2'd2,
    BASE_T = 2'd3
  } base_t;

  // O(b,row) for b = A, C, G, T, indexed by the base code.
  typedef logic [3:0][DW-1:0] occ_row_t;

  // Which occurrence array a memory read is for: O of the reference, or
  // O' of the reversed reference (used for the D(i) lower bound).
  typedef enum logic {
    TBL_O    = 1'b0,
    TBL_OREV = 1'b1
  } table_t;

  // One pending InexRecur(W, i, z, k, l) call: one register file entry.
  // i and z are two's complement and may become negative.
  typedef struct packed {
    logic [DW-1:0] i;
    logic [DW-1:0] z;
    logic [DW-1:0] k;
    logic [DW-1:0] l;
  } call_t;

  // One short read as written by the host into the short-read buffer.
  // bases[j] is W[j]; only bases[0 .. len-1] are meaningful.
  typedef struct packed {
    logic [31:0]                    id;
    logic [LEN_W-1:0]               len;
    logic [ZW-1:0]                  zmax;
    base_t [MAX_READ_LEN-1:0]       bases;
  } read_t;

  typedef enum logic {
    RES_HIT = 1'b0,   // one suffix-array interval [k,l] reached with z left
    RES_END = 1'b1    // all calls of this read are done
  } res_kind_t;

  // One record of the output buffer.
  typedef struct packed {
    res_kind_t      kind;
    logic           overflow;  // RES_END only: register file overflowed
    logic [31:0]    id;
    logic [DW-1:0]  k;
    logic [DW-1:0]  l;
    logic [ZW-1:0]  z;         // RES_HIT: allowed differences still unused
  } result_t;

  // Operand selection of the PE comparator.
  typedef enum logic [1:0] {
    CMP_Z_LT_D = 2'd0,  // z < D(i)   : prune the call
    CMP_I_LT_0 = 2'd1,  // i < 0      : whole read consumed, report [k,l]
    CMP_K_LE_L = 2'd2   // k_b <= l_b : interval not empty
  } cmp_op_t;

endpackage
