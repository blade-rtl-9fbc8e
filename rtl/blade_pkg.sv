// blade_pkg: types and constants shared by the BLADE in-SRAM computing array.
//
// A BLADE subarray is 256 bitlines by 64 wordlines, split into two local
// groups of 32 wordlines. Four bitlines share one bitline-logic slice through
// a 4:1 multiplexer, so each subarray computes on 64 bits per operation.
// These sizes follow the described 256x64 array; the command and micro-op
// encodings below are this implementation's own.
package blade_pkg;

  localparam int unsigned ROWS     = 64;           // wordlines per subarray
  localparam int unsigned MUX      = 4;            // bitlines per logic slice
  localparam int unsigned ROW_W    = $clog2(ROWS);
  localparam int unsigned COL_W    = $clog2(MUX);

  // Writeback multiplexer inputs (Shift, Add, NOR, XOR, AND,
  // Add(n-1)), plus the write amplifier's external data input.
  typedef enum logic [2:0] {
    WB_SHIFT = 3'd0,   // carry line from slice n-1: one-bit left shift
    WB_ADD   = 3'd1,   // sum bit of the ripple adder
    WB_NOR   = 3'd2,
    WB_XOR   = 3'd3,
    WB_AND   = 3'd4,
    WB_ADDF  = 3'd5,   // sum bit of slice n-1: add, then shift by one
    WB_EXT   = 3'd6    // external (host) data
  } wb_src_t;

  // Lane width of the carry chain: the chain is cut at lane boundaries.
  typedef enum logic [1:0] {
    LANE_8  = 2'd0,
    LANE_16 = 2'd1,
    LANE_32 = 2'd2,
    LANE_64 = 2'd3
  } lane_t;

  // One cycle of array activity. The read phase senses one or two rows and
  // latches GRBL/GRBLbar; the write phase of the same cycle uses the values
  // latched by the previous cycle's read.
  typedef struct packed {
    logic             rd_en;
    logic             rd_dual;    // activate two wordlines
    logic [ROW_W-1:0] rd_row_a;
    logic [ROW_W-1:0] rd_row_b;
    logic [COL_W-1:0] rd_col;
    logic             wr_en;
    logic [ROW_W-1:0] wr_row;
    logic [COL_W-1:0] wr_col;
    wb_src_t          wr_src;
    logic             cin_lsb;    // carry into the lowest bit of every lane
    lane_t            lane;
  } blade_uop_t;

  // BLADE commands.
  typedef enum logic [3:0] {
    OP_AND   = 4'd0,
    OP_NOR   = 4'd1,
    OP_XOR   = 4'd2,
    OP_NOT   = 4'd3,
    OP_COPY  = 4'd4,
    OP_SHL   = 4'd5,
    OP_ADD   = 4'd6,
    OP_SUB   = 4'd7,
    OP_MUL   = 4'd8,   // lanes of A times a scalar
    OP_GT    = 4'd9,   // A > B, unsigned, flag in each lane's top bit
    OP_LT    = 4'd10,  // A < B, unsigned, flag in each lane's top bit
    OP_READ  = 4'd11,  // host read of one 64-bit word
    OP_WRITE = 4'd12   // host write of one 64-bit word
  } blade_op_t;

  typedef struct packed {
    blade_op_t        op;
    logic [ROW_W-1:0] dst;
    logic [ROW_W-1:0] src_a;
    logic [ROW_W-1:0] src_b;
    logic [COL_W-1:0] col;
    lane_t            lane;
    logic [5:0]       shamt;      // OP_SHL: number of one-bit shifts
    logic [63:0]      scalar;     // OP_MUL: multiplier (lane width bits used)
    logic [5:0]       sub;        // OP_READ/OP_WRITE: subarray
    logic [63:0]      wdata;      // OP_WRITE: data
  } blade_cmd_t;

  // Lane width in bits.
  function automatic int unsigned lane_bits(lane_t l);
    case (l)
      LANE_8:  return 8;
      LANE_16: return 16;
      LANE_32: return 32;
      default: return 64;
    endcase
  endfunction

  // Local group of a row.
  function automatic logic row_lg(logic [ROW_W-1:0] r);
    return r[ROW_W-1];
  endfunction

endpackage
