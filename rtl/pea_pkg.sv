// pea_pkg: types and constants shared by the Polynomial Evaluation Accelerator.
//
// The accelerator keeps eight coefficient vectors (CVs), each holding a
// polynomial of degree at most 10, and evaluates them at 16-bit signed
// arguments, giving 32-bit signed results. Instructions are 16-bit words with
// a 2-bit opcode, a 3-bit CV address and a 5-bit operand (the degree N for STP,
// the block size b for EVB). These sizes follow the accelerator's definition.
//
// Choices made here, not fixed by the definition: the bit positions of the
// instruction fields (opcode in [1:0], address in [4:2], operand in [9:5],
// bits [15:10] ignored), the opcode encoding (STP=0, EVP=1, EVB=2, RST=3,
// the order in which the instructions are introduced), coefficients being
// 16-bit signed words like the arguments, and the status codes and their
// 8-bit width. Arithmetic wraps modulo 2**32: every result is the exact
// polynomial value reduced to 32-bit two's complement.
package pea_pkg;

  localparam int unsigned NUM_CV   = 8;   // coefficient vectors
  localparam int unsigned MAX_DEG  = 10;  // highest supported degree
  localparam int unsigned NUM_COEF = MAX_DEG + 1;
  localparam int unsigned DATA_W   = 16;  // arguments and coefficients
  localparam int unsigned RES_W    = 32;  // results
  localparam int unsigned INSTR_W  = 16;
  localparam int unsigned STATUS_W = 8;
  localparam int unsigned DEG_W    = 4;   // holds 0..10
  localparam int unsigned ADDR_W   = $clog2(NUM_CV);
  localparam int unsigned OPND_W   = 5;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [RES_W-1:0]  res_t;
  typedef logic        [DEG_W-1:0]  deg_t;
  typedef logic        [ADDR_W-1:0] cv_addr_t;
  typedef logic        [OPND_W-1:0] operand_t;
  typedef data_t coef_vec_t [NUM_COEF];

  typedef enum logic [1:0] {
    OP_STP = 2'd0,  // store polynomial: operand = degree N, then N+1 coefficients
    OP_EVP = 2'd1,  // evaluate polynomial at one argument
    OP_EVB = 2'd2,  // evaluate over a block of b = operand arguments
    OP_RST = 2'd3   // invalidate all coefficient vectors
  } opcode_e;

  typedef struct packed {
    logic [INSTR_W-11:0] unused;   // [15:10]
    operand_t            operand;  // [9:5]
    cv_addr_t            addr;     // [4:2]
    opcode_e             opcode;   // [1:0]
  } instr_t;

  typedef enum logic [STATUS_W-1:0] {
    ST_OK         = 8'd0,  // instruction completed
    ST_ERR_UNINIT = 8'd1,  // EVP/EVB on a CV that holds no polynomial
    ST_ERR_DEGREE = 8'd2,  // STP with N above MAX_DEG
    ST_ERR_BLOCK  = 8'd3   // EVB with b = 0
  } status_e;

  // Builds an instruction word (used by testbenches and drivers).
  function automatic logic [INSTR_W-1:0] make_instr(opcode_e op, cv_addr_t addr,
                                                    operand_t operand);
    instr_t i;
    i.unused  = '0;
    i.operand = operand;
    i.addr    = addr;
    i.opcode  = op;
    return i;
  endfunction

endpackage
