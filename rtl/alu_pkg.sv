// alu_pkg - types and constants shared by the dual-supply 64-bit ALU and its test chip.
//
// The datapath is 64 bits wide and the carry tree is sparse with a sparseness of 4: only the
// carry into every fourth bit is computed, so the sum logic works on 4-bit groups. Six ALU
// modules share an all-to-all loop-back (forwarding) bus; each operand is picked from nine
// sources by a 9:1 multiplexer. The operation codes cover the five functions the ALU executes
// (ADD, SUB, AND, OR, XOR). Their encoding, the test-mode encoding and the choice of which
// sources feed the nine-way and five-way multiplexers are this design's own.
package alu_pkg;

  localparam int unsigned WIDTH     = 64;  // datapath width
  localparam int unsigned GROUP     = 4;   // sparseness of the carry tree (bits per sum group)
  localparam int unsigned N_ALU     = 6;   // ALU modules on one forwarding network
  localparam int unsigned N_MUX9    = 9;   // legs of the first operand multiplexer
  localparam int unsigned N_MUX5    = 5;   // legs of the second a-operand multiplexer
  localparam int unsigned N_EXT9    = N_MUX9 - N_ALU;  // non-forwarded legs of the 9:1 mux
  localparam int unsigned N_EXT5    = N_MUX5 - 1;      // legs of the 5:1 mux besides ain0

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_AND = 3'd2,
    OP_OR  = 3'd3,
    OP_XOR = 3'd4
  } alu_op_e;

  typedef enum logic [1:0] {
    LF_AND = 2'd0,
    LF_OR  = 2'd1,
    LF_XOR = 2'd2
  } logic_fn_e;

  // Control word captured together with the operands at the GP generator.
  typedef struct packed {
    logic      arith;  // 1: ADD/SUB (partial sum drives s0/s1), 0: logic unit drives s0/s1
    logic_fn_e lfn;    // logic function when arith = 0
    logic      cin;    // carry into bit 0 (1 for SUB)
  } alu_ctrl_t;

  // Operating modes of the test chip.
  typedef enum logic [1:0] {
    TM_NORMAL = 2'd0,  // six ALUs run from the external operand and select ports
    TM_DELAY  = 2'd1,  // loop of ALU 0 broken at the GP input, data generator drives it,
                       // the loop end is captured by the two skewed data registers
    TM_FUNC   = 2'd2   // hardwired vectors run through ALU 0 and are checked
  } test_mode_e;

  // Patterns of the data generator in delay-measurement mode.
  typedef enum logic [1:0] {
    PAT_CRIT  = 2'd0,  // alternates 0+0 with the critical-path addition
    PAT_POWER = 2'd1,  // alternates 0+0 with the all-ones addition (worst-case power)
    PAT_ROM   = 2'd2   // steps through the hardwired functional vectors
  } pattern_e;

  function automatic alu_ctrl_t decode_op(alu_op_e op);
    alu_ctrl_t c;
    c.arith = (op == OP_ADD) || (op == OP_SUB);
    c.cin   = (op == OP_SUB);
    unique case (op)
      OP_OR:   c.lfn = LF_OR;
      OP_XOR:  c.lfn = LF_XOR;
      default: c.lfn = LF_AND;
    endcase
    return c;
  endfunction

endpackage
