// data_gen - built-in data generator of the test chip.
//
// Feeds operands and operation straight into the GP generator of the ALU under test while its
// loop is broken, together with the result each vector must produce. Three patterns:
//   PAT_CRIT  - alternates 0 + 0 with the addition that exercises the critical path,
//               00FFFFFFFFF80000 + 0000000000080000 = 0100000000000000 (the generate at bit 19
//               propagates through bit 55 and selects sum bit 56);
//   PAT_POWER - alternates 0 + 0 with FFFFFFFFFFFFFFFF + FFFFFFFFFFFFFFFF, which evaluates every
//               internal node and gives the worst-case power;
//   PAT_ROM   - steps through eight hardwired vectors with precomputed results for the
//               functional test (both vectors above, then SUB, ADD and the three logic
//               functions on fixed operands).
// The two named additions come from the document. Alternating with 0 + 0, so that a static
// implementation also switches every cycle, and the other six vectors are this design's.
//
// Timing: the outputs follow the registered state; with en = 1 the generator advances on every
// rising edge. last is 1 while the final ROM vector is presented; the ROM then wraps around.
module data_gen
  import alu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  pattern_e         pattern,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] b,
  output alu_op_e          op,
  output logic [WIDTH-1:0] expected,
  output logic             last
);
  localparam int unsigned N_VEC = 8;

  typedef struct packed {
    alu_op_e          op;
    logic [WIDTH-1:0] a;
    logic [WIDTH-1:0] b;
    logic [WIDTH-1:0] res;
  } vector_t;

  function automatic vector_t rom(logic [2:0] idx);
    vector_t v;
    unique case (idx)
      3'd0: begin v.op = OP_ADD; v.a = 64'h00FFFFFFFFF80000; v.b = 64'h0000000000080000; v.res = 64'h0100000000000000; end
      3'd1: begin v.op = OP_ADD; v.a = 64'hFFFFFFFFFFFFFFFF; v.b = 64'hFFFFFFFFFFFFFFFF; v.res = 64'hFFFFFFFFFFFFFFFE; end
      3'd2: begin v.op = OP_SUB; v.a = 64'h123456789ABCDEF0; v.b = 64'h0FEDCBA987654321; v.res = 64'h02468ACF13579BCF; end
      3'd3: begin v.op = OP_SUB; v.a = 64'h0000000000000001; v.b = 64'h0000000000000002; v.res = 64'hFFFFFFFFFFFFFFFF; end
      3'd4: begin v.op = OP_ADD; v.a = 64'hDEADBEEFCAFEF00D; v.b = 64'h0123456789ABCDEF; v.res = 64'hDFD1045754AABDFC; end
      3'd5: begin v.op = OP_AND; v.a = 64'hF0F0F0F0F0F0F0F0; v.b = 64'h33CC33CC33CC33CC; v.res = 64'h30C030C030C030C0; end
      3'd6: begin v.op = OP_OR;  v.a = 64'hF0F0F0F0F0F0F0F0; v.b = 64'h33CC33CC33CC33CC; v.res = 64'hF3FCF3FCF3FCF3FC; end
      default: begin v.op = OP_XOR; v.a = 64'hF0F0F0F0F0F0F0F0; v.b = 64'h33CC33CC33CC33CC; v.res = 64'hC33CC33CC33CC33C; end
    endcase
    return v;
  endfunction

  logic [2:0] idx;    // ROM index
  logic       phase;  // 0: 0 + 0, 1: the pattern's vector

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      idx   <= '0;
      phase <= 1'b0;
    end else if (en) begin
      phase <= ~phase;
      if (pattern == PAT_ROM) idx <= idx + 1'b1;
    end

  always_comb begin
    vector_t v;
    unique case (pattern)
      PAT_CRIT:  v = rom(3'd0);
      PAT_POWER: v = rom(3'd1);
      default:   v = rom(idx);
    endcase
    if (pattern != PAT_ROM && !phase) begin
      v.op  = OP_ADD;
      v.a   = '0;
      v.b   = '0;
      v.res = '0;
    end
    a        = v.a;
    b        = v.b;
    op       = v.op;
    expected = v.res;
    last     = (pattern == PAT_ROM) && (idx == 3'(N_VEC - 1));
  end
endmodule
