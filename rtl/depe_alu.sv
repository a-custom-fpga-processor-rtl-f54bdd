// depe_alu: the DEPE arithmetic unit.
//
// Combinational. It holds an integer adder/subtractor and one multiplier; the
// multiplier forms the full 2*W-bit signed product and shifts it right by
// FRAC_W (arithmetic shift), so that two fixed-point numbers with FRAC_W
// fraction bits multiply to a number in the same format. The result wraps to
// W bits; there is no saturation. The set of operations (add, sub and a
// multiply-and-shift for fixed point) follows the document; the data format,
// the wrap-around behaviour and the reserved fourth code (treated as add)
// are this design's choices.
//
// Ports: op selects the operation (depe_pkg::op_e), a and b are the two Data
// RAM operands, y the result, valid in the same cycle.
module depe_alu
  import depe_pkg::*;
#(
  parameter int unsigned W      = DEPE_DATA_W,
  parameter int unsigned FRAC_W = DEPE_FRAC_W
) (
  input  op_e           op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [W-1:0]  y
);

  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] prod_sh;

  always_comb begin
    prod    = signed'(a) * signed'(b);
    prod_sh = prod >>> FRAC_W;
    unique case (op)
      OP_SUB:  y = a - b;
      OP_MUL:  y = prod_sh[W-1:0];
      default: y = a + b;        // OP_ADD and the reserved code
    endcase
  end

endmodule
