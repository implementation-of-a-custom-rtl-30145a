// Comparator of a processing element, with its two operand multiplexers.
//
// The left multiplexer selects z, i or k, the right one D(i), the constant 0
// or l, and a single W-bit signed comparator decides the branches of the
// InexRecur procedure:
//   CMP_Z_LT_D : z < D(i)    prune this call
//   CMP_I_LT_0 : i < 0       the whole read is consumed, report [k,l]
//   CMP_K_LE_L : k <= l      the new suffix-array interval is not empty
// All operands are two's complement. The multiplexer/comparator structure
// follows the published PE diagram; the constant-0 input for the i < 0 test
// is this design's choice. Combinational.
module pe_comparator
  import bwa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  cmp_op_t      op,
  input  logic [W-1:0] z,
  input  logic [W-1:0] i,
  input  logic [W-1:0] k,
  input  logic [W-1:0] d,    // D(i)
  input  logic [W-1:0] l,
  output logic         res
);

  logic [W-1:0] lhs, rhs;
  logic         lt, eq;

  always_comb begin
    unique case (op)
      CMP_Z_LT_D: begin lhs = z; rhs = d;  end
      CMP_I_LT_0: begin lhs = i; rhs = '0; end
      default:    begin lhs = k; rhs = l;  end
    endcase
    lt  = $signed(lhs) < $signed(rhs);
    eq  = (lhs == rhs);
    res = (op == CMP_K_LE_L) ? (lt || eq) : lt;
  end

endmodule
