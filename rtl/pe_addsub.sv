// ADD/SUB unit of a processing element.
//
// A W-bit adder/subtractor, the only arithmetic unit of the PE datapath. The
// PE controller uses it one operation per cycle for the terms of Eqs. (1) and
// (2) of the BWA backward search:
//   k - 1                  (sub = 1)
//   k_b = C(b) + O(b,k-1) + 1   (sub = 0, cin = 1)
//   l_b = C(b) + O(b,l)         (sub = 0, cin = 0)
// The carry input folds the "+1" of Eq. (1) into the same addition. The unit
// is purely combinational; the PE registers its result. The 32-bit width
// follows the published architecture; the carry input is this design's choice.
module pe_addsub #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,   // 1: y = a - b, 0: y = a + b + cin
  input  logic         cin,
  output logic [W-1:0] y
);

  logic [W-1:0] b_op;
  logic         c0;

  // Two's complement subtraction: a + ~b + 1.
  always_comb begin
    b_op = sub ? ~b : b;
    c0   = sub ? 1'b1 : cin;
    y    = a + b_op + W'(c0);
  end

endmodule
