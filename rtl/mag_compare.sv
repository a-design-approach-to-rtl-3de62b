// mag_compare: magnitude comparator (A > B, A = B), the building block used
// four times in the controllers (comparators A and B in the input controller,
// C and D in the output controller).  Purely combinational.
module mag_compare #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_gt_b,
  output logic         a_eq_b
);
  always_comb begin
    a_gt_b = (a > b);
    a_eq_b = (a == b);
  end
endmodule
