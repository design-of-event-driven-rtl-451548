// comparator: unsigned magnitude comparator used by the CMP instruction.
//
// Compares a (R0) with b (Rn) and gives one-hot eq, gt, lt. The source
// document only names a comparator as part of the processor; what it
// compares, and that the comparison is unsigned, are this design's choices.
// Purely combinational.
module comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq,
  output logic         gt,
  output logic         lt
);

  always_comb begin
    eq = (a == b);
    gt = (a > b);
    lt = (a < b);
  end

endmodule
