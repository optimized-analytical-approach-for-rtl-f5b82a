// fold_single_trunk: a pair of trunk-phase processing elements (PEs).
//
// In the trunk (leaves-to-root) phase of Blelloch's scan every PE receives
// a left value L and a right value R, keeps L as its "Lsave" value for the
// later twig phase and passes L+R towards the root. This block holds two
// such PEs side by side: PE "A" takes (A, B), PE "B" takes (C, D):
//   OutSumA = A + B, SlaveA = A,
//   OutSumB = C + D, SlaveB = C.
// Each sum comes from a Kogge-Stone adder and is DATA_W+1 bits wide, carry
// out included. Purely combinational; the caller registers the results.
// The data ports, their names and widths are those of the original block;
// it also had Load, S0 and S1 controls whose function is not known, so here
// the storing and the stage selection live in fold_trunk_phase instead.
module fold_single_trunk
  import fold_pkg::*;
(
  input  data_t A,
  input  data_t B,
  input  data_t C,
  input  data_t D,
  output sum_t  OutSumA,
  output sum_t  OutSumB,
  output data_t SlaveA,
  output data_t SlaveB
);

  ks_adder #(.W(DATA_W)) u_add_a (
    .a   (A),
    .b   (B),
    .cin (1'b0),
    .sum (OutSumA[DATA_W-1:0]),
    .cout(OutSumA[DATA_W])
  );

  ks_adder #(.W(DATA_W)) u_add_b (
    .a   (C),
    .b   (D),
    .cin (1'b0),
    .sum (OutSumB[DATA_W-1:0]),
    .cout(OutSumB[DATA_W])
  );

  assign SlaveA = A;
  assign SlaveB = C;

endmodule
