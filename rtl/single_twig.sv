// single_twig: one twig-phase processing element (PE).
//
// In the twig (root-to-leaves) phase a PE receives a value S from its
// parent and sends S to its left child and S + Lsave to its right child,
// where Lsave is the left operand the same tree node stored during the
// trunk phase:
//   OutA = In, OutB = In + Slave   (Kogge-Stone adder, modulo 2^DATA_W).
// Purely combinational. With 4-bit samples and 8 leaves no prefix sum
// exceeds 120, so the carry out of the adder is always zero and is not
// brought out. The behaviour follows the original twig PE; the port names
// copy the pair block (fold_single_twig) of the original design.
module single_twig
  import fold_pkg::*;
(
  input  data_t In,
  input  data_t Slave,
  output data_t OutA,
  output data_t OutB
);

  logic carry_unused;

  ks_adder #(.W(DATA_W)) u_add (
    .a   (In),
    .b   (Slave),
    .cin (1'b0),
    .sum (OutB),
    .cout(carry_unused)
  );

  assign OutA = In;

endmodule
