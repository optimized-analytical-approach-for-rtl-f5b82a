// fold_single_twig: a pair of twig-phase processing elements.
//
// Two single_twig PEs side by side. PE "A" takes InA with its saved left
// operand SlaveA, PE "B" takes InB with SlaveB:
//   OutA = InA, OutB = InA + SlaveA,
//   OutC = InB, OutD = InB + SlaveB.
// Purely combinational; the caller registers the results. The data ports,
// their names and widths are those of the original block; it also had
// Enable, S0 and S1 controls whose function is not known, so here the
// sequencing and input selection live in fold_twig_phase instead.
module fold_single_twig
  import fold_pkg::*;
(
  input  data_t InA,
  input  data_t InB,
  input  data_t SlaveA,
  input  data_t SlaveB,
  output data_t OutA,
  output data_t OutB,
  output data_t OutC,
  output data_t OutD
);

  single_twig u_pe_a (.In(InA), .Slave(SlaveA), .OutA(OutA), .OutB(OutB));
  single_twig u_pe_b (.In(InB), .Slave(SlaveB), .OutA(OutC), .OutB(OutD));

endmodule
