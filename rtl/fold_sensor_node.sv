// fold_sensor_node: folded-tree parallel-prefix processor for a wireless
// sensor node.
//
// A sensor node saves radio energy by reducing many samples to a few
// useful values before transmitting. This processor computes the
// exclusive prefix sum of a block of 8 samples (Outa..Outh = 0, x0, x0+x1,
// ..., x0+..+x6) together with the block total, using Blelloch's two-phase
// scan on a binary tree. The 7-node tree is folded onto 4 PEs: the trunk
// phase (fold_trunk_phase) runs leaves to root in 3 clock edges and leaves
// one saved left operand per tree node; the twig phase (fold_twig_phase)
// runs root to leaves in 3 more edges. All additions use Kogge-Stone adders.
//
// Interface and timing. Pulse Load for one cycle with the 4-bit samples on
// DataInA..DataInH (A = first sample). The trunk phase starts at that edge;
// its done pulse enables the twig phase; Done is high for one cycle after
// the 6th clock edge counting the Load edge, and Outa..Outh (8 bits) are
// valid from then until the twig phase of the next block starts. Total is
// the sum of the 8 samples, valid after the 3rd edge counting the Load edge
// until the next Load is accepted. A Load is accepted while Busy is low,
// including the cycle in which the previous block leaves the trunk phase,
// so blocks can stream at one per 3 cycles with the two phases working on
// consecutive blocks; a Load while Busy is high is ignored. Reset is
// synchronous and active high.
//
// The port names DataInA..H, Clock, Load, Reset and Outa..h and their
// widths are those of the original top level, as is the split into a trunk
// block and a twig block joined by the 7 saved operands and a trunk-done
// signal. Done, Busy and Total are additions of this design.
module fold_sensor_node
  import fold_pkg::*;
(
  input  logic             Clock,
  input  logic             Reset,
  input  logic             Load,
  input  logic [DIN_W-1:0] DataInA,
  input  logic [DIN_W-1:0] DataInB,
  input  logic [DIN_W-1:0] DataInC,
  input  logic [DIN_W-1:0] DataInD,
  input  logic [DIN_W-1:0] DataInE,
  input  logic [DIN_W-1:0] DataInF,
  input  logic [DIN_W-1:0] DataInG,
  input  logic [DIN_W-1:0] DataInH,
  output data_t            Outa,
  output data_t            Outb,
  output data_t            Outc,
  output data_t            Outd,
  output data_t            Oute,
  output data_t            Outf,
  output data_t            Outg,
  output data_t            Outh,
  output data_t            Total,
  output logic             Busy,
  output logic             Done
);

  logic [DIN_W-1:0] data_in [N_IN];
  data_t            slave   [N_LSAVE];
  data_t            out     [N_IN];
  logic             trunk_done, twig_busy;

  assign data_in = '{DataInA, DataInB, DataInC, DataInD,
                     DataInE, DataInF, DataInG, DataInH};

  fold_trunk_phase u_trunk (
    .Clock    (Clock),
    .Reset    (Reset),
    .Load     (Load),
    .DataIn   (data_in),
    .Slave    (slave),
    .Sum      (Total),
    .TrunkDone(trunk_done),
    .Busy     (Busy)
  );

  fold_twig_phase u_twig (
    .Clock   (Clock),
    .Reset   (Reset),
    .Enable  (trunk_done),
    .Slave   (slave),
    .Out     (out),
    .TwigDone(Done),
    .Busy    (twig_busy)
  );

  assign Outa = out[0];
  assign Outb = out[1];
  assign Outc = out[2];
  assign Outd = out[3];
  assign Oute = out[4];
  assign Outf = out[5];
  assign Outg = out[6];
  assign Outh = out[7];

  // Both phases last 3 edges, so the trunk can never hand over a block
  // while the twig phase is still busy.
  a_twig_free: assert property (@(posedge Clock) disable iff (Reset)
                                trunk_done |-> !twig_busy)
    else $error("trunk phase finished while twig phase busy");

endmodule
