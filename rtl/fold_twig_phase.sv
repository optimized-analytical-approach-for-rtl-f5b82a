// fold_twig_phase: root-to-leaves phase of the parallel-prefix sum on the
// 4-PE folded tree.
//
// How it works. The root receives 0, the identity of addition. Each active
// PE passes its incoming value S to the left and S + Lsave to the right,
// Lsave being the left operand the same tree node saved in the trunk phase.
// Three stages, one per clock edge, reuse the PEs in the reverse order of
// the trunk phase:
//   stage 1: PE4 (S = 0,            Lsave2)
//   stage 2: PE3 (S = PE4 left,     Lsave1)  PE4 (S = PE4 right, Lsave1)
//   stage 3: PE1 (S = PE3 left,     Lsave0)  PE2 (S = PE3 right, Lsave0)
//            PE3 (S = PE4 left,     Lsave0)  PE4 (S = PE4 right, Lsave0)
// So PE4 feeds PE3 and itself, and PE3 feeds PE1 and PE2. After stage 3
// the left/right result registers of PE1..PE4 hold the exclusive prefix
// sums: Out[2k] = PEk+1 left, Out[2k+1] = PEk+1 right.
//
// Interface and timing. Enable is sampled while the phase is idle; at that
// edge the 7 Lsave values on Slave[] are copied into the PEs' register
// files and stage 1 runs, so Slave[] need only be valid in the Enable
// cycle. TwigDone is high for one cycle after the third edge; Out[] is
// valid from then until the next accepted Enable. Enable is ignored while
// Busy. Reset is synchronous, active high. Slave[] order: PE1.Lsave0,
// PE2.Lsave0, PE3.Lsave0, PE4.Lsave0, PE3.Lsave1, PE4.Lsave1, PE4.Lsave2.
// The schedule follows the original design; the handshake and the copy of
// the Lsave values (which lets the trunk phase start the next block at
// once) are this design's choices.
module fold_twig_phase
  import fold_pkg::*;
(
  input  logic  Clock,
  input  logic  Reset,
  input  logic  Enable,
  input  data_t Slave [N_LSAVE],
  output data_t Out   [N_IN],
  output logic  TwigDone,
  output logic  Busy
);

  // The schedule below is written out for 8 leaves on 4 PEs in 3 stages.
  if (N_IN != 8 || N_PE != 4 || LOG2_N != 3) begin : g_size_check
    $error("folded schedule is written for N_IN = 8, N_PE = 4, LOG2_N = 3");
  end

  stage_e stage_q;
  stage_e cur;

  data_t lsv_q [N_LSAVE];     // local copy of the Lsave values
  data_t lsv   [N_LSAVE];     // values used at the coming edge
  // Registered left/right results of each PE.
  data_t l1_q, r1_q, l2_q, r2_q, l3_q, r3_q, l4_q, r4_q;

  data_t pe3_s, pe3_lsave, pe4_s, pe4_lsave;
  data_t a1, b1, a2, b2, a3, b3, a4, b4;

  always_comb begin
    if (stage_q == ST_IDLE) cur = Enable ? ST_1 : ST_IDLE;
    else                    cur = stage_q;
  end

  // In stage 1 the Lsave values come straight from the ports.
  always_comb begin
    for (int i = 0; i < N_LSAVE; i++) lsv[i] = (cur == ST_1) ? Slave[i] : lsv_q[i];
  end

  // Folded interconnect: inputs of PE3 and PE4 per stage.
  always_comb begin
    unique case (cur)
      ST_2: begin
        pe3_s = l4_q;  pe3_lsave = lsv[4];
        pe4_s = r4_q;  pe4_lsave = lsv[5];
      end
      ST_3: begin
        pe3_s = l4_q;  pe3_lsave = lsv[2];
        pe4_s = r4_q;  pe4_lsave = lsv[3];
      end
      default: begin                      // stage 1 (and idle)
        pe3_s = '0;    pe3_lsave = '0;    // PE3 idle
        pe4_s = '0;    pe4_lsave = lsv[6];
      end
    endcase
  end

  fold_single_twig u_pe12 (
    .InA(l3_q), .InB(r3_q), .SlaveA(lsv[0]), .SlaveB(lsv[1]),
    .OutA(a1), .OutB(b1), .OutC(a2), .OutD(b2)
  );

  fold_single_twig u_pe34 (
    .InA(pe3_s), .InB(pe4_s), .SlaveA(pe3_lsave), .SlaveB(pe4_lsave),
    .OutA(a3), .OutB(b3), .OutC(a4), .OutD(b4)
  );

  always_ff @(posedge Clock) begin
    if (Reset) begin
      stage_q  <= ST_IDLE;
      TwigDone <= 1'b0;
      lsv_q    <= '{default: '0};
      l1_q <= '0; r1_q <= '0; l2_q <= '0; r2_q <= '0;
      l3_q <= '0; r3_q <= '0; l4_q <= '0; r4_q <= '0;
    end else begin
      TwigDone <= 1'b0;
      unique case (cur)
        ST_1: begin
          lsv_q   <= Slave;
          l4_q    <= a4;  r4_q <= b4;
          stage_q <= ST_2;
        end
        ST_2: begin
          l3_q    <= a3;  r3_q <= b3;
          l4_q    <= a4;  r4_q <= b4;
          stage_q <= ST_3;
        end
        ST_3: begin
          l1_q    <= a1;  r1_q <= b1;
          l2_q    <= a2;  r2_q <= b2;
          l3_q    <= a3;  r3_q <= b3;
          l4_q    <= a4;  r4_q <= b4;
          stage_q <= ST_IDLE;
          TwigDone <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign Out[0] = l1_q;  assign Out[1] = r1_q;
  assign Out[2] = l2_q;  assign Out[3] = r2_q;
  assign Out[4] = l3_q;  assign Out[5] = r3_q;
  assign Out[6] = l4_q;  assign Out[7] = r4_q;
  assign Busy = (stage_q != ST_IDLE);

endmodule
