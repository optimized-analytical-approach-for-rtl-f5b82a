// fold_trunk_phase: leaves-to-root phase of the parallel-prefix sum on a
// binary tree of 7 nodes folded onto 4 processing elements (PEs).
//
// How it works. The 8 samples enter as the leaves. Three stages follow,
// one per clock edge, and the PEs are reused from stage to stage:
//   stage 1: PE1 (x0,x1)  PE2 (x2,x3)  PE3 (x4,x5)  PE4 (x6,x7)
//   stage 2: PE3 (PE1,PE2 results)     PE4 (PE3,PE4 results)
//   stage 3: PE4 (PE3,PE4 results)  -> the total at the root
// In every stage an active PE stores its left operand in its own register
// file at the address of the stage (Lsave0, Lsave1, Lsave2) and registers
// L+R for the next stage. So PE1/PE2 feed PE3 and PE3/PE4 feed PE4 — the
// folded interconnect. PE1 and PE2 form one fold_single_trunk pair and PE3
// and PE4 the other; only the second pair's inputs are multiplexed.
//
// Interface and timing. Load is sampled while the phase is idle; at that
// edge DataIn is taken as the leaves and stage 1 is performed, so DataIn
// need only be valid in the Load cycle. Stages 2 and 3 follow on the next
// two edges; TrunkDone is high for one cycle after the third edge, with
// Sum (total of the 8 samples) and the 7 Lsave values on Slave[] valid from
// then until the next accepted Load. Busy is high during stages 2 and 3;
// Load is ignored while Busy. A new block can be loaded in the cycle
// TrunkDone is high, giving one block per 3 cycles. Reset is synchronous,
// active high.
//
// Slave[] order (this design's choice): PE1.Lsave0, PE2.Lsave0, PE3.Lsave0,
// PE4.Lsave0, PE3.Lsave1, PE4.Lsave1, PE4.Lsave2 — the left operand of each
// tree node from the leaves upward, as the twig phase expects it. The
// schedule and the per-PE Lsave addresses follow the original design; the
// Load/Busy/TrunkDone handshake and the skipped input register are this
// design's choices.
module fold_trunk_phase
  import fold_pkg::*;
(
  input  logic             Clock,
  input  logic             Reset,
  input  logic             Load,
  input  logic [DIN_W-1:0] DataIn [N_IN],
  output data_t            Slave  [N_LSAVE],
  output data_t            Sum,
  output logic             TrunkDone,
  output logic             Busy
);

  // The schedule below is written out for 8 leaves on 4 PEs in 3 stages.
  if (N_IN != 8 || N_PE != 4 || LOG2_N != 3) begin : g_size_check
    $error("folded schedule is written for N_IN = 8, N_PE = 4, LOG2_N = 3");
  end

  stage_e stage_q;      // next stage to run; ST_IDLE waits for Load
  stage_e cur;          // stage performed at the coming edge

  // Register file of each PE, address = stage - 1 (PE1/PE2 use address 0,
  // PE3 addresses 0-1, PE4 addresses 0-2).
  data_t rf1_q, rf2_q;
  data_t rf3_q [2];
  data_t rf4_q [3];
  // Registered result (L+R) of each PE.
  data_t o1_q, o2_q, o3_q, o4_q;

  data_t leaf [N_IN];
  data_t pe3_l, pe3_r, pe4_l, pe4_r;
  sum_t  s1, s2, s3, s4;
  data_t l1, l2, l3, l4;

  always_comb begin
    for (int i = 0; i < N_IN; i++) leaf[i] = data_t'(DataIn[i]);
  end

  always_comb begin
    if (stage_q == ST_IDLE) cur = Load ? ST_1 : ST_IDLE;
    else                    cur = stage_q;
  end

  // Folded interconnect: inputs of PE3 and PE4 per stage.
  always_comb begin
    unique case (cur)
      ST_2: begin
        pe3_l = o1_q;    pe3_r = o2_q;
        pe4_l = o3_q;    pe4_r = o4_q;
      end
      ST_3: begin
        pe3_l = '0;      pe3_r = '0;     // PE3 idle
        pe4_l = o3_q;    pe4_r = o4_q;
      end
      default: begin                     // stage 1 (and idle)
        pe3_l = leaf[4]; pe3_r = leaf[5];
        pe4_l = leaf[6]; pe4_r = leaf[7];
      end
    endcase
  end

  fold_single_trunk u_pe12 (
    .A(leaf[0]), .B(leaf[1]), .C(leaf[2]), .D(leaf[3]),
    .OutSumA(s1), .OutSumB(s2), .SlaveA(l1), .SlaveB(l2)
  );

  fold_single_trunk u_pe34 (
    .A(pe3_l), .B(pe3_r), .C(pe4_l), .D(pe4_r),
    .OutSumA(s3), .OutSumB(s4), .SlaveA(l3), .SlaveB(l4)
  );

  // The carry out of every PE sum is zero for 4-bit samples (total <= 120),
  // so results are kept at DATA_W bits.
  always_ff @(posedge Clock) begin
    if (Reset) begin
      stage_q   <= ST_IDLE;
      TrunkDone <= 1'b0;
      rf1_q <= '0; rf2_q <= '0;
      rf3_q <= '{default: '0};
      rf4_q <= '{default: '0};
      o1_q <= '0; o2_q <= '0; o3_q <= '0; o4_q <= '0;
    end else begin
      TrunkDone <= 1'b0;
      unique case (cur)
        ST_1: begin
          rf1_q    <= l1;  o1_q <= s1[DATA_W-1:0];
          rf2_q    <= l2;  o2_q <= s2[DATA_W-1:0];
          rf3_q[0] <= l3;  o3_q <= s3[DATA_W-1:0];
          rf4_q[0] <= l4;  o4_q <= s4[DATA_W-1:0];
          stage_q  <= ST_2;
        end
        ST_2: begin
          rf3_q[1] <= l3;  o3_q <= s3[DATA_W-1:0];
          rf4_q[1] <= l4;  o4_q <= s4[DATA_W-1:0];
          stage_q  <= ST_3;
        end
        ST_3: begin
          rf4_q[2] <= l4;  o4_q <= s4[DATA_W-1:0];
          stage_q  <= ST_IDLE;
          TrunkDone <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign Slave[0] = rf1_q;
  assign Slave[1] = rf2_q;
  assign Slave[2] = rf3_q[0];
  assign Slave[3] = rf4_q[0];
  assign Slave[4] = rf3_q[1];
  assign Slave[5] = rf4_q[1];
  assign Slave[6] = rf4_q[2];
  assign Sum  = o4_q;
  assign Busy = (stage_q != ST_IDLE);

endmodule
