// tb_fold_sensor_node: end-to-end self-check of the folded-tree prefix-sum
// processor at its default size (8 samples of 4 bits, 4 PEs).
//
// A scoreboard records every block whose Load is accepted (Load high while
// Busy is low) and the exclusive prefix sums and total computed here
// directly from the samples; every Done pulse is matched with the oldest
// block, its outputs compared and its latency checked (Done at the 6th
// edge counting the Load edge: 3 trunk + 3 twig stages). Traffic mixes
// isolated blocks, back-to-back streaming (a new block enters the trunk
// phase while the previous one is in the twig phase), Loads that arrive
// while Busy (must be ignored), all-maximum samples (largest total, 120)
// and a reset in the middle of a block (its results must never appear).
// Each of these mechanisms is counted and a failure is recorded for any
// that never happened. The example block 3 1 2 0 4 1 1 3 must give
// 0 3 4 6 6 10 11 12 with total 15.
module tb_fold_sensor_node;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;

  logic             clk = 0, rst = 1, load = 0;
  logic [DIN_W-1:0] din [N_IN];
  data_t            outv [N_IN];
  data_t            total;
  logic             busy, done;

  fold_sensor_node dut (
    .Clock(clk), .Reset(rst), .Load(load),
    .DataInA(din[0]), .DataInB(din[1]), .DataInC(din[2]), .DataInD(din[3]),
    .DataInE(din[4]), .DataInF(din[5]), .DataInG(din[6]), .DataInH(din[7]),
    .Outa(outv[0]), .Outb(outv[1]), .Outc(outv[2]), .Outd(outv[3]),
    .Oute(outv[4]), .Outf(outv[5]), .Outg(outv[6]), .Outh(outv[7]),
    .Total(total), .Busy(busy), .Done(done)
  );

  always #5 clk = ~clk;

  typedef struct {
    int unsigned pre [N_IN];
    int unsigned tot;
    int          cycle;
  } exp_t;

  exp_t exp_q [$];
  int   cycle = 0;
  int   blocks_done = 0;
  // mechanism counters
  int   n_trunk = 0, n_twig = 0, n_stream = 0, n_ignored = 0, n_max = 0, n_reset = 0;
  int   n_example = 0, n_total_ok = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst && dut.u_trunk.TrunkDone) n_trunk++;
  always @(posedge clk) if (!rst && dut.u_twig.TwigDone)   n_twig++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Called at a falling edge, after the previous rising edge's results.
  task automatic monitor();
    if (done) begin
      exp_t e;
      check(exp_q.size() > 0, "Done without a pending block");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(cycle - e.cycle == 2 * LOG2_N - 1,
              $sformatf("latency %0d edges after the Load edge, expected %0d", cycle - e.cycle, 2 * LOG2_N - 1));
        for (int i = 0; i < N_IN; i++)
          check(outv[i] == data_t'(e.pre[i]),
                $sformatf("Out[%0d]=%0d exp %0d", i, outv[i], e.pre[i]));
        if (e.pre[1] == 3 && e.pre[7] == 12 && e.tot == 15 && outv[5] == 10) n_example++;
        blocks_done++;
      end
    end
  endtask

  // One cycle of traffic: optionally present a block with Load.
  task automatic step(input bit do_load, input int unsigned x [N_IN]);
    @(negedge clk);
    monitor();
    load = do_load;
    foreach (din[i]) din[i] = DIN_W'(x[i]);
    if (do_load) begin
      if (busy) n_ignored++;
      else begin
        exp_t e;
        int unsigned acc = 0;
        for (int i = 0; i < N_IN; i++) begin
          e.pre[i] = acc;
          acc += x[i];
        end
        e.tot = acc;
        e.cycle = cycle + 1;           // accepted at the coming edge
        if (dut.u_twig.Busy || dut.u_trunk.TrunkDone) n_stream++;
        if (acc == 8 * ((1 << DIN_W) - 1)) n_max++;
        exp_q.push_back(e);
      end
    end
  endtask

  task automatic idle(input int n);
    int unsigned z [N_IN];
    foreach (z[i]) z[i] = $urandom_range(0, 15);
    repeat (n) step(0, z);
  endtask

  task automatic rand_block(output int unsigned x [N_IN]);
    foreach (x[i]) x[i] = $urandom_range(0, 15);
  endtask

  initial begin
    int unsigned x [N_IN];
    foreach (din[i]) din[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // The example block, alone; then check Total once the trunk is done.
    x = '{3, 1, 2, 0, 4, 1, 1, 3};
    step(1, x);
    idle(3);
    check(total == 15, $sformatf("Total=%0d exp 15", total));
    if (total == 15) n_total_ok++;
    idle(6);

    // All-maximum samples.
    x = '{15, 15, 15, 15, 15, 15, 15, 15};
    step(1, x);
    idle(3);
    check(total == 120, $sformatf("Total=%0d exp 120", total));
    if (total == 120) n_total_ok++;
    idle(6);

    // Reset in the middle of a block: nothing may come out of it.
    rand_block(x);
    step(1, x);
    idle(2);
    @(negedge clk);
    rst = 1;
    exp_q.delete();
    n_reset++;
    @(negedge clk);
    rst = 0;
    idle(10);

    // Random traffic: streaming, isolated blocks and Loads while Busy.
    repeat (3000) begin
      int unsigned r = $urandom_range(0, 9);
      rand_block(x);
      if (r < 5)      step(!busy, x);      // stream whenever possible
      else if (r < 8) step(1, x);          // may hit Busy and be ignored
      else            step(0, x);
    end
    idle(10);

    check(exp_q.size() == 0, $sformatf("%0d blocks never finished", exp_q.size()));
    $display("blocks=%0d trunk_phases=%0d twig_phases=%0d streamed=%0d ignored_loads=%0d max_blocks=%0d resets=%0d example=%0d",
             blocks_done, n_trunk, n_twig, n_stream, n_ignored, n_max, n_reset, n_example);
    check(n_trunk > 0,   "trunk phase never ran");
    check(n_twig > 0,    "twig phase never ran");
    check(n_stream > 0,  "no block streamed behind another");
    check(n_ignored > 0, "no Load was ignored while busy");
    check(n_max > 0,     "no all-maximum block");
    check(n_reset > 0,   "no reset during a block");
    check(n_example > 0, "example block not seen");
    check(n_total_ok == 2, "Total checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
