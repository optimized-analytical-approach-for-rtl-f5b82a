// tb_fold_trunk_phase: self-check of the folded trunk phase.
//
// Loads random blocks of 8 4-bit samples (and the example block
// 3 1 2 0 4 1 1 3, whose Lsave values are 3 2 4 1 4 5 6 and total 15) and
// checks, against values computed here from the samples:
//   - the 7 saved left operands on Slave[] and the total on Sum;
//   - that TrunkDone rises at the third edge counting the Load edge
//     (log2(8) stages) and lasts one cycle, with Busy high in between;
//   - that a Load while Busy is ignored (the results stay those of the
//     first block).
// Inputs change on the falling edge; checks are made on the falling edge.
module tb_fold_trunk_phase;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;

  logic             clk = 0, rst = 1, load = 0;
  logic [DIN_W-1:0] din [N_IN];
  data_t            slave [N_LSAVE];
  data_t            sum;
  logic             done, busy;

  fold_trunk_phase dut (.Clock(clk), .Reset(rst), .Load(load), .DataIn(din),
                        .Slave(slave), .Sum(sum), .TrunkDone(done), .Busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one block; if with_extra_load, pulse Load again while Busy with
  // different samples, which must be ignored.
  task automatic run_block(input int unsigned x [N_IN], input bit with_extra_load);
    int unsigned exp_sl [N_LSAVE];
    int unsigned total;
    int          cyc;
    exp_sl[0] = x[0]; exp_sl[1] = x[2]; exp_sl[2] = x[4]; exp_sl[3] = x[6];
    exp_sl[4] = x[0] + x[1]; exp_sl[5] = x[4] + x[5];
    exp_sl[6] = x[0] + x[1] + x[2] + x[3];
    total = 0;
    foreach (x[i]) total += x[i];

    @(negedge clk);
    foreach (din[i]) din[i] = DIN_W'(x[i]);
    load = 1;
    @(negedge clk);                   // Load edge has passed: stage 1 done
    load = 0;
    foreach (din[i]) din[i] = DIN_W'($urandom);
    cyc = 1;
    while (!done && cyc < 10) begin
      check(busy, "busy during stages");
      if (with_extra_load && cyc == 1) load = 1;
      @(negedge clk);
      load = 0;
      cyc++;
    end
    check(cyc == LOG2_N, $sformatf("TrunkDone after %0d edges, expected %0d", cyc, LOG2_N));
    check(done && !busy, "done and idle");
    for (int i = 0; i < N_LSAVE; i++)
      check(slave[i] == data_t'(exp_sl[i]), $sformatf("Slave[%0d]=%0d exp %0d", i, slave[i], exp_sl[i]));
    check(sum == data_t'(total), $sformatf("Sum=%0d exp %0d", sum, total));
    @(negedge clk);
    check(!done, "TrunkDone one cycle");
    check(sum == data_t'(total), "Sum held");
  endtask

  initial begin
    int unsigned x [N_IN];
    foreach (din[i]) din[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!busy && !done, "idle after reset");

    x = '{3, 1, 2, 0, 4, 1, 1, 3};
    run_block(x, 0);
    x = '{15, 15, 15, 15, 15, 15, 15, 15};
    run_block(x, 1);
    repeat (300) begin
      foreach (x[i]) x[i] = $urandom_range(0, 15);
      run_block(x, ($urandom_range(0, 3) == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
