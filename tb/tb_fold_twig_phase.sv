// tb_fold_twig_phase: self-check of the folded twig phase.
//
// Feeds random Lsave values (full 8-bit range, results taken modulo 256)
// and the Lsave values of the example block 3 1 2 0 4 1 1 3, which must
// give the exclusive prefix sums 0 3 4 6 6 10 11 12. The expected outputs
// are computed here by walking the 7-node tree from the root:
//   root S=0 -> (0, L2); level 1: (0, L1a), (L2, L2+L1b);
//   leaves: (0, L0a), (L1a, L1a+L0b), (L2, L2+L0c), (L2+L1b, L2+L1b+L0d).
// Also checks that TwigDone rises at the third edge counting the Enable
// edge, lasts one cycle, that Slave[] may change after the Enable edge,
// and that Out[] holds while idle.
module tb_fold_twig_phase;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;

  logic  clk = 0, rst = 1, en = 0;
  data_t slave [N_LSAVE];
  data_t out   [N_IN];
  logic  done, busy;

  fold_twig_phase dut (.Clock(clk), .Reset(rst), .Enable(en), .Slave(slave),
                       .Out(out), .TwigDone(done), .Busy(busy));

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

  task automatic run_block(input int unsigned l [N_LSAVE]);
    int unsigned e [N_IN];
    int          cyc;
    e[0] = 0;                 e[1] = l[0];
    e[2] = l[4];              e[3] = l[4] + l[1];
    e[4] = l[6];              e[5] = l[6] + l[2];
    e[6] = l[6] + l[5];       e[7] = l[6] + l[5] + l[3];

    @(negedge clk);
    foreach (slave[i]) slave[i] = data_t'(l[i]);
    en = 1;
    @(negedge clk);
    en = 0;
    foreach (slave[i]) slave[i] = data_t'($urandom);   // must not matter now
    cyc = 1;
    while (!done && cyc < 10) begin
      check(busy, "busy during stages");
      @(negedge clk);
      cyc++;
    end
    check(cyc == LOG2_N, $sformatf("TwigDone after %0d edges, expected %0d", cyc, LOG2_N));
    for (int i = 0; i < N_IN; i++)
      check(out[i] == data_t'(e[i]), $sformatf("Out[%0d]=%0d exp %0d", i, out[i], data_t'(e[i])));
    repeat (2) @(negedge clk);
    check(!done && !busy, "TwigDone one cycle, idle");
    for (int i = 0; i < N_IN; i++)
      check(out[i] == data_t'(e[i]), $sformatf("Out[%0d] held", i));
  endtask

  initial begin
    int unsigned l [N_LSAVE];
    foreach (slave[i]) slave[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    l = '{3, 2, 4, 1, 4, 5, 6};
    run_block(l);
    check(out[0] == 0 && out[1] == 3 && out[2] == 4 && out[3] == 6 &&
          out[4] == 6 && out[5] == 10 && out[6] == 11 && out[7] == 12, "example outputs");
    repeat (300) begin
      foreach (l[i]) l[i] = $urandom_range(0, 255);
      run_block(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
