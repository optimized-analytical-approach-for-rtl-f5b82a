// tb_fold_single_twig: self-check of the twig-phase PE pair.
//
// Random inputs; checks OutA = InA, OutB = InA + SlaveA, OutC = InB,
// OutD = InB + SlaveB (mod 256), including the Fig.-style example where
// S = 6 and Lsave = 4 gives (6, 10). Watchdog included.
module tb_fold_single_twig;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;
  data_t in_a, in_b, sl_a, sl_b, oa, ob, oc, od;

  fold_single_twig dut (.InA(in_a), .InB(in_b), .SlaveA(sl_a), .SlaveB(sl_b),
                        .OutA(oa), .OutB(ob), .OutC(oc), .OutD(od));

  task automatic apply(input int unsigned ia, ib, sa, sb);
    in_a = data_t'(ia); in_b = data_t'(ib); sl_a = data_t'(sa); sl_b = data_t'(sb);
    #1;
    checks += 4;
    if (oa != data_t'(ia))      begin failures++; $display("FAIL OutA"); end
    if (ob != data_t'(ia + sa)) begin failures++; $display("FAIL OutB %0d", ob); end
    if (oc != data_t'(ib))      begin failures++; $display("FAIL OutC"); end
    if (od != data_t'(ib + sb)) begin failures++; $display("FAIL OutD %0d", od); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(6, 11, 4, 1);
    apply(0, 0, 0, 0);
    apply(255, 255, 1, 255);
    repeat (2000) apply($urandom_range(0, 255), $urandom_range(0, 255),
                        $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
