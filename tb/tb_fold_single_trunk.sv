// tb_fold_single_trunk: self-check of the trunk-phase PE pair.
//
// Random 8-bit operands; checks the 9-bit sums OutSumA = A + B and
// OutSumB = C + D (carry out included) and the saved left operands
// SlaveA = A, SlaveB = C. Watchdog included.
module tb_fold_single_trunk;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;
  data_t a, b, c, d, sa, sb;
  sum_t  osa, osb;

  fold_single_trunk dut (.A(a), .B(b), .C(c), .D(d),
                         .OutSumA(osa), .OutSumB(osb), .SlaveA(sa), .SlaveB(sb));

  task automatic apply(input int unsigned va, vb, vc, vd);
    a = data_t'(va); b = data_t'(vb); c = data_t'(vc); d = data_t'(vd);
    #1;
    checks += 4;
    if (osa != sum_t'(va + vb)) begin failures++; $display("FAIL OutSumA %0d+%0d=%0d", va, vb, osa); end
    if (osb != sum_t'(vc + vd)) begin failures++; $display("FAIL OutSumB %0d+%0d=%0d", vc, vd, osb); end
    if (sa != data_t'(va))      begin failures++; $display("FAIL SlaveA"); end
    if (sb != data_t'(vc))      begin failures++; $display("FAIL SlaveB"); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(3, 1, 2, 0);
    apply(255, 255, 255, 1);
    apply(0, 0, 128, 128);
    repeat (2000) apply($urandom_range(0, 255), $urandom_range(0, 255),
                        $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
