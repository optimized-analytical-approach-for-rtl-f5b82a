// tb_single_twig: self-check of one twig-phase PE.
//
// Drives random (In, Slave) pairs plus the corner values and checks
// OutA == In and OutB == (In + Slave) mod 256. Watchdog included.
module tb_single_twig;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;
  data_t in_v, slave_v, out_a, out_b;

  single_twig dut (.In(in_v), .Slave(slave_v), .OutA(out_a), .OutB(out_b));

  task automatic apply(input int unsigned x, input int unsigned y);
    in_v = data_t'(x); slave_v = data_t'(y);
    #1;
    checks += 2;
    if (out_a != data_t'(x))     begin failures++; $display("FAIL OutA %0d", out_a); end
    if (out_b != data_t'(x + y)) begin failures++; $display("FAIL OutB %0d+%0d=%0d", x, y, out_b); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0); apply(255, 1); apply(6, 5); apply(128, 128); apply(255, 255);
    repeat (2000) apply($urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
