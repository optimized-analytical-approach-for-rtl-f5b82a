// tb_ks_adder: exhaustive self-check of the Kogge-Stone adder.
//
// Applies every 8-bit a, every 8-bit b and both carry-in values (131072
// vectors) and compares {cout, sum} with the integer sum a + b + cin. Also
// checks a 5-bit instance (not a power of two) exhaustively. A watchdog
// counts a failure if the loop does not finish.
module tb_ks_adder;
  import fold_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] a, b, sum;
  logic       cin, cout;
  logic [4:0] a5, b5, sum5;
  logic       cin5, cout5;

  ks_adder #(.W(8)) dut   (.a(a),  .b(b),  .cin(cin),  .sum(sum),  .cout(cout));
  ks_adder #(.W(5)) dut5  (.a(a5), .b(b5), .cin(cin5), .sum(sum5), .cout(cout5));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a = 8'(ia); b = 8'(ib); cin = 1'(ic);
          #1;
          checks++;
          if ({cout, sum} != 9'(ia + ib + ic)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", ia, ib, ic, {cout, sum});
          end
        end
    for (int ia = 0; ia < 32; ia++)
      for (int ib = 0; ib < 32; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a5 = 5'(ia); b5 = 5'(ib); cin5 = 1'(ic);
          #1;
          checks++;
          if ({cout5, sum5} != 6'(ia + ib + ic)) begin
            failures++;
            if (failures < 10) $display("FAIL5 %0d + %0d + %0d = %0d", ia, ib, ic, {cout5, sum5});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
