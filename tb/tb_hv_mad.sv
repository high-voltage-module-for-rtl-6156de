// tb_hv_mad: exhaustive check of the module address decoder over every bus
// address, local address and ALL value (128 cases) against the selection rule:
// selected for writes on a match or ALL = 1, for reads only on a match with
// ALL = 0.
module tb_hv_mad;
  import hv_pkg::*;
  logic [2:0] ma, la;
  logic all, ms, rd_ok;
  int checks = 0, failures = 0;

  hv_mad dut (.ma, .all, .la, .ms, .rd_ok);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int l = 0; l < 8; l++)
        for (int b = 0; b < 2; b++) begin
          ma = 3'(a); la = 3'(l); all = b[0];
          #1;
          checks++;
          if (ms !== (b == 1 || a == l) || rd_ok !== (b == 0 && a == l)) begin
            failures++;
            $display("FAIL ma=%0d la=%0d all=%0d ms=%b rd_ok=%b", a, l, b, ms, rd_ok);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
