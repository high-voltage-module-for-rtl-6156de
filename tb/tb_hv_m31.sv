// tb_hv_m31: exhaustive check of the 3-to-1 read-out multiplexer over all
// select codes and data inputs.
module tb_hv_m31;
  import hv_pkg::*;
  m31_sel_e sel;
  logic adt, inh, prot, y, exp;
  int checks = 0, failures = 0;

  hv_m31 dut (.sel, .adt, .inh, .prot, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++)
      for (int v = 0; v < 8; v++) begin
        sel = m31_sel_e'(s);
        {adt, inh, prot} = 3'(v);
        exp = (s == 0) ? v[2] : (s == 1) ? v[1] : v[0];
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d in=%b y=%b", s, 3'(v), y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
