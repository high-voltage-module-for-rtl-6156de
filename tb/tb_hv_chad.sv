// tb_hv_chad: exhaustive check of the channel address decoder: each address
// 0..8 selects exactly its own channel, 9..15 select none, and the all-channels
// input selects all nine whatever the address.
module tb_hv_chad;
  import hv_pkg::*;
  logic [3:0] ch;
  logic ch_all;
  logic [8:0] sel, exp;
  int checks = 0, failures = 0;

  hv_chad dut (.ch, .ch_all, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 2; b++) begin
        ch = 4'(a); ch_all = b[0];
        exp = (b == 1) ? 9'h1ff : (a < 9 ? 9'(1 << a) : 9'h000);
        #1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL ch=%0d all=%0d sel=%b exp=%b", a, b, sel, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
