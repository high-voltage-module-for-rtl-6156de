// tb_hv_sr5: loads ID codes into the module data register, shifts them out and
// checks the bit stream on bdr (ID MSB first, then zeros); passes random M3-1
// bits and checks they appear on bdr while the ID is kept.
module tb_hv_sr5;
  import hv_pkg::*;
  logic clk = 0, rst, load, sh_id, sh_adc, m31_y, bdr;
  logic [4:0] id, sr;
  int checks = 0, failures = 0;

  hv_sr5 dut (.clk, .rst, .load, .id, .sh_id, .sh_adc, .m31_y, .sr, .bdr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, e);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    rst = 1; load = 0; sh_id = 0; sh_adc = 0; m31_y = 0; id = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20; n++) begin
      logic [4:0] code;
      code = 5'($urandom);
      id = code;
      pulse(load);
      id = ~code;                       // straps change after the load
      @(negedge clk);
      checks++;
      if (sr !== code) begin failures++; $display("FAIL load sr=%b exp=%b", sr, code); end
      // ADC bits pass through the output flop, ID is kept
      for (int k = 0; k < 6; k++) begin
        logic b;
        b = 1'($urandom);
        m31_y = b;
        pulse(sh_adc);
        m31_y = ~b;
        @(negedge clk);
        chk(bdr, b, "adc bit");
      end
      checks++;
      if (sr !== code) begin failures++; $display("FAIL id lost sr=%b", sr); end
      // 8-clock read of the module data register
      for (int k = 0; k < 8; k++) begin
        pulse(sh_id);
        @(negedge clk);
        chk(bdr, (k < 5) ? code[4-k] : 1'b0, "id bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
