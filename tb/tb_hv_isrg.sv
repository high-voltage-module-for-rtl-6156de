// tb_hv_isrg: shifts random instruction bytes into the instruction register,
// MSB first, and checks the stored code; checks that it holds when IEn = 0,
// when the module is not selected, and between bus clock edges.
module tb_hv_isrg;
  import hv_pkg::*;
  logic clk = 0, rst, ien, ms, bck_rise, bdw;
  logic [7:0] instr, exp;
  int checks = 0, failures = 0;

  hv_isrg dut (.clk, .rst, .ien, .ms, .bck_rise, .bdw, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] code, input logic en, input logic sel);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); ien = en; ms = sel; bdw = code[i]; bck_rise = 1;
      @(negedge clk); bck_rise = 0; bdw = ~code[i];
      @(negedge clk);
    end
    ien = 0;
  endtask

  task automatic check(input logic [7:0] e, input string what);
    @(negedge clk);
    checks++;
    if (instr !== e) begin
      failures++;
      $display("FAIL %s: instr=%h exp=%h", what, instr, e);
    end
  endtask

  initial begin
    rst = 1; ien = 0; ms = 0; bck_rise = 0; bdw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(8'h00, "reset");
    exp = 8'h00;
    for (int n = 0; n < 50; n++) begin
      logic [7:0] code;
      int mode;
      code = 8'($urandom);
      mode = $urandom_range(0, 3);
      case (mode)
        0: send(code, 1'b1, 1'b0);        // not selected: hold
        1: send(code, 1'b0, 1'b1);        // IEn low: hold
        default: begin send(code, 1'b1, 1'b1); exp = code; end
      endcase
      check(exp, "after send");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
