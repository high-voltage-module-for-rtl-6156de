// tb_hv_menable: directed sequence for the module enable logic: enable,
// disable, interlock opening (ME drops at once, INH latches and stays after the
// loop closes), clearing INH by a new enable, and an enable while the loop is
// still open (INH stays set).
module tb_hv_menable;
  logic clk = 0, rst, dme, le_val, intl_raw, intl_s, le, inh, me;
  int checks = 0, failures = 0;

  hv_menable dut (.clk, .rst, .dme, .le_val, .intl_raw, .intl_s, .le, .inh, .me);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic ele, input logic einh, input logic eme, input string what);
    checks++;
    if (le !== ele || inh !== einh || me !== eme) begin
      failures++;
      $display("FAIL %s: le=%b inh=%b me=%b exp %b %b %b", what, le, inh, me, ele, einh, eme);
    end
  endtask

  task automatic cmd(input logic en);
    @(negedge clk) dme = 1; le_val = en;
    @(negedge clk) dme = 0; le_val = ~en;
  endtask

  initial begin
    rst = 1; dme = 0; le_val = 0; intl_raw = 0; intl_s = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 expect3(0, 0, 0, "after reset");
    cmd(1); #1 expect3(1, 0, 1, "enabled");
    cmd(0); #1 expect3(0, 0, 0, "disabled");
    cmd(1); #1 expect3(1, 0, 1, "enabled again");
    @(negedge clk) intl_raw = 1;
    #1 expect3(1, 0, 0, "loop open, before sync");
    @(negedge clk) intl_s = 1;
    @(negedge clk) #1 expect3(1, 1, 0, "INH latched");
    intl_raw = 0; intl_s = 0;
    repeat (3) @(negedge clk);
    #1 expect3(1, 1, 0, "INH holds after loop closes");
    cmd(0); #1 expect3(0, 1, 0, "disable keeps INH");
    @(negedge clk) intl_raw = 1; intl_s = 1;
    cmd(1); #1 expect3(1, 1, 0, "enable with loop open");
    @(negedge clk) intl_raw = 0; intl_s = 0;
    cmd(1); #1 expect3(1, 0, 1, "enable clears INH");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    #1 expect3(0, 0, 0, "bus reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
