// tb_hv_dad: drives random bus clock/data levels with random windows and
// channel selects and checks the registered DAC outputs one clock later:
// DCK = BCK inside the shift window, DIn = BDW, DL = channel selects while BCK
// is high inside the load window.
module tb_hv_dad;
  logic clk = 0, rst, bck, bdw, dce_win, dle_win, dck, din;
  logic [8:0] chsel, dl;
  logic e_dck, e_din;
  logic [8:0] e_dl;
  int checks = 0, failures = 0;

  hv_dad dut (.clk, .rst, .bck, .bdw, .dce_win, .dle_win, .chsel, .dck, .din, .dl);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bck = 0; bdw = 0; dce_win = 0; dle_win = 0; chsel = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    #1;
    checks++;
    if (dck !== 0 || dl !== 0) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      bck = 1'($urandom); bdw = 1'($urandom);
      dce_win = 1'($urandom); dle_win = ~dce_win & 1'($urandom);
      chsel = ($urandom_range(0, 3) == 0) ? 9'h1ff : 9'(1 << $urandom_range(0, 8));
      e_dck = bck & dce_win; e_din = bdw; e_dl = (bck & dle_win) ? chsel : 9'h0;
      @(negedge clk);
      checks++;
      if (dck !== e_dck || din !== e_din || dl !== e_dl) begin
        failures++;
        $display("FAIL dck=%b/%b din=%b/%b dl=%b/%b", dck, e_dck, din, e_din, dl, e_dl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
