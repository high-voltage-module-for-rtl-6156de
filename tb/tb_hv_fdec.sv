// tb_hv_fdec: runs every operation code through the function decoder with
// the two-step bus protocol (instruction step with IEn = 1, then execution
// clocks, plus two surplus clocks), and counts what it produces: strobes on the
// first execution clock, the clocks inside each window, the read-out shifts and
// the M3-1 selects on frame bits 1 and 2, and the BDR enable. Expected counts
// come from the instruction table (1, 16, 15 or 8 clocks). Also checks that
// an unselected module and a broadcast read execute nothing.
module tb_hv_fdec;
  import hv_pkg::*;
  logic clk = 0, rst, ien, ms, rd_ok, bck_rise, bck_fall;
  logic [7:0] instr;
  func_t func;
  logic dme, ooe, pset, pclr, dce_win, dle_win, acs, ack_win, sh_id, sh_adc, rme;
  m31_sel_e m31_sel;
  int checks = 0, failures = 0;

  hv_fdec dut (.clk, .rst, .ien, .ms, .rd_ok, .bck_rise, .bck_fall, .instr, .func,
               .dme, .ooe, .pset, .pclr, .dce_win, .dle_win, .acs, .ack_win,
               .sh_id, .sh_adc, .m31_sel, .rme);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  int n_dme, n_ooe, n_pset, n_pclr, n_dce, n_dle, n_ack, n_id, n_adc, n_acs, n_rme, n_inh, n_prot;
  int fall_no;
  logic bck_lvl;

  always @(posedge clk) begin
    if (dme) n_dme++;
    if (ooe) n_ooe++;
    if (pset) n_pset++;
    if (pclr) n_pclr++;
    if (bck_rise && dce_win) n_dce++;
    if (bck_rise && dle_win) n_dle++;
    if (bck_rise && ack_win) n_ack++;
    if (sh_id) n_id++;
    if (sh_adc) begin
      n_adc++;
      if (m31_sel == M31_INH) n_inh++;
      if (m31_sel == M31_PROT) n_prot++;
      if (m31_sel == M31_INH && fall_no != 1) failures++;
      if (m31_sel == M31_PROT && fall_no != 2) failures++;
    end
    if (acs) n_acs++;
    if (rme) n_rme++;
  end

  task automatic clear_counts();
    n_dme = 0; n_ooe = 0; n_pset = 0; n_pclr = 0; n_dce = 0; n_dle = 0; n_ack = 0;
    n_id = 0; n_adc = 0; n_acs = 0; n_rme = 0; n_inh = 0; n_prot = 0; fall_no = 0;
  endtask

  task automatic bus_clock();
    @(negedge clk) bck_rise = 1;
    @(negedge clk) bck_rise = 0;
    repeat (2) @(negedge clk);
    fall_no++;
    bck_fall = 1;
    @(negedge clk) bck_fall = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic run(input logic [7:0] code, input int nclk, input logic sel, input logic rdsel);
    clear_counts();
    @(negedge clk) ien = 1; ms = sel; rd_ok = rdsel;
    for (int i = 0; i < 8; i++) bus_clock();
    instr = code;
    @(negedge clk) ien = 0;
    repeat (3) @(negedge clk);
    clear_counts();
    for (int i = 0; i < nclk + 2; i++) bus_clock();
  endtask

  task automatic expect_eq(input int got, input int e, input string what, input logic [7:0] code);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL code %b %s: got %0d exp %0d", code, what, got, e);
    end
  endtask

  initial begin
    rst = 1; ien = 0; ms = 0; rd_ok = 0; bck_rise = 0; bck_fall = 0; instr = 0;
    clear_counts();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int op = 0; op < 16; op++) begin
      logic [7:0] code;
      int nclk;
      logic is_rd, is_adc, is_id, is_dme, is_set, is_clr, is_sr, is_ld;
      code = {4'(op), 4'($urandom_range(0, 8))};
      is_id  = (op == 0);
      is_sr  = (op == 1);
      is_ld  = (op == 2 || op == 3);
      is_set = (op == 4 || op == 5);
      is_clr = (op == 6 || op == 7);
      is_adc = (op >= 8 && op <= 11);
      is_dme = (op >= 12);
      is_rd  = is_id | is_adc;
      nclk   = is_id ? 8 : is_sr ? 16 : is_adc ? 15 : 1;
      run(code, nclk, 1'b1, 1'b1);
      expect_eq(n_dme,  is_dme ? 1 : 0, "dme", code);
      expect_eq(n_ooe,  is_dme ? 1 : 0, "ooe", code);
      expect_eq(n_pset, is_set ? 1 : 0, "pset", code);
      expect_eq(n_pclr, is_clr ? 1 : 0, "pclr", code);
      expect_eq(n_dce,  is_sr ? 16 : 0, "dce clocks", code);
      expect_eq(n_dle,  is_ld ? 1 : 0, "dle clocks", code);
      expect_eq(n_ack,  is_adc ? 15 : 0, "adc clocks", code);
      expect_eq(n_id,   is_id ? 8 : 0, "id shifts", code);
      expect_eq(n_adc,  is_adc ? 15 : 0, "adc shifts", code);
      expect_eq(n_inh,  is_adc ? 1 : 0, "inh bit", code);
      expect_eq(n_prot, is_adc ? 1 : 0, "prot bit", code);
      expect_eq(int'(n_acs > 0), is_adc ? 1 : 0, "acs", code);
      expect_eq(int'(n_rme > 0), is_rd ? 1 : 0, "rme", code);
      expect_eq(int'(func.le_val), (op >= 12 && op <= 13) ? 1 : 0, "le_val", code);
      expect_eq(int'(func.ch_all), (is_ld || is_set || is_clr) ? op % 2 : 0, "ch_all", code);
      // the same instruction for another module: nothing happens
      run(code, nclk, 1'b0, 1'b0);
      expect_eq(n_dme + n_pset + n_pclr + n_dce + n_dle + n_ack + n_id + n_adc + n_rme,
                0, "unselected", code);
      // a broadcast: writes execute, reads do not
      run(code, nclk, 1'b1, 1'b0);
      expect_eq(n_id + n_adc + n_rme + n_acs, 0, "broadcast read", code);
      expect_eq(n_dme + n_pset + n_pclr + n_dce + n_dle,
                is_dme + is_set + is_clr + (is_sr ? 16 : 0) + is_ld, "broadcast write", code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
