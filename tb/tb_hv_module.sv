// tb_hv_module: end-to-end test of two HV modules on one crate local bus, at
// the design's default sizes.
//
// Each module is surrounded by behavioural models of its analog parts: nine
// serial DACs, the multiplexer and ADC, and a channel model in which the output
// voltage of a channel (in ADC codes) follows its DAC code, one clock later,
// while its cluster is enabled and is 0 otherwise, the load current is a quarter of that plus an
// injectable extra, and the comparators raise UPr/IPr above per-channel limits.
// A crate-controller model drives the bus: 8 instruction clocks with IEn = 1,
// then the execution clocks, sampling BDR at the end of each low phase.
//
// The test sets all 18 channels, reads them back through the ADC, trips
// overvoltage and overcurrent protection, sets and clears protection latches
// per channel and for all channels, opens the interlock loop, uses broadcast
// writes and a (refused) broadcast read, addresses one module while checking
// the other stays untouched, disables the modules and applies the bus reset.
// It counts every mechanism and fails if one never happened; it also checks
// the clock counts of the DAC (16) and ADC (15) transfers.
module tb_hv_module;
  import hv_pkg::*;

  localparam int NM = 2;
  localparam int H  = 5;                       // BCK half period, in clk cycles
  localparam logic [2:0] LA [NM] = '{3'd3, 3'd5};
  localparam logic [4:0] ID [NM] = '{5'h15, 5'h0a};

  logic clk = 0, rst_n;
  logic bck, bdw, ien, all, bres;
  logic [2:0] ma;
  logic [NM-1:0] bdr, bdr_oe, dck, din, acs, ack, adt, amux_cur, me, le, rled, led_intl;
  logic [NM-1:0][3:0] amux_ch;
  logic [NM-1:0][8:0] dl, upr, ipr, lat_u, lat_i;
  logic [NM-1:0][2:0] cl_en;
  logic [NM-1:0] intl;
  logic bdr_bus;

  // analog side
  logic [NM-1:0][8:0][11:0] dac_code, u_mon, i_mon, u_lim, i_lim, i_extra;
  int dac_pulses [NM][9];
  int adc_clocks [NM];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar m = 0; m < NM; m++) begin : g_mod
    hv_module dut (
      .clk, .rst_n, .la(LA[m]), .id(ID[m]),
      .bck, .bdw, .bdr(bdr[m]), .bdr_oe(bdr_oe[m]), .ien, .ma, .all, .bres,
      .dck(dck[m]), .din(din[m]), .dl(dl[m]),
      .acs(acs[m]), .ack(ack[m]), .adt(adt[m]), .amux_ch(amux_ch[m]), .amux_cur(amux_cur[m]),
      .upr(upr[m]), .ipr(ipr[m]), .intl(intl[m]),
      .cl_en(cl_en[m]), .me(me[m]), .le(le[m]), .rled(rled[m]), .led_intl(led_intl[m]),
      .lat_u(lat_u[m]), .lat_i(lat_i[m])
    );

    for (genvar c = 0; c < 9; c++) begin : g_dac
      hv_dac_model dac (.dck(dck[m]), .din(din[m]), .ld(dl[m][c]),
                        .code(dac_code[m][c]), .pulses(dac_pulses[m][c]));
      // the converter output follows its DAC one clock later (it cannot jump)
      always_ff @(posedge clk) u_mon[m][c] <= cl_en[m][c / 3] ? dac_code[m][c] : 12'h000;
      always_comb begin
        i_mon[m][c] = (u_mon[m][c] >> 2) + i_extra[m][c];
        upr[m][c]   = u_mon[m][c] > u_lim[m][c];
        ipr[m][c]   = i_mon[m][c] > i_lim[m][c];
      end
    end

    hv_adc_model adc (.acs(acs[m]), .ack(ack[m]), .ch(amux_ch[m]), .cur(amux_cur[m]),
                      .u_mon(u_mon[m]), .i_mon(i_mon[m]), .adt(adt[m]), .clocks(adc_clocks[m]));
  end

  always_comb begin
    bdr_bus = 1'b0;
    for (int m = 0; m < NM; m++) if (bdr_oe[m]) bdr_bus = bdr_bus | bdr[m];
  end

  // Only one module may drive the read line.
  always @(posedge clk) if ($countones(bdr_oe) > 1) begin
    failures++;
    $display("FAIL two modules drive BDR");
  end

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_ENABLE, M_DISABLE, M_ID_READ, M_DAC_SR, M_DAC_LD_CH, M_DAC_LD_ALL, M_ADC_U, M_ADC_I,
    M_OVERVOLT, M_OVERCUR, M_PSET_CH, M_PSET_ALL, M_PCLR_CH, M_PCLR_ALL, M_INTERLOCK,
    M_BCAST, M_BCAST_READ, M_UNSELECTED, M_BRES, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"enable", "disable", "id read", "dac shift", "dac load ch",
    "dac load all", "adc voltage", "adc current", "overvoltage trip", "overcurrent trip",
    "set prot ch", "set prot all", "clear prot ch", "clear prot all", "interlock",
    "broadcast write", "broadcast read refused", "unselected module", "bus reset"};

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus tasks
  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask

  // one bus clock; BDW set during the low phase, BDR sampled at its end
  task automatic bus_clock(input logic w, output logic r);
    bdw = w;
    wait_clk(H);
    bck = 1;
    wait_clk(H);
    bck = 0;
    wait_clk(H);
    r = bdr_bus;
  endtask

  task automatic instr(input logic [2:0] a, input logic bc, input logic [7:0] code);
    logic r;
    ma = a; all = bc;
    wait_clk(H);
    ien = 1;
    for (int i = 7; i >= 0; i--) bus_clock(code[i], r);
    wait_clk(H);
    ien = 0;
    wait_clk(H);
  endtask

  task automatic execute(input int n, input logic [15:0] wdata, output logic [15:0] rdata);
    logic r;
    rdata = '0;
    for (int i = 0; i < n; i++) begin
      bus_clock(wdata[n - 1 - i], r);
      rdata = {rdata[14:0], r};
    end
    wait_clk(H);
  endtask

  task automatic op(input logic [2:0] a, input logic bc, input logic [7:0] code,
                    input int n, input logic [15:0] wdata, output logic [15:0] rdata);
    instr(a, bc, code);
    execute(n, wdata, rdata);
  endtask

  task automatic wr(input int m, input logic bc, input logic [3:0] opc, input logic [3:0] ch);
    logic [15:0] r;
    op(LA[m], bc, {opc, ch}, 1, 16'h0, r);
  endtask

  task automatic set_dac(input int m, input logic bc, input int ch, input logic [11:0] v);
    logic [15:0] r;
    int p0;
    p0 = dac_pulses[m][0];
    op(LA[m], bc, {OP_DAC_SR_ALL, 4'h0}, 16, {4'ha, v}, r);
    chk(dac_pulses[m][0] - p0 == 16, "16 DAC clocks per word");
    mech[M_DAC_SR]++;
    op(LA[m], bc, {OP_DAC_LD_CH, 4'(ch)}, 1, 16'h0, r);
    mech[M_DAC_LD_CH]++;
  endtask

  // ADC read; returns the 15-bit frame as seen by the controller
  task automatic adc(input int m, input int ch, input logic cur, output logic [14:0] f);
    logic [15:0] r;
    op(LA[m], 1'b0, {3'b100, cur, 4'(ch)}, 15, 16'h0, r);
    f = r[14:0];
    chk(adc_clocks[m] == 15, "15 ADC clocks per conversion");
    if (cur) mech[M_ADC_I]++; else mech[M_ADC_U]++;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // expected frame: INH, latch, meaningless leading bit (1 in the model), data
  function automatic logic [14:0] frame(input logic inh, input logic p, input logic [11:0] d);
    return {inh, p, 1'b1, d};
  endfunction

  task automatic check_all_adc(input int m);
    logic [14:0] f;
    for (int c = 0; c < 9; c++) begin
      adc(m, c, 1'b0, f);
      chk(f == frame(led_intl[m], lat_u[m][c], u_mon[m][c]), $sformatf("m%0d ch%0d voltage frame %h", m, c, f));
      adc(m, c, 1'b1, f);
      chk(f == frame(led_intl[m], lat_i[m][c], i_mon[m][c]), $sformatf("m%0d ch%0d current frame %h", m, c, f));
    end
  endtask

  logic [11:0] setv [NM][9];

  initial begin
    logic [15:0] r;
    logic [14:0] f;
    rst_n = 0; bck = 0; bdw = 0; ien = 0; all = 0; bres = 0; ma = 0;
    intl = '0; i_extra = '0;
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < 9; c++) begin
        u_lim[m][c] = 12'd4000; i_lim[m][c] = 12'd1100;
      end
    foreach (mech[k]) mech[k] = 0;
    wait_clk(10);
    rst_n = 1;
    wait_clk(10);
    bres = 1; wait_clk(10); bres = 0; wait_clk(10);
    mech[M_BRES]++;
    chk(cl_en == '0 && me == '0, "all off after reset");

    // ---- enable each module and read its ID
    for (int m = 0; m < NM; m++) begin
      wr(m, 1'b0, OP_ENABLE0, 4'h0);
      mech[M_ENABLE]++;
      chk(le[m] && me[m] && rled[m] && cl_en[m] == 3'b111, $sformatf("module %0d enabled", m));
      chk(!le[1-m] || m == 1, "other module not enabled");
      if (m == 0) mech[M_UNSELECTED]++;
      op(LA[m], 1'b0, {OP_READ_DATA, 4'h0}, 8, 16'h0, r);
      chk(r[7:0] == {ID[m], 3'b000}, $sformatf("module %0d ID read %h", m, r[7:0]));
      mech[M_ID_READ]++;
    end

    // ---- set every channel of both modules, one channel at a time
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < 9; c++) begin
        setv[m][c] = 12'(100 + 300 * c + 37 * m);
        set_dac(m, 1'b0, c, setv[m][c]);
        chk(dac_code[m][c] == setv[m][c], $sformatf("m%0d DAC%0d loaded", m, c));
      end
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < 9; c++)
        chk(dac_code[m][c] == setv[m][c], "DACs keep their values");
    for (int m = 0; m < NM; m++) check_all_adc(m);

    // ---- load one word into all output registers of module 1 only
    op(LA[1], 1'b0, {OP_DAC_SR_ALL, 4'h0}, 16, 16'h0555, r);
    op(LA[1], 1'b0, {OP_DAC_LD_ALL, 4'h0}, 1, 16'h0, r);
    mech[M_DAC_SR]++; mech[M_DAC_LD_ALL]++;
    for (int c = 0; c < 9; c++) begin
      chk(dac_code[1][c] == 12'h555, "load all output registers");
      chk(dac_code[0][c] == setv[0][c], "other module untouched");
    end
    mech[M_UNSELECTED]++;
    for (int c = 0; c < 9; c++) begin set_dac(1, 1'b0, c, setv[1][c]); end

    // ---- overvoltage on module 0, channel B2 (4)
    u_lim[0][4] = 12'd1500;
    set_dac(0, 1'b0, 4, 12'd1600);
    wait_clk(5);
    chk(lat_u[0][4] && cl_en[0] == 3'b101, "overvoltage trips cluster B");
    chk(u_mon[0][3] == 0 && u_mon[0][5] == 0 && u_mon[0][0] != 0, "cluster B at zero, A on");
    mech[M_OVERVOLT]++;
    adc(0, 4, 1'b0, f);
    chk(f == frame(1'b0, 1'b1, 12'h000), $sformatf("overvoltage seen in ADC frame %h", f));
    set_dac(0, 1'b0, 4, setv[0][4]);
    wr(0, 1'b0, OP_PCLR_CH, 4'd4);
    mech[M_PCLR_CH]++;
    chk(!lat_u[0][4] && cl_en[0] == 3'b111, "clear channel latch restores cluster B");
    u_lim[0][4] = 12'd4000;

    // ---- overcurrent on module 1, channel C3 (8)
    i_extra[1][8] = 12'd1000;
    wait_clk(5);
    chk(lat_i[1][8] && cl_en[1] == 3'b011, "overcurrent trips cluster C");
    chk(cl_en[0] == 3'b111, "other module unaffected");
    mech[M_OVERCUR]++;
    adc(1, 8, 1'b1, f);
    chk(f[13] == 1'b1, "overcurrent latch in ADC frame");
    i_extra[1][8] = 12'd0;
    wait_clk(5);
    chk(cl_en[1] == 3'b011, "latch holds after the overcurrent ends");
    wr(1, 1'b0, OP_PCLR_ALL, 4'h0);
    mech[M_PCLR_ALL]++;
    chk(lat_i[1] == '0 && cl_en[1] == 3'b111, "clear all latches");

    // ---- controller sets protection latches
    wr(0, 1'b0, OP_PSET_CH, 4'd0);
    mech[M_PSET_CH]++;
    chk(lat_u[0] == 9'h001 && lat_i[0] == 9'h001 && cl_en[0] == 3'b110, "set latch A1 switches off cluster A");
    wr(0, 1'b0, OP_PSET_ALL, 4'h0);
    mech[M_PSET_ALL]++;
    chk(lat_u[0] == 9'h1ff && cl_en[0] == 3'b000, "set all latches");
    check_all_adc(0);
    wr(0, 1'b0, OP_PCLR_ALL, 4'h0);
    mech[M_PCLR_ALL]++;
    chk(cl_en[0] == 3'b111 && lat_u[0] == '0 && lat_i[0] == '0, "clear all restores module 0");

    // ---- interlock on module 0
    @(negedge clk) intl[0] = 1;
    #1 chk(cl_en[0] == 3'b000 && !me[0], "open loop drops the clusters at once");
    wait_clk(5);
    chk(led_intl[0] && !rled[0], "INTERLOCK LED on, remote LEDs off");
    mech[M_INTERLOCK]++;
    intl[0] = 0;
    wait_clk(5);
    chk(led_intl[0] && cl_en[0] == 3'b000, "inhibit holds after the loop closes");
    adc(0, 2, 1'b0, f);
    chk(f == frame(1'b1, 1'b0, 12'h000), $sformatf("INH in ADC frame %h", f));
    wr(0, 1'b0, OP_ENABLE1, 4'h0);
    mech[M_ENABLE]++;
    chk(!led_intl[0] && cl_en[0] == 3'b111, "enable after the loop closes");
    check_all_adc(0);

    // ---- broadcast: same channel in all modules, then all channels
    instr(3'd0, 1'b1, {OP_DAC_SR_ALL, 4'h0});
    execute(16, 16'h0123, r);
    mech[M_DAC_SR]++;
    wr(0, 1'b1, OP_DAC_LD_CH, 4'd7);
    chk(dac_code[0][7] == 12'h123 && dac_code[1][7] == 12'h123, "broadcast load of C2 in both modules");
    chk(dac_code[0][6] == setv[0][6] && dac_code[1][6] == setv[1][6], "other channels kept");
    wr(0, 1'b1, OP_PSET_CH, 4'd7);
    chk(lat_u[0][7] && lat_u[1][7] && cl_en[0] == 3'b011 && cl_en[1] == 3'b011, "broadcast set C2");
    wr(0, 1'b1, OP_PCLR_ALL, 4'h0);
    chk(lat_u == '0 && cl_en[0] == 3'b111 && cl_en[1] == 3'b111, "broadcast clear all");
    mech[M_BCAST]++;
    op(LA[0], 1'b1, {OP_ADC_U0, 4'd1}, 15, 16'h0, r);
    chk(r == 16'h0 && bdr_oe == '0, "broadcast read does not drive BDR");
    mech[M_BCAST_READ]++;
    op(3'd7, 1'b0, {OP_DISABLE0, 4'h0}, 1, 16'h0, r);
    chk(le == '1, "disable to an empty slot changes nothing");
    mech[M_UNSELECTED]++;

    // ---- disable both modules at once, then re-enable and bus reset
    wr(0, 1'b1, OP_DISABLE1, 4'h0);
    chk(le == '0 && me == '0 && cl_en == '0, "broadcast disable");
    mech[M_DISABLE]++;
    mech[M_BCAST]++;
    op(LA[1], 1'b0, {OP_READ_DATA, 4'h0}, 8, 16'h0, r);
    chk(r[7:0] == {ID[1], 3'b000}, "disable also loads the ID");
    wr(0, 1'b1, OP_ENABLE0, 4'h0);
    wr(1, 1'b0, OP_PSET_CH, 4'd2);
    chk(le == '1 && lat_u[1][2], "re-enabled, latch set");
    bres = 1; wait_clk(10); bres = 0; wait_clk(10);
    mech[M_BRES]++;
    chk(le == '0 && lat_u == '0 && lat_i == '0 && cl_en == '0, "bus reset initialises the modules");

    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-24s %0d", mech_name[k], mech[k]);
      chk(mech[k] > 0, {"mechanism happened: ", mech_name[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
