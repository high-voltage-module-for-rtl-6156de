// tb_hv_system: system-level workload on one crate local bus populated to its
// addressing limit: eight HV modules at slots 0..7 (72 channels, 576 PMTs'
// worth of clusters; the full calorimeter uses 8 modules split over two such
// buses). Every module is enabled by one broadcast, identified by its ID, and
// each of its nine channels is set to its own value and read back, voltage and
// current, through the ADC. Then one channel is ramped the way a crate
// controller ramps a supply, one DAC code (about 0.5 V on a 2000 V channel)
// per step, and the bus clocks per step are counted: 8 + 16 for the DAC word
// and 8 + 1 for the load, 33 in all.
module tb_hv_system;
  import hv_pkg::*;

  localparam int NM    = 8;
  localparam int H     = 4;                    // BCK half period, in clk cycles
  localparam int STEPS = 40;                   // ramp steps

  logic clk = 0, rst_n;
  logic bck, bdw, ien, all, bres;
  logic [2:0] ma;
  logic [NM-1:0] bdr, bdr_oe, dck, din, acs, ack, adt, amux_cur, me, le, rled, led_intl;
  logic [NM-1:0][3:0] amux_ch;
  logic [NM-1:0][8:0] dl, upr, ipr, lat_u, lat_i;
  logic [NM-1:0][2:0] cl_en;
  logic bdr_bus;
  logic [NM-1:0][8:0][11:0] dac_code, u_mon, i_mon;
  int dac_pulses [NM][9];
  int adc_clocks [NM];
  int checks = 0, failures = 0;
  int bck_edges = 0;

  always #5 clk = ~clk;
  always @(posedge bck) bck_edges++;

  for (genvar m = 0; m < NM; m++) begin : g_mod
    hv_module dut (
      .clk, .rst_n, .la(3'(m)), .id(5'(m + 16)),
      .bck, .bdw, .bdr(bdr[m]), .bdr_oe(bdr_oe[m]), .ien, .ma, .all, .bres,
      .dck(dck[m]), .din(din[m]), .dl(dl[m]),
      .acs(acs[m]), .ack(ack[m]), .adt(adt[m]), .amux_ch(amux_ch[m]), .amux_cur(amux_cur[m]),
      .upr(upr[m]), .ipr(ipr[m]), .intl(1'b0),
      .cl_en(cl_en[m]), .me(me[m]), .le(le[m]), .rled(rled[m]), .led_intl(led_intl[m]),
      .lat_u(lat_u[m]), .lat_i(lat_i[m])
    );
    for (genvar c = 0; c < 9; c++) begin : g_dac
      hv_dac_model dac (.dck(dck[m]), .din(din[m]), .ld(dl[m][c]),
                        .code(dac_code[m][c]), .pulses(dac_pulses[m][c]));
      always_ff @(posedge clk) u_mon[m][c] <= cl_en[m][c / 3] ? dac_code[m][c] : 12'h000;
      always_comb begin
        i_mon[m][c] = u_mon[m][c] >> 2;
        upr[m][c]   = 1'b0;
        ipr[m][c]   = 1'b0;
      end
    end
    hv_adc_model adc (.acs(acs[m]), .ack(ack[m]), .ch(amux_ch[m]), .cur(amux_cur[m]),
                      .u_mon(u_mon[m]), .i_mon(i_mon[m]), .adt(adt[m]), .clocks(adc_clocks[m]));
  end

  always_comb begin
    bdr_bus = 1'b0;
    for (int m = 0; m < NM; m++) if (bdr_oe[m]) bdr_bus = bdr_bus | bdr[m];
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic bus_clock(input logic w, output logic r);
    bdw = w;
    wait_clk(H);
    bck = 1;
    wait_clk(H);
    bck = 0;
    wait_clk(H);
    r = bdr_bus;
  endtask

  task automatic op(input logic [2:0] a, input logic bc, input logic [7:0] code,
                    input int n, input logic [15:0] wdata, output logic [15:0] rdata);
    logic r;
    ma = a; all = bc;
    wait_clk(H);
    ien = 1;
    for (int i = 7; i >= 0; i--) bus_clock(code[i], r);
    wait_clk(H);
    ien = 0;
    wait_clk(H);
    rdata = '0;
    for (int i = 0; i < n; i++) begin
      bus_clock(wdata[n - 1 - i], r);
      rdata = {rdata[14:0], r};
    end
    wait_clk(H);
  endtask

  task automatic set_dac(input int m, input int ch, input logic [11:0] v);
    logic [15:0] r;
    op(3'(m), 1'b0, {OP_DAC_SR_ALL, 4'h0}, 16, {4'h0, v}, r);
    op(3'(m), 1'b0, {OP_DAC_LD_CH, 4'(ch)}, 1, 16'h0, r);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [11:0] value(input int m, input int c);
    return 12'((m * 9 + c) * 53 + 17);
  endfunction

  initial begin
    logic [15:0] r;
    int e0, per_step;
    rst_n = 0; bck = 0; bdw = 0; ien = 0; all = 0; bres = 0; ma = 0;
    wait_clk(10);
    rst_n = 1;
    wait_clk(10);

    op(3'd0, 1'b1, {OP_ENABLE0, 4'h0}, 1, 16'h0, r);
    chk(le == '1 && me == '1, "broadcast enable reaches all eight modules");
    for (int m = 0; m < NM; m++) begin
      op(3'(m), 1'b0, {OP_READ_DATA, 4'h0}, 8, 16'h0, r);
      chk(r[7:0] == {5'(m + 16), 3'b000}, $sformatf("ID of slot %0d", m));
    end

    for (int m = 0; m < NM; m++)
      for (int c = 0; c < 9; c++)
        set_dac(m, c, value(m, c));
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < 9; c++) begin
        chk(dac_code[m][c] == value(m, c), $sformatf("DAC slot %0d ch %0d", m, c));
        op(3'(m), 1'b0, {OP_ADC_U0, 4'(c)}, 15, 16'h0, r);
        chk(r[14:0] == {3'b001, value(m, c)}, $sformatf("voltage slot %0d ch %0d: %h", m, c, r[14:0]));
        op(3'(m), 1'b0, {OP_ADC_I0, 4'(c)}, 15, 16'h0, r);
        chk(r[14:0] == {3'b001, value(m, c) >> 2}, $sformatf("current slot %0d ch %0d", m, c));
      end

    // ramp slot 6, channel C1 (6) upward by one code per step
    set_dac(6, 6, 12'd1000);
    for (int s = 1; s <= STEPS; s++) begin
      e0 = bck_edges;
      set_dac(6, 6, 12'(1000 + s));
      per_step = bck_edges - e0;
      chk(per_step == 33, $sformatf("bus clocks per ramp step = %0d", per_step));
      chk(dac_code[6][6] == 12'(1000 + s), "ramp step reached the DAC");
    end
    wait_clk(4);
    op(3'd6, 1'b0, {OP_ADC_U0, 4'd6}, 15, 16'h0, r);
    chk(r[11:0] == 12'(1000 + STEPS), "ramp end value measured");
    $display("ramp: %0d steps, 33 bus clocks each; 500 V/s in 0.5 V steps needs 33000 bus clocks/s per channel",
             STEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
