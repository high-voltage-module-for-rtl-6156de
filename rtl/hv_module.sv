// hv_module: control logic of a nine-channel HV module for PMT power supplies.
//
// The module holds three clusters (A, B, C) of three HV channels; a cluster
// feeds 72 photomultipliers with their cathode/divider voltage (channel 1, up to
// 2000 V), seventh-dynode voltage (channel 2, up to 800 V) and eighth-dynode
// voltage (channel 3, up to 400 V). The analog parts - nine serial 12-bit DACs,
// nine DC-DC converters, the measurement multiplexer, the 12-bit serial ADC and
// the overvoltage/overcurrent comparators - are outside this RTL; their digital
// signals are the ports below. This module is the local control block that
// connects them to the crate controller's serial local bus:
//
//   MAD   module address decoder       ISRG  instruction register
//   FDEC  function decoder/sequencer   CHAD  channel address decoder
//   DAD   DAC serial interface         M3-1  read-out multiplexer
//   SR5   module data (ID) register    CPRG  protection latches, cluster gates
//   plus the LE/INH module enable logic.
//
// Bus: BCK clock, BDW write data, BDR read data (with enable bdr_oe for the
// shared line), IEn instruction enable, MA2..0/ALL module address, BRES bus
// reset. A transaction is 8 instruction clocks with IEn = 1 (b7 first, sampled
// on BCK rising edges), then IEn = 0 and 1, 16, 15 or 8 execution clocks. Read
// data change after each falling BCK edge. Everything runs on the local clock
// clk, which must be fast enough that each BCK phase lasts at least three clk
// cycles; bus inputs pass two-flop synchronizers, so actions follow the bus
// edges by 2-3 clk cycles. Alarms (upr/ipr) and an open interlock (intl) drop
// the cluster enables combinationally and are latched after synchronization.
// The local clock, the synchronizers and all timing details are this design's
// choices; the block structure and the instruction set follow the module.
module hv_module
  import hv_pkg::*;
(
  input  logic                  clk,       // local clock
  input  logic                  rst_n,     // power-on reset
  // slot configuration
  input  logic [MADDR_W-1:0]    la,        // local module address LA2..LA0
  input  logic [ID_W-1:0]       id,        // module type ID code
  // crate local bus
  input  logic                  bck,
  input  logic                  bdw,
  output logic                  bdr,
  output logic                  bdr_oe,    // RME: module drives BDR
  input  logic                  ien,
  input  logic [MADDR_W-1:0]    ma,
  input  logic                  all,
  input  logic                  bres,
  // DACs
  output logic                  dck,
  output logic                  din,
  output logic [N_CH-1:0]       dl,        // DL1..DL9
  // multiplexer and ADC
  output logic                  acs,       // ADC conversion/chip select
  output logic                  ack,       // ADC clock
  input  logic                  adt,       // ADC serial data
  output logic [CHADDR_W-1:0]   amux_ch,   // multiplexer: channel
  output logic                  amux_cur,  // multiplexer: 1 = current, 0 = voltage
  // comparators and interlock
  input  logic [N_CH-1:0]       upr,       // overvoltage alarms UPrA1..C3
  input  logic [N_CH-1:0]       ipr,       // overcurrent alarms IPrA1..C3
  input  logic                  intl,      // 1 = interlock loop open
  // outputs to the converters and LEDs
  output logic [N_CLUSTERS-1:0] cl_en,     // ClAEn, ClBEn, ClCEn
  output logic                  me,        // module enabled
  output logic                  le,        // LE latch: enabled by the controller
  output logic                  rled,      // remote LEDs in the read-out boxes
  output logic                  led_intl,  // front-panel INTERLOCK LED
  // status
  output logic [N_CH-1:0]       lat_u,     // overvoltage latches
  output logic [N_CH-1:0]       lat_i      // overcurrent latches
);
  // ---------------------------------------------------------------- sync
  logic rst_por;
  logic bck_s, bdw_s, ien_s, bres_s, intl_s;
  logic bck_q, bck_rise, bck_fall;
  logic rst;
  logic [N_CH-1:0] upr_s, ipr_s;

  assign rst_por = ~rst_n;

  hv_sync #(.W(5)) u_sync_bus (
    .clk, .rst(rst_por),
    .d({bck, bdw, ien, bres, intl}),
    .q({bck_s, bdw_s, ien_s, bres_s, intl_s})
  );

  hv_sync #(.W(2*N_CH)) u_sync_alarm (
    .clk, .rst(rst_por), .d({upr, ipr}), .q({upr_s, ipr_s})
  );

  always_ff @(posedge clk) begin
    if (rst_por) bck_q <= 1'b0;
    else         bck_q <= bck_s;
  end

  assign bck_rise = bck_s & ~bck_q;
  assign bck_fall = ~bck_s & bck_q;
  assign rst      = rst_por | bres_s;

  // ---------------------------------------------------------------- MAD, ISRG
  logic ms, rd_ok;
  logic [INSTR_W-1:0] instr;

  hv_mad u_mad (.ma, .all, .la, .ms, .rd_ok);

  hv_isrg u_isrg (
    .clk, .rst, .ien(ien_s), .ms, .bck_rise, .bdw(bdw_s), .instr
  );

  // ---------------------------------------------------------------- FDEC, CHAD
  func_t    func;
  logic     dme, ooe, pset, pclr, dce_win, dle_win, ack_win, sh_id, sh_adc;
  m31_sel_e m31_sel;
  logic [N_CH-1:0] chsel;

  hv_fdec u_fdec (
    .clk, .rst, .ien(ien_s), .ms, .rd_ok, .bck_rise, .bck_fall, .instr,
    .func, .dme, .ooe, .pset, .pclr, .dce_win, .dle_win, .acs, .ack_win,
    .sh_id, .sh_adc, .m31_sel, .rme(bdr_oe)
  );

  hv_chad u_chad (.ch(instr[3:0]), .ch_all(func.ch_all), .sel(chsel));

  // ---------------------------------------------------------------- DAD
  hv_dad u_dad (
    .clk, .rst, .bck(bck_s), .bdw(bdw_s), .dce_win, .dle_win, .chsel,
    .dck, .din, .dl
  );

  // ---------------------------------------------------------------- ADC path
  logic inh, prot_sel, m31_y;
  logic [ID_W-1:0] sr5;

  always_ff @(posedge clk) begin
    if (rst) ack <= 1'b0;
    else     ack <= bck_s & ack_win;
  end

  assign amux_ch  = instr[3:0];
  assign amux_cur = instr[4];

  hv_m31 u_m31 (.sel(m31_sel), .adt, .inh, .prot(prot_sel), .y(m31_y));

  hv_sr5 u_sr5 (
    .clk, .rst, .load(ooe), .id, .sh_id, .sh_adc, .m31_y, .sr(sr5), .bdr
  );

  // ---------------------------------------------------------------- enable, CPRG
  hv_menable u_men (
    .clk, .rst, .dme, .le_val(func.le_val), .intl_raw(intl), .intl_s,
    .le, .inh, .me
  );

  hv_cprg u_cprg (
    .clk, .rst, .upr_raw(upr), .ipr_raw(ipr), .upr_s, .ipr_s, .me, .chsel,
    .pset, .pclr, .ch(instr[3:0]), .cur(instr[4]), .lat_u, .lat_i, .cl_en,
    .prot_sel
  );

  assign rled     = me;
  assign led_intl = inh;

  // DAC shifting and loading are separate instructions.
  a_dac_excl: assert property (@(posedge clk) disable iff (rst) !(dck && (dl != '0)));
  // No cluster may be enabled while the interlock loop is open.
  a_intl_off: assert property (@(posedge clk) disable iff (rst) intl |-> cl_en == '0);
endmodule
