// hv_fdec: function decoder (FDEC) and bus sequencer.
//
// Every bus operation has two steps: with IEn = 1 the controller shifts the
// 8-bit instruction into ISRG; after IEn returns to 0 it issues the number of
// bus clocks the instruction needs (1 for simple writes, 16 to load the DAC
// shift registers, 15 for an ADC conversion, 8 to read the module data
// register). FDEC decodes the stored code (hv_pkg::decode) and counts those
// clocks, producing:
//   * one-cycle strobes on the rising edge of the first execution clock:
//     dme (enable/disable; ooe loads the ID into SR5), pset, pclr;
//   * windows that stay on through the execution clocks: dce_win (DAC shift),
//     dle_win (DAC load), ack_win (ADC clock); acs stays on for the whole
//     conversion;
//   * read-out strobes on each falling edge: sh_id (module data register) and
//     sh_adc (ADC frame), and the M3-1 select, which puts INH on frame bit 1
//     and the protection latch on frame bit 2 in place of the meaningless
//     leading ADC bits;
//   * rme, the BDR output enable, from the start of a read execution until the
//     next instruction.
// A module executes an instruction only if it was selected (MS) when IEn fell;
// a read also needs its own address with ALL = 0. Clocks beyond the count are
// ignored. The clock counts follow the instruction table; the sequencing itself
// (where in each clock an action happens) is this design's choice.
module hv_fdec
  import hv_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               ien,       // synchronized IEn
  input  logic               ms,        // module selected (write)
  input  logic               rd_ok,     // module selected (read)
  input  logic               bck_rise,
  input  logic               bck_fall,
  input  logic [INSTR_W-1:0] instr,     // ISRG contents
  output func_t              func,      // decoded instruction
  output logic               dme,       // enable/disable strobe (DME)
  output logic               ooe,       // load ID into SR5 (OOE)
  output logic               pset,
  output logic               pclr,
  output logic               dce_win,   // DCE
  output logic               dle_win,   // DLE
  output logic               acs,       // ADC conversion active (ACS)
  output logic               ack_win,
  output logic               sh_id,
  output logic               sh_adc,
  output m31_sel_e           m31_sel,   // S1,S0
  output logic               rme        // BDR output enable (RME)
);
  typedef enum logic [1:0] {P_IDLE, P_INSTR, P_EXEC, P_DONE} phase_e;

  phase_e     phase;
  logic       ien_q;
  logic [4:0] nrise;     // execution clocks seen so far
  logic [4:0] cnt_now;   // including a rising edge in this cycle
  logic       exec;

  assign func = decode(instr[7:4]);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= P_IDLE;
      ien_q <= 1'b0;
      nrise <= '0;
    end else begin
      ien_q <= ien;
      if (ien && !ien_q) begin
        phase <= P_INSTR;
        nrise <= '0;
      end else begin
        unique case (phase)
          P_INSTR:
            if (!ien) begin
              nrise <= '0;
              if (ms && (!func.rd || rd_ok) && func.nclk != 0)
                phase <= P_EXEC;
              else
                phase <= P_IDLE;
            end
          P_EXEC: begin
            if (bck_rise && nrise != 5'h1f)
              nrise <= nrise + 5'd1;
            if (bck_fall && nrise >= func.nclk)
              phase <= P_DONE;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    exec    = (phase == P_EXEC);
    cnt_now = nrise + {4'd0, bck_rise};

    // first execution clock, rising edge
    dme  = exec && bck_rise && (nrise == 0) && func.dme;
    ooe  = dme;
    pset = exec && bck_rise && (nrise == 0) && func.pset;
    pclr = exec && bck_rise && (nrise == 0) && func.pclr;

    // windows over the execution clocks
    dce_win = exec && (cnt_now != 0) && (cnt_now <= func.nclk) && func.dce;
    dle_win = exec && (cnt_now != 0) && (cnt_now <= func.nclk) && func.dle;
    ack_win = exec && (cnt_now != 0) && (cnt_now <= func.nclk) && func.adc;
    acs     = exec && func.adc;

    // read-out, falling edges
    sh_id  = exec && bck_fall && (nrise != 0) && (nrise <= func.nclk) && func.rdid;
    sh_adc = exec && bck_fall && (nrise != 0) && (nrise <= func.nclk) && func.adc;
    unique case (nrise)
      5'd1:    m31_sel = M31_INH;
      5'd2:    m31_sel = M31_PROT;
      default: m31_sel = M31_ADT;
    endcase

    rme = func.rd && ((phase == P_EXEC) || (phase == P_DONE));
  end

  // A read never runs in broadcast: BDR is shared by all modules of a crate.
  a_rd_private: assert property (@(posedge clk) disable iff (rst)
                                 (phase == P_EXEC && func.rd) |-> rd_ok || !ms);
endmodule
