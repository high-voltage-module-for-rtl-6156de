// hv_pkg: shared constants and types of the HV module control logic.
//
// The module holds nine high-voltage channels in three clusters (A, B, C) of
// three channels each: channel 1 of a cluster feeds the PMT dividers (0..-2000 V),
// channel 2 the seventh dynodes (0..-800 V), channel 3 the eighth dynodes
// (0..-400 V). Each channel has a 12-bit serial DAC and is measured through a
// 12-bit serial ADC. An instruction on the crate local bus is 8 bits: b7..b4 are
// the operation code, b3..b0 the channel address.
//
// Channel address numbering (0 = A1, 1 = A2, 2 = A3, 3 = B1, ... 8 = C3) and the
// opcodes of the "read module data register" and "enable module" instructions
// are choices of this design; the other opcodes, the clock counts and the widths
// follow the instruction table of the module.
package hv_pkg;

  localparam int unsigned N_CLUSTERS   = 3;               // clusters A, B, C
  localparam int unsigned CH_PER_CL    = 3;               // channels per cluster
  localparam int unsigned N_CH         = N_CLUSTERS * CH_PER_CL;  // 9 channels
  localparam int unsigned INSTR_W      = 8;               // instruction code b7..b0
  localparam int unsigned CHADDR_W     = 4;               // channel address b3..b0
  localparam int unsigned MADDR_W      = 3;               // module address MA0..MA2 / LA0..LA2
  localparam int unsigned ID_W         = 5;               // module ID held in SR5
  localparam int unsigned DAC_BITS     = 12;              // DAC resolution
  localparam int unsigned ADC_BITS     = 12;              // ADC resolution

  // Number of bus clocks the controller issues in the execution step.
  localparam int unsigned NCLK_WRITE   = 1;               // simple write instructions
  localparam int unsigned NCLK_DAC_SR  = 16;              // load all DAC shift registers
  localparam int unsigned NCLK_ADC     = 15;              // ADC conversion and read-out
  localparam int unsigned NCLK_READ    = 8;               // read module data register
  localparam int unsigned ADC_LEAD     = NCLK_ADC - ADC_BITS;  // 3 leading bits of an ADC frame

  // Operation code, instruction bits b7..b4.
  typedef enum logic [3:0] {
    OP_READ_DATA  = 4'b0000,  // read module data register (8 clocks, read)
    OP_DAC_SR_ALL = 4'b0001,  // load all DAC shift registers (16 clocks, data in)
    OP_DAC_LD_CH  = 4'b0010,  // load DAC output register, channel cccc
    OP_DAC_LD_ALL = 4'b0011,  // load all DAC output registers
    OP_PSET_CH    = 4'b0100,  // set protection latches, channel cccc
    OP_PSET_ALL   = 4'b0101,  // set protection latches, all channels
    OP_PCLR_CH    = 4'b0110,  // clear protection latches, channel cccc
    OP_PCLR_ALL   = 4'b0111,  // clear protection latches, all channels
    OP_ADC_U0     = 4'b1000,  // ADC conversion, channel cccc, voltage (b5 don't care)
    OP_ADC_I0     = 4'b1001,  // ADC conversion, channel cccc, current
    OP_ADC_U1     = 4'b1010,
    OP_ADC_I1     = 4'b1011,
    OP_ENABLE0    = 4'b1100,  // enable module and load ID (b4 don't care)
    OP_ENABLE1    = 4'b1101,
    OP_DISABLE0   = 4'b1110,  // disable module and load ID (b4 don't care)
    OP_DISABLE1   = 4'b1111
  } opcode_e;

  // Select inputs S1,S0 of the 3-to-1 multiplexer M3-1 feeding the read-out.
  typedef enum logic [1:0] {
    M31_ADT  = 2'd0,  // serial ADC data
    M31_INH  = 2'd1,  // interlock inhibit status
    M31_PROT = 2'd2   // protection latch of the addressed channel
  } m31_sel_e;

  // Decoded function of the stored instruction.
  typedef struct packed {
    logic       rd;        // read instruction (drives BDR, needs ALL = 0)
    logic       dme;       // enable/disable module and load ID
    logic       le_val;    // 1 = enable, 0 = disable (valid with dme)
    logic       pset;      // set protection latches
    logic       pclr;      // clear protection latches
    logic       ch_all;    // instruction addresses all channels
    logic       dce;       // load DAC shift registers
    logic       dle;       // load DAC output register(s)
    logic       adc;       // ADC conversion (ACS)
    logic       adc_cur;   // 1 = current, 0 = voltage
    logic       rdid;      // read module data register
    logic [4:0] nclk;      // bus clocks of the execution step
  } func_t;

  // Decode an operation code (b7..b4) into its function (the FDEC truth table).
  function automatic func_t decode(input logic [3:0] op);
    func_t f;
    f = '0;
    unique casez (op)
      4'b0000: begin f.rd = 1'b1; f.rdid = 1'b1; f.nclk = 5'(NCLK_READ); end
      4'b0001: begin f.dce = 1'b1; f.nclk = 5'(NCLK_DAC_SR); end
      4'b001?: begin f.dle = 1'b1; f.ch_all = op[0]; f.nclk = 5'(NCLK_WRITE); end
      4'b010?: begin f.pset = 1'b1; f.ch_all = op[0]; f.nclk = 5'(NCLK_WRITE); end
      4'b011?: begin f.pclr = 1'b1; f.ch_all = op[0]; f.nclk = 5'(NCLK_WRITE); end
      4'b10??: begin f.rd = 1'b1; f.adc = 1'b1; f.adc_cur = op[0]; f.nclk = 5'(NCLK_ADC); end
      4'b11??: begin f.dme = 1'b1; f.le_val = ~op[1]; f.nclk = 5'(NCLK_WRITE); end
      default: f = '0;
    endcase
    return f;
  endfunction

endpackage
