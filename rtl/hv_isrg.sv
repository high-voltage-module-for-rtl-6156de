// hv_isrg: instruction register (ISRG).
//
// An 8-bit shift register that receives the instruction code from the bus data
// write line BDW, most significant bit (b7) first, one bit per rising edge of the
// bus clock BCK. It shifts only while IEn = 1 and the module is selected
// (MS = 1), so unselected modules keep their previous code. bck_rise is a
// one-cycle pulse in the local clock domain (see hv_bus_sync). The code is held
// until the next instruction transmission. Bit order is this design's choice.
module hv_isrg
  import hv_pkg::*;
(
  input  logic               clk,
  input  logic               rst,       // synchronous, active high
  input  logic               ien,       // instruction transmission enable
  input  logic               ms,        // module selected
  input  logic               bck_rise,  // rising edge of the bus clock
  input  logic               bdw,       // bus data write
  output logic [INSTR_W-1:0] instr      // stored instruction code
);
  always_ff @(posedge clk) begin
    if (rst)
      instr <= '0;
    else if (ien && ms && bck_rise)
      instr <= {instr[INSTR_W-2:0], bdw};
  end
endmodule
