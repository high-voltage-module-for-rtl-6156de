// hv_sr5: five-bit module data register (SR5) and the BDR output flip-flop.
//
// SR5 is loaded in parallel with the module's fixed 5-bit ID code when an
// "enable/disable module and load ID" instruction executes (OOE = 1), so that the
// crate controller can tell module types apart. A "read module data register"
// instruction shifts it out MSB first, one bit per falling edge of the bus clock
// (sh_id), zero-filling behind; of its 8 clocks the last 3 therefore read 0.
// During an ADC read-out each falling edge instead loads the output of the M3-1
// multiplexer (sh_adc) into the output flip-flop, and SR5 itself keeps the ID.
// After falling edge k of the execution step, bdr holds frame bit k; the
// controller samples it before the next rising edge. The bit order, the zero
// fill and the output flip-flop are this design's choices.
module hv_sr5
  import hv_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            load,    // OOE: load the ID code
  input  logic [ID_W-1:0] id,      // module ID code (board straps)
  input  logic            sh_id,   // shift one ID bit out
  input  logic            sh_adc,  // pass one M3-1 bit out
  input  logic            m31_y,   // M3-1 output
  output logic [ID_W-1:0] sr,      // register contents
  output logic            bdr      // serial read data towards the bus
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      bdr <= 1'b0;
    end else if (load) begin
      sr  <= id;
    end else if (sh_id) begin
      bdr <= sr[ID_W-1];
      sr  <= {sr[ID_W-2:0], 1'b0};
    end else if (sh_adc) begin
      bdr <= m31_y;
    end
  end
endmodule
