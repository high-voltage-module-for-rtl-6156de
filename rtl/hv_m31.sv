// hv_m31: 3-to-1 multiplexer (M3-1) of the read-out path.
//
// During an ADC read-out the leading bits of the ADC frame carry no data; the
// function decoder uses this multiplexer (select S1,S0) to put the module's
// interlock status (INH) and the protection latch of the addressed channel in
// their place. Otherwise the serial ADC data ADT passes. Combinational.
module hv_m31
  import hv_pkg::*;
(
  input  m31_sel_e sel,   // S1,S0 from the function decoder
  input  logic     adt,   // serial ADC data
  input  logic     inh,   // interlock inhibit latch
  input  logic     prot,  // protection latch of the addressed channel
  output logic     y
);
  always_comb begin
    unique case (sel)
      M31_INH:  y = inh;
      M31_PROT: y = prot;
      default:  y = adt;
    endcase
  end
endmodule
