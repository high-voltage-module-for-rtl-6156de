// hv_dac_model: behavioural model of one 12-bit serial DAC of an HV channel
// (not synthesizable design logic; it stands in for the commercial part).
// A 16-bit input shift register takes DIn on each rising edge of DCK, MSB
// first; a rising edge of the load strobe LD copies its low 12 bits to the
// output register, whose value the channel's DC-DC converter follows. The
// upper four bits of the word are ignored. pulses counts DCK rising edges.
module hv_dac_model (
  input  logic        dck,
  input  logic        din,
  input  logic        ld,
  output logic [11:0] code,
  output int          pulses
);
  logic [15:0] sr = '0;

  initial begin
    code   = '0;
    pulses = 0;
  end

  always @(posedge dck) begin
    sr <= {sr[14:0], din};
    pulses <= pulses + 1;
  end

  always @(posedge ld) code <= sr[11:0];
endmodule
