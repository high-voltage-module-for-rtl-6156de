// hv_adc_model: behavioural model of the measurement multiplexer and the
// 12-bit serial ADC (not synthesizable design logic; stands in for analog and
// commercial parts). When ACS rises the multiplexer input chosen by ch/cur is
// sampled (voltage or current monitor of channel 0..8). Each rising edge k of
// ACK then puts frame bit k on ADT: bits 1..3 are leading bits without data
// (driven to 1 here so that their replacement can be seen), bits 4..15 are
// d11..d0. clocks counts ACK rising edges of the current conversion.
module hv_adc_model (
  input  logic             acs,
  input  logic             ack,
  input  logic [3:0]       ch,
  input  logic             cur,
  input  logic [8:0][11:0] u_mon,   // voltage monitor signals, in ADC codes
  input  logic [8:0][11:0] i_mon,   // current monitor signals, in ADC codes
  output logic             adt,
  output int               clocks
);
  logic [14:0] frame = '1;

  initial begin
    adt    = 1'b0;
    clocks = 0;
  end

  // ACK stays low while ACS rises, so the edge that woke the block tells them apart.
  always @(posedge acs or posedge ack) begin
    if (ack) begin
      adt    <= (clocks < 15) ? frame[14 - clocks] : 1'b0;
      clocks <= clocks + 1;
    end else begin
      frame  <= {3'b111, (ch < 9) ? (cur ? i_mon[ch] : u_mon[ch]) : 12'h000};
      clocks <= 0;
    end
  end
endmodule
