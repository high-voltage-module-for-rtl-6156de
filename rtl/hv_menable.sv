// hv_menable: module enable logic (LE latch, interlock inhibit INH, ME).
//
// LE (flip-flop Q1) is set by "enable module" and reset by "disable module"
// (dme strobe, value le_val). INH is set whenever the daisy-chained HV cable
// interlock loop is open (INTL = 1) and drives the front-panel INTERLOCK LED.
// ME = LE AND NOT INH; ME enables the cluster gates of CPRG and lights the
// remote LEDs in the read-out boxes. The raw INTL also gates ME directly so that
// an opening loop drops ME at once, before INH is latched two clocks later.
// INH is cleared by the bus reset or by an "enable module" while the loop is
// closed; how INH is cleared is this design's choice.
module hv_menable (
  input  logic clk,
  input  logic rst,
  input  logic dme,       // enable/disable instruction executes
  input  logic le_val,    // 1: enable, 0: disable
  input  logic intl_raw,  // interlock loop open (asynchronous)
  input  logic intl_s,    // the same, synchronized
  output logic le,
  output logic inh,
  output logic me
);
  always_ff @(posedge clk) begin
    if (rst) begin
      le  <= 1'b0;
      inh <= 1'b0;
    end else begin
      if (dme)
        le <= le_val;
      if (intl_s)
        inh <= 1'b1;
      else if (dme && le_val)
        inh <= 1'b0;
    end
  end

  assign me = le & ~inh & ~intl_raw;
endmodule
