// hv_mad: module address decoder (MAD).
//
// Compares the bus module address MA2..MA0 with the module's local address
// LA2..LA0, set by the slot. MS = 1 when the module is selected: on an address
// match, or when ALL = 1 (broadcast, which ignores MA). Reads are allowed only
// on an address match with ALL = 0, so a separate rd_ok output is given; this
// split is this design's way of keeping broadcast reads off the shared BDR line.
// Purely combinational.
module hv_mad
  import hv_pkg::*;
(
  input  logic [MADDR_W-1:0] ma,     // bus module address
  input  logic               all,    // broadcast to all modules
  input  logic [MADDR_W-1:0] la,     // local (slot) address
  output logic               ms,     // module selected for a write
  output logic               rd_ok   // module selected for a read
);
  logic match;

  always_comb begin
    match = (ma == la);
    ms    = all | match;
    rd_ok = match & ~all;
  end
endmodule
