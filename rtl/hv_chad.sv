// hv_chad: channel address decoder (CHAD).
//
// Decodes the 4-bit channel address b3..b0 of the stored instruction into one
// select line per channel (0 = A1 ... 8 = C3). When ch_all = 1 every channel is
// selected; addresses 9..15 select none. Combinational. The numbering of the
// channels is this design's choice.
module hv_chad
  import hv_pkg::*;
(
  input  logic [CHADDR_W-1:0] ch,      // channel address cccc
  input  logic                ch_all,  // all channels
  output logic [N_CH-1:0]     sel      // one-hot (or all-ones) channel select
);
  always_comb begin
    sel = '0;
    if (ch_all)
      sel = '1;
    else if (ch < CHADDR_W'(N_CH))
      sel[ch] = 1'b1;
  end
endmodule
