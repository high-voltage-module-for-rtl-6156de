// hv_cprg: channel protection register (CPRG) and cluster enable gates.
//
// Holds one overvoltage latch and one overcurrent latch per channel (18 in
// all). A latch is set by its comparator alarm (UPr / IPr, synchronized), or by a
// "set protection latches" instruction for the addressed channel(s); a "clear
// protection latches" instruction resets it, unless its alarm is still active.
// The cluster enable ClXEn of cluster X is ME AND no latch of its three
// channels set AND no raw alarm of its channels active: the raw alarm term
// switches the cluster off in the same instant, before the synchronized latch
// follows two clocks later. prot_sel gives the latch of the addressed channel
// (voltage or current latch) to the read-out multiplexer. Latches clear on
// reset. The raw-alarm path and "set/clear acts on both latches of a channel"
// are this design's choices.
module hv_cprg
  import hv_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [N_CH-1:0]     upr_raw,  // overvoltage comparators (asynchronous)
  input  logic [N_CH-1:0]     ipr_raw,  // overcurrent comparators (asynchronous)
  input  logic [N_CH-1:0]     upr_s,    // the same, synchronized
  input  logic [N_CH-1:0]     ipr_s,
  input  logic                me,       // module enable
  input  logic [N_CH-1:0]     chsel,    // addressed channels (CHAD)
  input  logic                pset,     // set latches of chsel
  input  logic                pclr,     // clear latches of chsel
  input  logic [CHADDR_W-1:0] ch,       // addressed channel, for prot_sel
  input  logic                cur,      // 1: report current latch, 0: voltage latch
  output logic [N_CH-1:0]     lat_u,    // overvoltage latches
  output logic [N_CH-1:0]     lat_i,    // overcurrent latches
  output logic [N_CLUSTERS-1:0] cl_en,  // ClAEn, ClBEn, ClCEn
  output logic                prot_sel  // latch of the addressed channel
);
  always_ff @(posedge clk) begin
    if (rst) begin
      lat_u <= '0;
      lat_i <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        if (upr_s[c] || (pset && chsel[c]))
          lat_u[c] <= 1'b1;
        else if (pclr && chsel[c])
          lat_u[c] <= 1'b0;
        if (ipr_s[c] || (pset && chsel[c]))
          lat_i[c] <= 1'b1;
        else if (pclr && chsel[c])
          lat_i[c] <= 1'b0;
      end
    end
  end

  logic [N_CH-1:0] trip;

  always_comb begin
    trip = lat_u | lat_i | upr_raw | ipr_raw;
    for (int k = 0; k < N_CLUSTERS; k++)
      cl_en[k] = me & ~(|trip[k*CH_PER_CL +: CH_PER_CL]);
    prot_sel = 1'b0;
    if (ch < CHADDR_W'(N_CH))
      prot_sel = cur ? lat_i[ch] : lat_u[ch];
  end
endmodule
