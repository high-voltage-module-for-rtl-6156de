// hv_dad: DAC addressing (DAD) - drives the serial interface of the nine DACs.
//
// The nine 12-bit DACs share one serial clock DCK and data line DIn. While a
// "load all DAC shift registers" instruction executes (dce_win), each bus clock
// BCK is passed to DCK and BDW to DIn, so the 16-bit word the controller sends is
// shifted into all nine DAC input registers at once. While a "load DAC output
// register" instruction executes (dle_win), the bus clock pulse is steered to the
// load strobes DL1..DL9 of the addressed DAC(s), which copy their input register
// to the output. All outputs are registered, one local clock after the
// synchronized bus signals, and DIn passes through the same path as DCK so that
// it keeps the bus set-up time. Active-high strobes are this design's choice.
module hv_dad
  import hv_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            bck,      // synchronized bus clock level
  input  logic            bdw,      // synchronized bus write data
  input  logic            dce_win,  // inside the DAC shift clocks
  input  logic            dle_win,  // inside the DAC load clock
  input  logic [N_CH-1:0] chsel,    // addressed channels
  output logic            dck,      // DAC serial clock
  output logic            din,      // DAC serial data
  output logic [N_CH-1:0] dl        // DAC load strobes DL1..DL9
);
  always_ff @(posedge clk) begin
    if (rst) begin
      dck <= 1'b0;
      din <= 1'b0;
      dl  <= '0;
    end else begin
      dck <= bck & dce_win;
      din <= bdw;
      dl  <= (bck & dle_win) ? chsel : '0;
    end
  end
endmodule
