// hv_sync: two-flip-flop synchronizer for a bundle of asynchronous inputs.
//
// The crate local bus, the interlock loop and the comparator alarms are all
// asynchronous to the module's local clock; each bit passes two flip-flops
// before the control logic uses it (two clock cycles of latency). The reset
// value is a parameter so that inputs whose safe state is 1 can start at 1.
module hv_sync #(
  parameter int unsigned  W        = 1,
  parameter logic [W-1:0] RST_VAL  = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
