// tb_hv_cprg: random stimulus on the comparator alarms, the set/clear
// strobes, the channel selects and ME, compared every cycle with a reference
// model of the 18 protection latches and the three cluster gates. Also checks
// that a raw alarm turns its cluster off in the same cycle, and the read-out
// of the addressed channel's latch.
module tb_hv_cprg;
  import hv_pkg::*;
  logic clk = 0, rst;
  logic [8:0] upr_raw, ipr_raw, upr_s, ipr_s, chsel, lat_u, lat_i;
  logic me, pset, pclr, cur, prot_sel;
  logic [3:0] ch;
  logic [2:0] cl_en;
  logic [8:0] mu, mi;           // model latches
  int checks = 0, failures = 0;
  int trips = 0;

  hv_cprg dut (.clk, .rst, .upr_raw, .ipr_raw, .upr_s, .ipr_s, .me, .chsel,
               .pset, .pclr, .ch, .cur, .lat_u, .lat_i, .cl_en, .prot_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] rare(input int pct);
    logic [8:0] v;
    for (int i = 0; i < 9; i++) v[i] = ($urandom_range(0, 99) < pct);
    return v;
  endfunction

  task automatic compare();
    logic [2:0] ecl;
    logic [8:0] t;
    logic ep;
    t = mu | mi | upr_raw | ipr_raw;
    for (int k = 0; k < 3; k++) ecl[k] = me && (t[3*k +: 3] == 3'b000);
    ep = (ch < 9) ? (cur ? mi[ch] : mu[ch]) : 1'b0;
    checks++;
    if (lat_u !== mu || lat_i !== mi || cl_en !== ecl || prot_sel !== ep) begin
      failures++;
      $display("FAIL u=%b/%b i=%b/%b cl=%b/%b p=%b/%b", lat_u, mu, lat_i, mi, cl_en, ecl, prot_sel, ep);
    end
  endtask

  initial begin
    rst = 1; upr_raw = 0; ipr_raw = 0; upr_s = 0; ipr_s = 0; chsel = 0;
    me = 0; pset = 0; pclr = 0; cur = 0; ch = 0;
    mu = 0; mi = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      upr_raw = rare(2); ipr_raw = rare(2);
      upr_s = rare(1); ipr_s = rare(1);
      me = ($urandom_range(0, 9) != 0);
      case ($urandom_range(0, 3))
        0: begin pset = 1; pclr = 0; end
        1, 2: begin pset = 0; pclr = 1; end
        default: begin pset = 0; pclr = 0; end
      endcase
      chsel = ($urandom_range(0, 3) == 0) ? 9'h1ff : 9'(1 << $urandom_range(0, 9));
      ch = 4'($urandom_range(0, 10)); cur = 1'($urandom);
      #1 compare();              // combinational part with the new inputs
      if (|(upr_raw | ipr_raw)) trips++;
      @(posedge clk);
      for (int c = 0; c < 9; c++) begin
        if (upr_s[c] || (pset && chsel[c])) mu[c] = 1; else if (pclr && chsel[c]) mu[c] = 0;
        if (ipr_s[c] || (pset && chsel[c])) mi[c] = 1; else if (pclr && chsel[c]) mi[c] = 0;
      end
    end
    if (trips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
