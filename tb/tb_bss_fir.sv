// tb_bss_fir: end-to-end testbench of the reconfigurable BSS FIR filter.
//
// Runs four filters side by side, each driven and checked by its own
// fir_stimulus_checker with a different random seed:
//   * the default build (4-bit digits, carry-select adders, 8 taps),
//   * 4-bit digits with carry look-ahead adders,
//   * 3-bit digits with carry-select adders,
//   * 3-bit digits with carry look-ahead adders.
// Every output sample is compared with a direct-form model, and the output
// latency is checked: 18 cycles for 4-bit digits and 26 for 3-bit digits.
// Each mechanism (reconfiguration while streaming, input gaps, subtracting
// processing elements, zero-digit gating) must occur in every filter, or a
// failure is counted.
module tb_bss_fir;
  import fir_pkg::*;
  localparam int unsigned TAPS  = 8;
  localparam int unsigned N_CYC = 3000;
  localparam int unsigned NV    = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n [NV];
  logic                    coef_we [NV], in_valid [NV], out_valid [NV], done [NV];
  logic [2:0]              coef_addr [NV];
  logic [15:0]             coef_data [NV];
  logic signed [15:0]      x [NV];
  logic signed [ADD_W-1:0] y [NV];
  int chk [NV], fail [NV], n_rc [NV], n_gap [NV], n_sub [NV], n_zd [NV];

  bss_fir dut0 (.clk(clk), .rst_n(rst_n[0]), .coef_we(coef_we[0]), .coef_addr(coef_addr[0]),
                .coef_data(coef_data[0]), .in_valid(in_valid[0]), .x(x[0]),
                .out_valid(out_valid[0]), .y(y[0]));
  bss_fir #(.KIND(ADDER_CLA), .D(4)) dut1 (.clk(clk), .rst_n(rst_n[1]), .coef_we(coef_we[1]),
                .coef_addr(coef_addr[1]), .coef_data(coef_data[1]), .in_valid(in_valid[1]),
                .x(x[1]), .out_valid(out_valid[1]), .y(y[1]));
  bss_fir #(.KIND(ADDER_CSLA), .D(3)) dut2 (.clk(clk), .rst_n(rst_n[2]), .coef_we(coef_we[2]),
                .coef_addr(coef_addr[2]), .coef_data(coef_data[2]), .in_valid(in_valid[2]),
                .x(x[2]), .out_valid(out_valid[2]), .y(y[2]));
  bss_fir #(.KIND(ADDER_CLA), .D(3)) dut3 (.clk(clk), .rst_n(rst_n[3]), .coef_we(coef_we[3]),
                .coef_addr(coef_addr[3]), .coef_data(coef_data[3]), .in_valid(in_valid[3]),
                .x(x[3]), .out_valid(out_valid[3]), .y(y[3]));

  for (genvar v = 0; v < NV; v++) begin : g_env
    localparam int unsigned DV = (v < 2) ? 4 : 3;
    fir_stimulus_checker #(.D(DV), .TAPS(TAPS), .LAT(2 + ((DV == 4) ? 2 : 3) * ADD_LAT),
                           .N_CYC(N_CYC), .SEED(11 + v)) u_env (
      .clk(clk), .rst_n(rst_n[v]), .coef_we(coef_we[v]), .coef_addr(coef_addr[v]),
      .coef_data(coef_data[v]), .in_valid(in_valid[v]), .x(x[v]), .out_valid(out_valid[v]),
      .y(y[v]), .done(done[v]), .checks(chk[v]), .failures(fail[v]), .n_reconfig(n_rc[v]),
      .n_gap(n_gap[v]), .n_subtract(n_sub[v]), .n_zero_digit(n_zd[v]));
  end

  int checks, failures;

  initial begin : watchdog
    repeat (N_CYC + 500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int v = 0; v < NV; v++) begin
      $display("filter %0d: checks=%0d failures=%0d reconfig=%0d gaps=%0d subtract=%0d zero_digit=%0d",
               v, chk[v], fail[v], n_rc[v], n_gap[v], n_sub[v], n_zd[v]);
      checks += chk[v] + 4;
      failures += fail[v];
      if (n_rc[v] == 0)  failures++;
      if (n_gap[v] == 0) failures++;
      if (n_sub[v] == 0) failures++;
      if (n_zd[v] == 0)  failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
