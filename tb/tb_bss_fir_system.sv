// tb_bss_fir_system: end-to-end test of the top level in its default build.
//
// The filter side is driven and checked by fir_stimulus_checker: reset,
// coefficient load, a stream of samples with gaps and coefficient rewrites
// while streaming, every output against a direct-form model and the
// 18-cycle latency. At the same time the multiplier-cum-accumulator side
// runs dot products of random length (clr starts each), checked every clock
// against a 40-bit model. Each mechanism must occur at least once:
// reconfiguration while streaming, input gaps, subtracting processing
// elements, zero-digit gating, MAC restarts (clr) and MAC idle cycles (en
// low); a mechanism that never occurs counts as a failure.
module tb_bss_fir_system;
  import fir_pkg::*;
  localparam int unsigned N_CYC = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n, coef_we, in_valid, out_valid, done;
  logic [2:0]              coef_addr;
  logic [15:0]             coef_data;
  logic signed [15:0]      x;
  logic signed [ADD_W-1:0] y;
  logic                    mac_en, mac_clr;
  logic signed [15:0]      mac_a, mac_b;
  logic signed [39:0]      mac_acc, mac_model;
  int chk, fail, n_rc, n_gap, n_sub, n_zd;
  int mac_checks = 0, mac_failures = 0, n_clr = 0, n_idle = 0;

  bss_fir_system dut (
    .clk(clk), .rst_n(rst_n),
    .fir_coef_we(coef_we), .fir_coef_addr(coef_addr), .fir_coef_data(coef_data),
    .fir_in_valid(in_valid), .fir_x(x), .fir_out_valid(out_valid), .fir_y(y),
    .mac_en(mac_en), .mac_clr(mac_clr), .mac_a(mac_a), .mac_b(mac_b), .mac_acc(mac_acc)
  );

  fir_stimulus_checker #(.D(4), .TAPS(8), .LAT(2 + 2 * ADD_LAT), .N_CYC(N_CYC), .SEED(5)) u_env (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y), .done(done), .checks(chk),
    .failures(fail), .n_reconfig(n_rc), .n_gap(n_gap), .n_subtract(n_sub), .n_zero_digit(n_zd));

  initial begin : watchdog
    repeat (N_CYC + 500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  // MAC side: starts once the shared reset has been released
  initial begin
    mac_en = 1'b0; mac_clr = 1'b0; mac_a = '0; mac_b = '0; mac_model = '0;
    @(posedge clk);
    wait (rst_n === 1'b1);
    @(posedge clk);
    #1;
    for (int i = 0; i < N_CYC; i++) begin
      mac_en  = ($urandom % 7 != 0);
      mac_clr = ($urandom % 16 == 0);
      mac_a   = ($urandom % 9 == 0) ? 16'sh8000 : 16'($urandom);
      mac_b   = ($urandom % 9 == 0) ? 16'sh8000 : 16'($urandom);
      if (!mac_en) n_idle++;
      if (mac_en && mac_clr) n_clr++;
      if (mac_en) mac_model = (mac_clr ? 40'sd0 : mac_model) + 40'(longint'(mac_a) * longint'(mac_b));
      @(posedge clk);
      #1;
      mac_checks++;
      if (mac_acc !== mac_model) begin
        mac_failures++;
        if (mac_failures < 10) $display("MAC step %0d: acc %0d expected %0d", i, mac_acc, mac_model);
      end
    end
    mac_en = 1'b0;
  end

  initial begin
    int checks, failures;
    @(posedge clk);
    wait (done);
    $display("FIR: checks=%0d failures=%0d reconfig=%0d gaps=%0d subtract=%0d zero_digit=%0d",
             chk, fail, n_rc, n_gap, n_sub, n_zd);
    $display("MAC: checks=%0d failures=%0d restarts=%0d idle=%0d", mac_checks, mac_failures, n_clr, n_idle);
    checks = chk + mac_checks + 6;
    failures = fail + mac_failures
             + ((n_rc == 0) ? 1 : 0) + ((n_gap == 0) ? 1 : 0)
             + ((n_sub == 0) ? 1 : 0) + ((n_zd == 0) ? 1 : 0)
             + ((n_clr == 0) ? 1 : 0) + ((n_idle == 0) ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
