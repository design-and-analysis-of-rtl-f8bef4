// fir_stimulus_checker: stimulus and reference model for one bss_fir.
//
// Drives a filter through reset and then N_CYC cycles of traffic: random
// 16-bit samples (some at full scale), random one- or multi-cycle gaps in
// in_valid, and coefficient writes both before the stream and in the middle
// of it (reconfiguration while products are still in the pipeline). It keeps
// its own copy of the coefficient bank and, for every accepted sample n,
// the coefficients in force when that sample entered, and predicts
//     y[n] = sum_k h_k(as of sample n-k) * x[n-k]   (mod 2^33)
// by plain multiplication. It checks out_valid against in_valid delayed by
// LAT cycles and every valid y against the prediction.
//
// It also counts how often each mechanism of the filter was exercised:
// coefficient writes during streaming, input gaps, products whose processing
// element ends with a subtraction (lowest digit negative), and coefficients
// with a zero lowest digit (gated multiplexer). done rises when finished.
module fir_stimulus_checker #(
  parameter int unsigned D     = 4,
  parameter int unsigned TAPS  = 8,
  parameter int unsigned LAT   = 18,
  parameter int unsigned N_CYC = 2000,
  parameter int unsigned SEED  = 1
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic                     coef_we,
  output logic [$clog2(TAPS)-1:0]  coef_addr,
  output logic [15:0]              coef_data,
  output logic                     in_valid,
  output logic signed [15:0]       x,
  input  logic                     out_valid,
  input  logic signed [32:0]       y,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_reconfig,
  output int                       n_gap,
  output int                       n_subtract,
  output int                       n_zero_digit
);
  logic [15:0]        h_m [TAPS];
  logic signed [15:0] xs_hist [$];        // accepted samples, oldest first
  logic [15:0]        hs_hist [$][TAPS];  // coefficient set per accepted sample
  logic               vld_hist [$];       // in_valid per cycle
  logic [32:0]        exp_hist [$];       // predicted y per cycle (if valid)

  function automatic logic [15:0] rand_coef();
    case ($urandom % 6)
      0:       return 16'h8000;
      1:       return 16'h7FFF;
      2:       return 16'(($urandom % 16) << 4);   // zero lowest digit
      3:       return 16'(int'($urandom % 64) - 32);
      default: return 16'($urandom);
    endcase
  endfunction

  function automatic logic lowest_digit_negative(logic [15:0] hv);
    return int'(hv[D-1:0]) > (1 << (D - 1));
  endfunction

  task automatic write_coef(input int k, input logic [15:0] v);
    coef_we   = 1'b1;
    coef_addr = ($clog2(TAPS))'(k);
    coef_data = v;
    h_m[k]    = v;
    if (v[D-1:0] == '0) n_zero_digit++;
  endtask

  initial begin
    int in_flight;
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 1'b0;
    n_reconfig = 0; n_gap = 0; n_subtract = 0; n_zero_digit = 0;
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    in_valid = 1'b0; x = '0;
    for (int k = 0; k < TAPS; k++) h_m[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // initial coefficient load
    for (int k = 0; k < TAPS; k++) begin
      write_coef(k, rand_coef());
      @(posedge clk);
      #1 coef_we = 1'b0;
    end
    in_flight = 0;
    for (int i = 0; i < N_CYC + LAT; i++) begin
      logic [32:0] acc;
      coef_we = 1'b0;
      in_valid = 1'b0;
      if (i < N_CYC) begin
        // reconfiguration: rewrite one coefficient now and then
        if ($urandom % 40 == 0) begin
          write_coef(int'($urandom % TAPS), rand_coef());
          if (in_flight > 0) n_reconfig++;
        end
        // gaps
        in_valid = ($urandom % 5 != 0);
        if (!in_valid && xs_hist.size() > 0) n_gap++;
        x = ($urandom % 13 == 0) ? 16'sh8000 : 16'($urandom);
      end
      vld_hist.push_back(in_valid);
      acc = '0;
      if (in_valid) begin
        xs_hist.push_back(x);
        hs_hist.push_back(h_m);
        for (int k = 0; k < TAPS; k++) begin
          int n;
          n = xs_hist.size() - 1 - k;
          if (n >= 0) begin
            acc += 33'(longint'($signed(hs_hist[n][k])) * longint'(xs_hist[n]));
            if (lowest_digit_negative(hs_hist[n][k])) n_subtract++;
          end
        end
      end
      exp_hist.push_back(acc);
      in_flight = 0;
      for (int j = (vld_hist.size() > LAT) ? vld_hist.size() - LAT : 0; j < vld_hist.size(); j++)
        if (vld_hist[j]) in_flight++;
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        int j;
        j = i - (LAT - 1);
        checks++;
        if (out_valid !== vld_hist[j]) begin
          failures++;
          if (failures < 10) $display("D=%0d cycle %0d: out_valid %b expected %b", D, j, out_valid, vld_hist[j]);
        end
        if (vld_hist[j]) begin
          checks++;
          if (y !== $signed(exp_hist[j])) begin
            failures++;
            if (failures < 10) $display("D=%0d cycle %0d: y %0d expected %0d", D, j, y, $signed(exp_hist[j]));
          end
        end
      end
    end
    coef_we = 1'b0;
    in_valid = 1'b0;
    done = 1'b1;
  end
endmodule
