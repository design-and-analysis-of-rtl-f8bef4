// tb_bss_fir_lowpass: the default filter used as a real low-pass and then
// reconfigured into a high-pass.
//
// The 8 coefficients are a Hamming-windowed sinc with cut-off at a quarter
// of the sample rate, scaled by 2^14 and rounded (computed here with real
// arithmetic). The test applies
//   1. a unit impulse of height 1000: the output must be 1000 * h_k, k = 0..7,
//      then zero, arriving 18 cycles after each input;
//   2. a constant input: the output must settle to A * sum(h) (pass band);
//   3. an input alternating +A / -A (half the sample rate): the output must
//      settle to A * sum((-1)^k h_k), less than 1/8 of the pass-band level;
// then rewrites the coefficients as (-1)^k h_k (a high-pass) and checks that
// the alternating input now passes and the constant input is stopped.
module tb_bss_fir_lowpass;
  import fir_pkg::*;
  localparam int unsigned TAPS = 8;
  localparam int unsigned LAT  = 2 + 2 * ADD_LAT;
  localparam int          A    = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n, coef_we, in_valid, out_valid;
  logic [2:0]              coef_addr;
  logic [15:0]             coef_data;
  logic signed [15:0]      x;
  logic signed [ADD_W-1:0] y;
  int checks = 0, failures = 0;
  int h [TAPS];
  longint y_seen [$];

  bss_fir dut (.clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
               .coef_data(coef_data), .in_valid(in_valid), .x(x),
               .out_valid(out_valid), .y(y));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // collect outputs
  always @(posedge clk) if (rst_n && out_valid) y_seen.push_back(longint'(y));

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic load(input int hv [TAPS]);
    for (int k = 0; k < TAPS; k++) begin
      coef_we = 1'b1; coef_addr = 3'(k); coef_data = 16'(hv[k]);
      @(posedge clk); #1;
    end
    coef_we = 1'b0;
  endtask

  // run a sequence of samples, then wait for all of their outputs
  task automatic run(input int xs [$], output longint ys [$]);
    int first;
    first = y_seen.size();
    foreach (xs[i]) begin
      in_valid = 1'b1; x = 16'(xs[i]);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    #1;
    ys = y_seen[first:$];
  endtask

  initial begin
    real pi, n, w, s;
    int xs [$], hp [TAPS];
    longint ys [$], dc, ny;
    pi = 3.14159265358979;
    for (int k = 0; k < TAPS; k++) begin
      n = real'(k) - real'(TAPS - 1) / 2.0;
      s = $sin(pi * 0.5 * n) / (pi * n);
      w = 0.54 - 0.46 * $cos(2.0 * pi * real'(k) / real'(TAPS - 1));
      h[k] = int'($floor(16384.0 * s * w + 0.5));
      hp[k] = (k % 2 == 0) ? h[k] : -h[k];
    end
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_data = '0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    load(h);

    // 1. impulse response, with latency check
    xs = {A};
    for (int i = 0; i < TAPS + 3; i++) xs.push_back(0);
    fork
      begin
        int c;
        c = 0;
        @(posedge clk); #1;             // edge that takes the impulse
        c = 1;
        while (!out_valid) begin @(posedge clk); #1; c++; end
        check("impulse latency", c, LAT);
      end
    join_none
    run(xs, ys);
    for (int i = 0; i < TAPS + 3; i++)
      check($sformatf("impulse response %0d", i), ys[i], (i < TAPS) ? longint'(A) * h[i] : 0);

    // 2. DC and 3. Nyquist responses of the low-pass
    dc = 0; ny = 0;
    for (int k = 0; k < TAPS; k++) begin dc += longint'(A) * h[k]; ny += longint'(A) * hp[k]; end
    xs = {};
    for (int i = 0; i < 3 * TAPS; i++) xs.push_back(A);
    run(xs, ys);
    check("low-pass DC gain", ys[$], dc);
    xs = {};
    for (int i = 0; i < 3 * TAPS; i++) xs.push_back((i % 2 == 0) ? A : -A);
    run(xs, ys);
    check("low-pass Nyquist output", (ys[$] < 0) ? -ys[$] : ys[$], (ny < 0) ? -ny : ny);
    check("low-pass stops Nyquist", (8 * ((ys[$] < 0) ? -ys[$] : ys[$]) < dc) ? 1 : 0, 1);

    // reconfigure to high-pass
    load(hp);
    xs = {};
    for (int i = 0; i < 3 * TAPS; i++) xs.push_back((i % 2 == 0) ? A : -A);
    run(xs, ys);
    check("high-pass Nyquist output", (ys[$] < 0) ? -ys[$] : ys[$], dc);
    xs = {};
    for (int i = 0; i < 3 * TAPS; i++) xs.push_back(A);
    run(xs, ys);
    check("high-pass DC output", ys[$], ny);
    check("high-pass stops DC", (8 * ((ys[$] < 0) ? -ys[$] : ys[$]) < dc) ? 1 : 0, 1);

    for (int k = 0; k < TAPS; k++) $display("h[%0d] = %0d", k, h[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
