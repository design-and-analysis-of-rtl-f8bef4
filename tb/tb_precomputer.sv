// tb_precomputer: self-checking testbench of the precomputer.
//
// Feeds random and extreme 16-bit samples, with random gaps in in_valid,
// into the 4-bit-digit precomputer (1x..8x) and the 3-bit-digit one
// (1x..4x) and checks, one cycle later, every multiple k*x against a
// multiplication done here, and the valid flag against in_valid.
module tb_precomputer;
  localparam int unsigned N = 1000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [15:0] x;
  logic v4, v3;
  logic signed [18:0] m4 [8];
  logic signed [17:0] m3 [4];
  int checks = 0, failures = 0;

  precomputer #(.D(4)) dut4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v4), .mult(m4));
  precomputer #(.D(3)) dut3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v3), .mult(m3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] xp;
    logic vp;
    in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      case (i % 5)
        0: x = 16'sh8000;
        1: x = 16'sh7FFF;
        default: x = 16'($urandom);
      endcase
      in_valid = 1'($urandom);
      xp = x; vp = in_valid;
      @(posedge clk);
      #1;
      checks += 2;
      if (v4 !== vp) failures++;
      if (v3 !== vp) failures++;
      for (int k = 1; k <= 8; k++) begin
        checks++;
        if (int'(m4[k-1]) != int'(xp) * k) begin
          failures++;
          if (failures < 10) $display("x=%0d: %0d*x got %0d", xp, k, m4[k-1]);
        end
      end
      for (int k = 1; k <= 4; k++) begin
        checks++;
        if (int'(m3[k-1]) != int'(xp) * k) begin
          failures++;
          if (failures < 10) $display("x=%0d: %0d*x (3-bit) got %0d", xp, k, m3[k-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
