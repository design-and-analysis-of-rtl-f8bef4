// tb_booth_mac: self-checking testbench of the Booth / Wallace-tree
// multiplier-cum-accumulator.
//
// Drives random signed 16-bit operands (with full-scale values such as
// -32768 * -32768 mixed in), random clr to start new sums, random en gaps,
// and one long run of 256 full-scale products that needs the guard bits. A
// 40-bit model accumulator, updated by plain multiplication, must match acc
// after every clock.
module tb_booth_mac;
  localparam int unsigned N = 16, K = 8, W = 2 * N + K;
  localparam int unsigned CYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0, en, clr;
  logic signed [N-1:0] a, b;
  logic signed [W-1:0] acc;
  logic signed [W-1:0] model;
  int checks = 0, failures = 0;

  booth_mac dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (CYC + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [N-1:0] pick();
    case ($urandom % 8)
      0: return 16'sh8000;
      1: return 16'sh7FFF;
      2: return 16'sh0000;
      3: return 16'shFFFF;
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    en = 1'b0; clr = 1'b0; a = '0; b = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (acc !== '0) failures++;
    for (int i = 0; i < CYC + 256; i++) begin
      if (i < 256) begin
        // long accumulation of the largest product: 256 * 2^30 = 2^38
        en = 1'b1; clr = (i == 0); a = 16'sh8000; b = 16'sh8000;
      end else begin
        en = ($urandom % 6 != 0);
        clr = ($urandom % 20 == 0);
        a = pick(); b = pick();
      end
      if (en) model = (clr ? W'(0) : model) + W'(longint'(a) * longint'(b));
      @(posedge clk);
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: acc %0d expected %0d", i, acc, model);
      end
    end
    checks++;
    if (model != 0 && acc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
