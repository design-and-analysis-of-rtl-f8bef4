// tb_pe_bss4: self-checking testbench of the 4-bit BSS processing element.
//
// Each cycle it presents a random 16-bit sample x, as the multiples
// 1x..8x the precomputer would deliver (computed here by multiplication),
// together with a coefficient h that is random, extreme (-32768, 32767, 0,
// -1) or a different one every cycle, and a random valid flag. Two elements,
// one with carry-select and one with carry look-ahead adders, must return
// h * x (taking the neg flag into account) and the valid flag exactly
// 2 * 8 cycles later.
module tb_pe_bss4;
  import fir_pkg::*;
  localparam int unsigned LAT = 2 * ADD_LAT;
  localparam int unsigned N   = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [19-1:0] mult [8];
  logic [15:0] h;
  logic v_s, v_c, n_s, n_c;
  logic [ADD_W-1:0] p_s, p_c;
  int checks = 0, failures = 0;

  pe_bss4 dut_csla (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mult(mult), .h(h),
                  .out_valid(v_s), .prod(p_s), .neg(n_s));
  pe_bss4 #(.KIND(ADDER_CLA)) dut_cla (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mult(mult), .h(h),
                  .out_valid(v_c), .prod(p_c), .neg(n_c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [ADD_W-1:0] prod; logic vld; } exp_t;
  exp_t exp_q [$];

  function automatic logic [ADD_W-1:0] signed_result(logic [ADD_W-1:0] p, logic n);
    return n ? -p : p;
  endfunction

  initial begin
    logic signed [15:0] xs;
    in_valid = 1'b0; h = '0;
    for (int k = 0; k < 8; k++) mult[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        case (i % 7)
          0: h = 16'h8000;
          1: h = 16'h7FFF;
          2: h = 16'h0000;
          3: h = 16'hFFFF;
          default: h = 16'($urandom);
        endcase
        xs = (i % 11 == 0) ? 16'sh8000 : 16'($urandom);
        for (int k = 1; k <= 8; k++) mult[k-1] = 19'(int'(xs) * k);
        in_valid = 1'($urandom);
        exp_q.push_back('{prod: ADD_W'(longint'($signed(h)) * longint'(xs)), vld: in_valid});
      end else begin
        in_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && (i - (LAT - 1)) < N) begin
        checks += 4;
        if (v_s !== exp_q[0].vld) failures++;
        if (v_c !== exp_q[0].vld) failures++;
        if (signed_result(p_s, n_s) !== exp_q[0].prod) begin
          failures++;
          if (failures < 10) $display("CSLA step %0d: got %h expected %h", i - (LAT-1), signed_result(p_s, n_s), exp_q[0].prod);
        end
        if (signed_result(p_c, n_c) !== exp_q[0].prod) begin
          failures++;
          if (failures < 10) $display("CLA step %0d: got %h expected %h", i - (LAT-1), signed_result(p_c, n_c), exp_q[0].prod);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
