// tb_addsub_unit: self-checking testbench of the add/subtract unit.
//
// Drives the same random stream (operands and add/sub control, with
// directed cases such as 0 - 1 and most-negative - 1) into two units, one
// built on the carry-select adder and one on the carry look-ahead adder, and
// checks that each returns a + b or a - b modulo 2^33 exactly 8 cycles
// after its operands.
module tb_addsub_unit;
  import fir_pkg::*;
  localparam int unsigned W   = ADD_W;
  localparam int unsigned LAT = ADD_LAT;
  localparam int unsigned N   = 2000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, y_csla, y_cla;
  logic         sub;
  int           checks = 0, failures = 0;

  addsub_unit dut_csla (.clk(clk), .a(a), .b(b), .sub(sub), .y(y_csla));
  addsub_unit #(.KIND(ADDER_CLA)) dut_cla (.clk(clk), .a(a), .b(b), .sub(sub), .y(y_cla));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q [$];

  initial begin
    a = '0; b = '0; sub = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        case (i % 6)
          0: begin a = '0;                b = W'(1); sub = 1'b1; end
          1: begin a = {1'b1, {(W-1){1'b0}}}; b = W'(1); sub = 1'b1; end
          2: begin a = '1;                b = W'(1); sub = 1'b0; end
          default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; sub = 1'($urandom); end
        endcase
        exp_q.push_back(sub ? W'(a - b) : W'(a + b));
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && (i - (LAT - 1)) < N) begin
        checks += 2;
        if (y_csla !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("CSLA step %0d: got %h expected %h", i - (LAT-1), y_csla, exp_q[0]);
        end
        if (y_cla !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("CLA step %0d: got %h expected %h", i - (LAT-1), y_cla, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
