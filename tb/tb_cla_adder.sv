// tb_cla_adder: self-checking testbench of the pipelined carry look-ahead adder.
//
// Streams one addition per clock (random operands, random carry in, plus
// directed carry-chain cases such as all ones + 1 and alternating patterns)
// into a 33-bit cla_adder and checks that every sum equals a + b + cin modulo
// 2^33, worked out here with a plain 34-bit addition, exactly 8 cycles
// after its operands were applied (one cycle per 4-bit stage).
module tb_cla_adder;
  localparam int unsigned W   = 33;
  localparam int unsigned LAT = (W - 1) / 4;
  localparam int unsigned N   = 2000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin;
  int           checks = 0, failures = 0;

  cla_adder #(.WIDTH(W)) dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q [$];

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    a = '0; b = '0; cin = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      // apply operands for step i
      if (i < N) begin
        case (i % 8)
          0: begin a = '1;              b = '0;              cin = 1'b1; end
          1: begin a = '1;              b = W'(1);           cin = 1'b0; end
          2: begin a = {17{2'b01}};     b = {17{2'b10}};     cin = 1'b1; end
          3: begin a = W'(33'h0_FFFF_FFFF); b = W'(1);       cin = 1'b1; end
          default: begin a = rnd(); b = rnd(); cin = 1'($urandom); end
        endcase
        exp_q.push_back(W'({1'b0, a} + {1'b0, b} + (W+1)'(cin)));
      end
      @(posedge clk);
      #1;
      // result of step i - LAT + 1 is now on sum (inputs of step i were
      // captured at this edge; sum shows the step applied LAT - 1 edges ago)
      if (i >= LAT - 1 && exp_q.size() > 0 && (i - (LAT - 1)) < N) begin
        checks++;
        if (sum !== exp_q[0]) begin
          failures++;
          if (failures < 10)
            $display("mismatch step %0d: got %h expected %h", i - (LAT - 1), sum, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
