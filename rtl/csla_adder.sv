// csla_adder: pipelined carry-select adder, WIDTH bits (33 by default).
//
// The low WIDTH-1 bits are cut into 4-bit stages (eight for 33 bits). Stage 0
// adds its operand bits and the input carry with a 4-bit ripple adder. Every
// other stage adds its bits twice with two 4-bit ripple adders, once with
// carry 0 and once with carry 1; the carry arriving from the stage below then
// selects the right sum through a 4-bit 2:1 multiplexer and forms the stage's
// carry out as c0 | (c1 & cin). A register holds each stage's carry out, so
// the carry moves up by one stage per clock. Stage s therefore sees its
// operands delayed by s cycles, and its sum is delayed by (stages - s) cycles
// so that all sum bits leave together. The top bit is the XOR of the two top
// operand bits and the registered carry out of the last stage.
//
// Interface: a, b, cin in every cycle; sum = a + b + cin (mod 2^WIDTH)
// appears LAT = (WIDTH-1)/4 cycles later. Fully pipelined: one addition per
// clock. No reset: outputs are meaningless for the first LAT cycles.
//
// The stage structure, the two ripple adders per stage, the select
// multiplexer and the per-stage operand and sum skew registers follow the
// design. Making the total latency exactly one cycle per stage for every bit,
// including the top bit, is this implementation's choice.
module csla_adder #(
  parameter int unsigned WIDTH = 33
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);
  localparam int unsigned NST = (WIDTH - 1) / 4;

  // 4-bit ripple-carry adder: returns {carry out, sum}.
  function automatic logic [4:0] ripple4(logic [3:0] xa, logic [3:0] xb, logic c);
    logic [3:0] s;
    logic       k;
    k = c;
    for (int i = 0; i < 4; i++) begin
      s[i] = xa[i] ^ xb[i] ^ k;
      k    = (xa[i] & xb[i]) | (k & (xa[i] ^ xb[i]));
    end
    return {k, s};
  endfunction

  // carry_q[s] is the registered carry into stage s (s = 1 .. NST).
  logic [NST:1] carry_q;
  logic [NST-1:0] cout;

  for (genvar s = 0; s < NST; s++) begin : g_stage
    logic [3:0] a_s, b_s, sum_s;
    delay_line #(.W(4), .DEPTH(s)) u_da (.clk(clk), .din(a[4*s +: 4]), .dout(a_s));
    delay_line #(.W(4), .DEPTH(s)) u_db (.clk(clk), .din(b[4*s +: 4]), .dout(b_s));

    if (s == 0) begin : g_first
      logic [4:0] r;
      assign r       = ripple4(a_s, b_s, cin);
      assign sum_s   = r[3:0];
      assign cout[s] = r[4];
    end else begin : g_select
      logic [4:0] r0, r1;
      assign r0      = ripple4(a_s, b_s, 1'b0);
      assign r1      = ripple4(a_s, b_s, 1'b1);
      assign sum_s   = carry_q[s] ? r1[3:0] : r0[3:0];
      assign cout[s] = r0[4] | (r1[4] & carry_q[s]);
    end

    always_ff @(posedge clk) carry_q[s+1] <= cout[s];

    delay_line #(.W(4), .DEPTH(NST - s)) u_ds (.clk(clk), .din(sum_s), .dout(sum[4*s +: 4]));
  end

  // Top bit: operands delayed by NST cycles meet the registered last carry.
  logic a_top, b_top;
  delay_line #(.W(1), .DEPTH(NST)) u_dat (.clk(clk), .din(a[WIDTH-1]), .dout(a_top));
  delay_line #(.W(1), .DEPTH(NST)) u_dbt (.clk(clk), .din(b[WIDTH-1]), .dout(b_top));
  assign sum[WIDTH-1] = a_top ^ b_top ^ carry_q[NST];

endmodule
