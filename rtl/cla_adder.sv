// cla_adder: pipelined carry look-ahead adder, WIDTH bits (33 by default).
//
// The low WIDTH-1 bits are cut into 4-bit stages (eight for 33 bits). Each
// stage forms bitwise propagate p = a ^ b and generate g = a & b, combines
// them in a valence-4 cell into the group generate G and group propagate P,
// and produces its carry out as G | (P & cin). The same bitwise p and g give
// the internal carries of the stage by look-ahead, and the sum logic forms
// p ^ carry. A register holds each stage's carry out, so the carry advances
// one stage per clock; stage s sees its operands delayed by s cycles and its
// sum is delayed by (stages - s) cycles so that all bits leave together. The
// top bit is the XOR of the top operand bits and the registered last carry.
//
// Interface: a, b, cin in every cycle; sum = a + b + cin (mod 2^WIDTH)
// appears LAT = (WIDTH-1)/4 cycles later. Fully pipelined. No reset.
//
// The 4-bit stages, PG cells, group carry and skew registers follow the
// design. The design registers the low sums one cycle less than the
// carry-select adder; here both adders have the same latency of one cycle
// per stage so that either can be used in the processing elements.
module cla_adder #(
  parameter int unsigned WIDTH = 33
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);
  localparam int unsigned NST = (WIDTH - 1) / 4;

  // carry_q[s] is the registered carry into stage s (s = 1 .. NST).
  logic [NST:1] carry_q;

  for (genvar s = 0; s < NST; s++) begin : g_stage
    logic [3:0] a_s, b_s, p, g, c, sum_s;
    logic       c_in, grp_g, grp_p, c_out;
    delay_line #(.W(4), .DEPTH(s)) u_da (.clk(clk), .din(a[4*s +: 4]), .dout(a_s));
    delay_line #(.W(4), .DEPTH(s)) u_db (.clk(clk), .din(b[4*s +: 4]), .dout(b_s));

    if (s == 0) begin : g_cin0
      assign c_in = cin;
    end else begin : g_cinq
      assign c_in = carry_q[s];
    end

    // PG logic
    assign p = a_s ^ b_s;
    assign g = a_s & b_s;
    // valence-4 group generate / propagate
    assign grp_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    assign grp_p = &p;
    assign c_out = grp_g | (grp_p & c_in);
    // look-ahead carries inside the group
    assign c[0] = c_in;
    assign c[1] = g[0] | (p[0] & c_in);
    assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c_in);
    assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c_in);
    // sum logic
    assign sum_s = p ^ c;

    always_ff @(posedge clk) carry_q[s+1] <= c_out;

    delay_line #(.W(4), .DEPTH(NST - s)) u_ds (.clk(clk), .din(sum_s), .dout(sum[4*s +: 4]));
  end

  logic a_top, b_top;
  delay_line #(.W(1), .DEPTH(NST)) u_dat (.clk(clk), .din(a[WIDTH-1]), .dout(a_top));
  delay_line #(.W(1), .DEPTH(NST)) u_dbt (.clk(clk), .din(b[WIDTH-1]), .dout(b_top));
  assign sum[WIDTH-1] = a_top ^ b_top ^ carry_q[NST];

endmodule
