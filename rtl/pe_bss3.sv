// pe_bss3: processing element of the 3-bit BSS filter: multiplies the
// current sample by one coefficient using only multiplexers and adders.
//
// The coefficient h is recoded (bss_decoder, D = 3) into six signed digits
// d0..d5 of weight 8^i. Five 4:1 multiplexers pick |d_i| * x (1x..4x) for
// d0..d4 and one 2:1 multiplexer picks 1x or 2x for the top digit d5; a gate
// passes the pick or 0 when the digit is 0. Five add/subtract units sum the
// terms in three levels:
//     A = t0 +/- (t1 << 3)   B = t2 +/- (t3 << 3)   C = t4 +/- (t5 << 3)
//     E = B +/- (C << 6)
//     T = A +/- (E << 6)
// T equals h * x when neg = 0 and -(h * x) when neg = 1.
//
// Timing: three adder levels of LAT = (ADD_W-1)/4 cycles; A is delayed by
// one adder latency to meet E. prod, neg and out_valid appear 3*LAT cycles
// (24 with 33-bit adders) after mult/h/in_valid. One product per clock.
// rst_n (asynchronous, active low) clears the valid pipeline.
//
// Multiplexer sizes, gating, the tree shape and the <<3 / <<6 shifts follow
// the design. The root shift is 6 here, the weight of digit d2 relative to
// d0 (a shift of 3 would not give the product). The delay that balances A
// against E and the separate sign output are this implementation's choice.
module pe_bss3
  import fir_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CSLA,
  parameter int unsigned XW   = X_W,
  parameter int unsigned HW   = H_W,
  localparam int unsigned D   = 3,
  localparam int unsigned M   = 1 << (D - 1),
  localparam int unsigned MW  = XW + D - 1,
  localparam int unsigned ND  = num_digits(D, HW),
  localparam int unsigned LAT = 3 * ADD_LAT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [MW-1:0]    mult [M],
  input  logic        [HW-1:0]    h,
  output logic                    out_valid,
  output logic signed [ADD_W-1:0] prod,
  output logic                    neg
);
  logic [D-2:0]  sel [ND];
  logic [ND-1:0] en;
  logic [ND-2:0] sub;
  logic          neg0;

  bss_decoder #(.D(D), .HW(HW)) u_dec (
    .h(h), .sel(sel), .en(en), .dneg(), .sub(sub), .neg(neg0)
  );

  // multiplexers (4:1 for d0..d4, 2:1 for the top digit) and gates
  logic signed [ADD_W-1:0] t [ND];
  always_comb begin
    for (int i = 0; i < ND - 1; i++) t[i] = en[i] ? ADD_W'(mult[sel[i]]) : '0;
    t[ND-1] = en[ND-1] ? ADD_W'(sel[ND-1][0] ? mult[1] : mult[0]) : '0;
  end

  // first level
  logic [ADD_W-1:0] sum_a, sum_b, sum_c;
  addsub_unit #(.KIND(KIND)) u_add_a (
    .clk(clk), .a(t[0]), .b(t[1] <<< D), .sub(sub[0]), .y(sum_a));
  addsub_unit #(.KIND(KIND)) u_add_b (
    .clk(clk), .a(t[2]), .b(t[3] <<< D), .sub(sub[1]), .y(sum_b));
  addsub_unit #(.KIND(KIND)) u_add_c (
    .clk(clk), .a(t[4]), .b(t[5] <<< D), .sub(sub[2]), .y(sum_c));

  // second level
  logic       sub_e, sub_root;
  logic [ADD_W-1:0] sum_e, sum_a_d;
  delay_line #(.W(1), .DEPTH(ADD_LAT)) u_dsube (.clk(clk), .din(sub[3]), .dout(sub_e));
  addsub_unit #(.KIND(KIND)) u_add_e (
    .clk(clk), .a(sum_b), .b(sum_c << (2 * D)), .sub(sub_e), .y(sum_e));
  delay_line #(.W(ADD_W), .DEPTH(ADD_LAT)) u_da (.clk(clk), .din(sum_a), .dout(sum_a_d));

  // root
  delay_line #(.W(1), .DEPTH(2 * ADD_LAT)) u_dsubr (.clk(clk), .din(sub[4]), .dout(sub_root));
  addsub_unit #(.KIND(KIND)) u_add_root (
    .clk(clk), .a(sum_a_d), .b(sum_e << (2 * D)), .sub(sub_root), .y(prod));

  delay_line #(.W(1), .DEPTH(LAT)) u_dneg (.clk(clk), .din(neg0), .dout(neg));

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];
endmodule
