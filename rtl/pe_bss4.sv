// pe_bss4: processing element of the 4-bit BSS filter: multiplies the
// current sample by one coefficient using only multiplexers and adders.
//
// The coefficient h is recoded (bss_decoder, D = 4) into four signed digits
// d0..d3 of weight 16^i. Four 8:1 multiplexers pick |d_i| * x from the eight
// precomputed multiples, and a gate passes the pick or 0 when the digit is 0.
// Three add/subtract units then sum the digit terms:
//     A = t0 +/- (t1 << 4)      B = t2 +/- (t3 << 4)      T = A +/- (B << 8)
// with the add/sub controls from the decoder. T equals h * x when neg = 0
// and -(h * x) when neg = 1; the filter's delay chain applies that sign.
//
// Timing: two adder levels of LAT = (ADD_W-1)/4 cycles each, so prod, neg
// and out_valid appear 2*LAT cycles after mult/h/in_valid (16 cycles with
// the 33-bit adders). One product per clock. h is sampled together with
// mult, so a coefficient change affects exactly the samples that enter
// after it. rst_n (asynchronous, active low) clears the valid pipeline.
//
// Multiplexer sizes, gating, the tree shape with its <<4 / <<8 shifts and
// the CSA/CLA add/subtract units follow the design; the separate sign output
// is this implementation's choice.
module pe_bss4
  import fir_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CSLA,
  parameter int unsigned XW   = X_W,
  parameter int unsigned HW   = H_W,
  localparam int unsigned D   = 4,
  localparam int unsigned M   = 1 << (D - 1),
  localparam int unsigned MW  = XW + D - 1,
  localparam int unsigned ND  = num_digits(D, HW),
  localparam int unsigned LAT = 2 * ADD_LAT
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
  // BSS decoder: mux control and add/sub control
  logic [D-2:0]  sel [ND];
  logic [ND-1:0] en;
  logic [ND-2:0] sub;
  logic          neg0;

  bss_decoder #(.D(D), .HW(HW)) u_dec (
    .h(h), .sel(sel), .en(en), .dneg(), .sub(sub), .neg(neg0)
  );

  // multiplexers and gates; terms sign-extended to the adder width
  logic signed [ADD_W-1:0] t [ND];
  always_comb begin
    for (int i = 0; i < ND; i++) t[i] = en[i] ? ADD_W'(mult[sel[i]]) : '0;
  end

  // first level
  logic [ADD_W-1:0] sum_a, sum_b;
  addsub_unit #(.KIND(KIND)) u_add_a (
    .clk(clk), .a(t[0]), .b(t[1] <<< D), .sub(sub[0]), .y(sum_a));
  addsub_unit #(.KIND(KIND)) u_add_b (
    .clk(clk), .a(t[2]), .b(t[3] <<< D), .sub(sub[1]), .y(sum_b));

  // root, its add/sub control delayed to meet the first-level sums
  logic sub_root;
  delay_line #(.W(1), .DEPTH(ADD_LAT)) u_dsub (.clk(clk), .din(sub[2]), .dout(sub_root));
  addsub_unit #(.KIND(KIND)) u_add_root (
    .clk(clk), .a(sum_a), .b(sum_b << (2 * D)), .sub(sub_root), .y(prod));

  delay_line #(.W(1), .DEPTH(LAT)) u_dneg (.clk(clk), .din(neg0), .dout(neg));

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];
endmodule
