// addsub_unit: the add/subtract unit of a processing element.
//
// Computes a + b when sub = 0 and a - b when sub = 1, in two's complement,
// modulo 2^WIDTH. Subtraction inverts b and sets the adder's carry in, so
// one pipelined adder does both. KIND picks the adder: the carry-select
// adder (default) or the carry look-ahead adder. Both have the same latency,
// LAT = (WIDTH-1)/4 cycles, and accept a new operation every cycle; sub is
// sampled together with a and b.
//
// The unit with an add/subtract control and a choice of two adder styles
// follows the design; forming subtraction by inversion plus carry in is this
// implementation's choice.
module addsub_unit
  import fir_pkg::*;
#(
  parameter adder_kind_e KIND  = ADDER_CSLA,
  parameter int unsigned WIDTH = ADD_W
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] b_eff;
  assign b_eff = sub ? ~b : b;

  if (KIND == ADDER_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH)) u_add (.clk(clk), .a(a), .b(b_eff), .cin(sub), .sum(y));
  end else begin : g_csla
    csla_adder #(.WIDTH(WIDTH)) u_add (.clk(clk), .a(a), .b(b_eff), .cin(sub), .sum(y));
  end
endmodule
