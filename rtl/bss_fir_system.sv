// bss_fir_system: top level holding the two pieces of arithmetic hardware
// side by side, each with its own ports:
//   * fir_*  : the reconfigurable BSS FIR filter (bss_fir) in its default
//              build: 8 taps, 4-bit signed digits, pipelined carry-select
//              adders, 16-bit samples and coefficients, 33-bit output,
//              18-cycle latency. Set FIR_D = 3 for the 3-bit-digit variant
//              and FIR_KIND = ADDER_CLA for carry look-ahead adders.
//   * mac_*  : the Booth / Wallace-tree multiplier-cum-accumulator
//              (booth_mac): 16 x 16 signed products accumulated in 40 bits,
//              one operation per clock, result one clock later.
// The two share only the clock and the reset (asynchronous, active low).
// Nothing connects them: the filter forms its products with multiplexers
// and adders and needs no multiplier, while the MAC is a stand-alone unit.
module bss_fir_system
  import fir_pkg::*;
#(
  parameter adder_kind_e FIR_KIND = ADDER_CSLA,
  parameter int unsigned FIR_D    = 4,
  parameter int unsigned FIR_TAPS = 8,
  parameter int unsigned MAC_N    = 16,
  parameter int unsigned MAC_K    = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // filter
  input  logic                          fir_coef_we,
  input  logic [$clog2(FIR_TAPS)-1:0]   fir_coef_addr,
  input  logic [H_W-1:0]                fir_coef_data,
  input  logic                          fir_in_valid,
  input  logic signed [X_W-1:0]         fir_x,
  output logic                          fir_out_valid,
  output logic signed [ADD_W-1:0]       fir_y,
  // multiplier-cum-accumulator
  input  logic                          mac_en,
  input  logic                          mac_clr,
  input  logic signed [MAC_N-1:0]       mac_a,
  input  logic signed [MAC_N-1:0]       mac_b,
  output logic signed [2*MAC_N+MAC_K-1:0] mac_acc
);
  bss_fir #(.KIND(FIR_KIND), .D(FIR_D), .TAPS(FIR_TAPS)) u_fir (
    .clk(clk), .rst_n(rst_n),
    .coef_we(fir_coef_we), .coef_addr(fir_coef_addr), .coef_data(fir_coef_data),
    .in_valid(fir_in_valid), .x(fir_x), .out_valid(fir_out_valid), .y(fir_y)
  );

  booth_mac #(.N(MAC_N), .K(MAC_K)) u_mac (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .clr(mac_clr), .a(mac_a), .b(mac_b), .acc(mac_acc)
  );
endmodule
