// bss_fir: reconfigurable FIR filter with binary signed digit (BSS)
// coefficients and pipelined CSA/CLA adders.
//
//     y[n] = sum_{k=0}^{TAPS-1} h_k * x[n-k]
//
// Structure (transposed direct form):
//   * a coefficient register bank h_0..h_{TAPS-1}, written one word at a
//     time through coef_we / coef_addr / coef_data; writing it is how the
//     filter is reconfigured, with no change to the hardware;
//   * one shared precomputer that forms the small multiples of x[n]
//     (1x..8x for 4-bit digits, 1x..4x for 3-bit digits);
//   * one processing element (PE) per tap that forms +/- h_k * x[n] from
//     those multiples with multiplexers and add/subtract units
//     (pe_bss4 when D = 4, pe_bss3 when D = 3);
//   * a chain of adders and Z^-1 registers from the last PE down to PE_0:
//     z_k <= z_{k+1} +/- prod_k, and y <= z_1 +/- prod_0. The sign of each
//     step comes from the PE.
//
// Timing: one sample per clock when in_valid is high every cycle; gaps are
// allowed and freeze the delay chain. A sample presented with in_valid
// appears in y with out_valid LAT cycles later: LAT = 2 + 2*8 = 18 cycles
// for D = 4 and 2 + 3*8 = 26 for D = 3 with 33-bit adders. A coefficient
// written in the same cycle as a sample is used for that sample; products of
// earlier samples already in the chain keep their old coefficients.
// Arithmetic is two's complement modulo 2^33; with 16-bit samples and
// coefficients eight taps cannot overflow except when every product is
// (-2^15)*(-2^15).
// rst_n (asynchronous, active low) clears the coefficients, the chain and
// the valid flags.
//
// The precomputer, the per-tap PEs with BSS decoder, the CSA/CLA add/sub
// units, the 4-bit and 3-bit variants and the adder/Z^-1 chain follow the
// design. The number of taps, the 16-bit widths, the coefficient write port
// and the valid handshake are this implementation's choices.
module bss_fir
  import fir_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CSLA,  // adder style in every PE
  parameter int unsigned D    = 4,           // digit size: 4 or 3
  parameter int unsigned TAPS = 8,
  parameter int unsigned XW   = X_W,
  parameter int unsigned HW   = H_W,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned MW  = XW + D - 1,
  localparam int unsigned M   = 1 << (D - 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // coefficient load (reconfiguration)
  input  logic                    coef_we,
  input  logic [AW-1:0]           coef_addr,
  input  logic [HW-1:0]           coef_data,
  // sample stream
  input  logic                    in_valid,
  input  logic signed [XW-1:0]    x,
  output logic                    out_valid,
  output logic signed [ADD_W-1:0] y
);
  initial begin
    assert (D == 3 || D == 4) else $error("bss_fir: D must be 3 or 4");
    assert (TAPS >= 2) else $error("bss_fir: TAPS must be at least 2");
  end

  // coefficient bank
  logic [HW-1:0] h_q [TAPS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) h_q[k] <= '0;
    end else if (coef_we) begin
      h_q[coef_addr] <= coef_data;
    end
  end

  // The coefficient used with a sample is the one visible when the sample's
  // multiples reach the PEs, one cycle later; a write in the same cycle as
  // the sample is therefore already seen.

  // shared precomputer
  logic                 pc_valid;
  logic signed [MW-1:0] mult [M];
  precomputer #(.D(D), .XW(XW)) u_pre (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(pc_valid), .mult(mult)
  );

  // processing elements
  logic [TAPS-1:0]         pe_valid;
  logic [TAPS-1:0]         pe_neg;
  logic [ADD_W-1:0]        pe_prod [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_pe
    if (D == 4) begin : g_pe4
      pe_bss4 #(.KIND(KIND), .XW(XW), .HW(HW)) u_pe (
        .clk(clk), .rst_n(rst_n), .in_valid(pc_valid), .mult(mult), .h(h_q[k]),
        .out_valid(pe_valid[k]), .prod(pe_prod[k]), .neg(pe_neg[k])
      );
    end else begin : g_pe3
      pe_bss3 #(.KIND(KIND), .XW(XW), .HW(HW)) u_pe (
        .clk(clk), .rst_n(rst_n), .in_valid(pc_valid), .mult(mult), .h(h_q[k]),
        .out_valid(pe_valid[k]), .prod(pe_prod[k]), .neg(pe_neg[k])
      );
    end
  end

  // every PE has the same latency, so PE_0's valid stands for all
  logic step;
  assign step = pe_valid[0];

  // adder / Z^-1 chain: tap k adds (or subtracts) its product to the
  // partial sum up_k arriving from tap k+1; z_q[k] is the Z^-1 register
  // between tap k+1 and tap k, and the last tap starts from zero.
  logic [ADD_W-1:0] up  [TAPS];
  logic [ADD_W-1:0] tap [TAPS];
  logic [ADD_W-1:0] z_q [TAPS-1];

  for (genvar k = 0; k < TAPS; k++) begin : g_chain
    if (k == TAPS - 1) begin : g_last
      assign up[k] = '0;
    end else begin : g_mid
      assign up[k] = z_q[k];
    end
    assign tap[k] = pe_neg[k] ? up[k] - pe_prod[k] : up[k] + pe_prod[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) z_q[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= step;
      if (step) begin
        for (int k = 0; k < TAPS - 1; k++) z_q[k] <= tap[k+1];
        y <= tap[0];
      end
    end
  end

  // all PEs must agree on when their products are valid
  a_pe_valid_agree: assert property (@(posedge clk) disable iff (!rst_n)
    (pe_valid == '0 || pe_valid == '1))
    else $error("bss_fir: PE valid flags disagree");
  // a coefficient write must address an existing tap
  a_coef_addr: assert property (@(posedge clk) disable iff (!rst_n)
    coef_we |-> (int'(coef_addr) < TAPS))
    else $error("bss_fir: coefficient address out of range");
endmodule
