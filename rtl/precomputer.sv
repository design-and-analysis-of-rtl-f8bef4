// precomputer: forms the multiples 1*x .. M*x of the input sample, M = 2^(D-1),
// once for all processing elements of the filter.
//
// Even multiples are shifts of a smaller multiple (2k*x = (k*x) << 1) and odd
// multiples add x to the even multiple below (2k+1)*x = 2k*x + x, so the unit
// needs M/2 - 1 adders (3 for D = 4: 3x, 5x, 7x; 1 for D = 3: 3x). The
// multiples are registered: mult[k-1] holds k*x of the sample presented one
// cycle earlier, and out_valid follows in_valid by one cycle.
//
// Interface: x is a signed XW-bit sample; each multiple is a signed
// MW = XW + D - 1 bit word. rst_n (asynchronous, active low) clears the
// valid flag only.
//
// The shared precomputer feeding every processing element follows the
// design; the set of multiples follows from the multiplexer sizes, and the
// shift/add construction and the output register are this implementation's
// choice.
module precomputer
  import fir_pkg::*;
#(
  parameter int unsigned D  = 4,
  parameter int unsigned XW = X_W,
  localparam int unsigned M  = 1 << (D - 1),
  localparam int unsigned MW = XW + D - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x,
  output logic                 out_valid,
  output logic signed [MW-1:0] mult [M]
);
  logic signed [MW-1:0] m_d [M];

  always_comb begin
    m_d[0] = MW'(x);
    for (int k = 2; k <= M; k++) begin
      if (k % 2 == 0) m_d[k-1] = m_d[k/2-1] <<< 1;
      else            m_d[k-1] = m_d[k-2] + m_d[0];
    end
  end

  always_ff @(posedge clk) mult <= m_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
