// bss_decoder: recodes one filter coefficient into binary signed digits and
// derives the multiplexer and add/subtract controls of a processing element.
//
// The H_W-bit two's complement coefficient h is split, from the least
// significant end, into D-bit groups; the last digit takes the remaining top
// bits as a signed field. Walking up from the bottom, a group value v (plus
// the carry from below) above 2^(D-1) becomes the negative digit v - 2^D and
// passes a carry of one upwards. Every digit then lies in
// [-2^(D-1), 2^(D-1)] and h = sum_i d_i * 2^(D*i) exactly.
//   D = 4: four digits in [-8, 8]      (magnitudes 1..8 -> 8:1 multiplexers)
//   D = 3: six digits, five in [-4, 4] (4:1 multiplexers) and a top digit in
//          [-1, 1] (2:1 multiplexer)
//
// Mux control: for digit i, sel[i] = |d_i| - 1 picks the multiple |d_i| * x
//   from the precomputer, and en[i] = (d_i != 0) lets it through the gate
//   (a zero digit contributes 0).
// Add/sub control: the processing element sums the digit magnitudes in a
//   tree. A node that joins a lower subtree L and an upper subtree U carries
//   the sign of L and subtracts U when the signs of L and U differ; the
//   result of the whole tree is then the product times the sign of digit 0,
//   given as neg. Order of sub[]: the first-level pairs (digits 2j, 2j+1)
//   first, then the higher nodes (see pe_bss4 and pe_bss3).
//
// Purely combinational. The digit sizes, the 8:1 / 4:1 / 2:1 multiplexer
// sizes and the split into mux control and add/sub control follow the
// design; the recoding rule, the zero gating and the sign convention are this
// implementation's choice.
module bss_decoder
  import fir_pkg::*;
#(
  parameter int unsigned D  = 4,
  parameter int unsigned HW = H_W,
  localparam int unsigned ND = num_digits(D, HW)
) (
  input  logic [HW-1:0]   h,
  output logic [D-2:0]    sel [ND],   // multiple index, |d| - 1
  output logic [ND-1:0]   en,         // digit is non-zero
  output logic [ND-1:0]   dneg,       // digit is negative
  output logic [ND-2:0]   sub,        // add/sub control of each tree adder
  output logic            neg         // tree result must be negated
);
  localparam int unsigned TOPW = HW - D * (ND - 1);

  initial begin
    assert (D == 3 || D == 4) else $error("bss_decoder: D must be 3 or 4");
  end

  always_comb begin
    int c, v, d, m;
    c = 0;
    for (int i = 0; i < ND; i++) begin
      if (i < ND - 1) begin
        v = int'(h[D*i +: D]) + c;
        if (v > (1 << (D - 1))) begin
          d = v - (1 << D);
          c = 1;
        end else begin
          d = v;
          c = 0;
        end
      end else begin
        // signed top field plus the carry from below
        v = int'(h[HW-1 -: TOPW]);
        if (h[HW-1]) v = v - (1 << TOPW);
        d = v + c;
      end
      m       = (d < 0) ? -d : d;
      en[i]   = (m != 0);
      dneg[i] = (d < 0);
      sel[i]  = (m != 0) ? (D-1)'(m - 1) : '0;
    end

    neg = dneg[0];
  end

  // Add/sub control
  for (genvar j = 0; j < ND / 2; j++) begin : g_pair
    assign sub[j] = dneg[2*j] ^ dneg[2*j+1];
  end
  if (ND == 4) begin : g_tree4
    assign sub[2] = dneg[0] ^ dneg[2];       // root: pair01 -/+ pair23
  end else if (ND == 6) begin : g_tree3
    assign sub[3] = dneg[2] ^ dneg[4];       // pair23 -/+ pair45
    assign sub[4] = dneg[0] ^ dneg[2];       // root: pair01 -/+ (pair23..45)
  end

endmodule
