// booth_mac: multiplier-cum-accumulator with a radix-4 modified Booth
// multiplier and a Wallace tree of carry-save adders.
//
// Each clock with en = 1 it computes  acc <= (clr ? 0 : acc) + a * b  for
// signed N-bit a and b. The accumulation is merged into the multiplication:
// the previous result enters the Wallace tree as one more row beside the
// partial products, so there is no separate accumulator adder.
//   * Booth encoder: b is scanned in overlapping 3-bit groups
//     (b[2i+1], b[2i], b[2i-1]) giving N/2 digits in {-2,-1,0,1,2}.
//   * Partial products: each digit selects 0, a or 2a, sign-extended to
//     ACC_W bits and shifted by 2i; a negative digit inverts the row and
//     puts a 1 in a separate correction row at bit 2i (two's complement
//     negation completed inside the tree).
//   * Wallace tree: rows are reduced three at a time by carry-save adders
//     (sum = x^y^z, carry = majority << 1) until two rows are left.
//   * Final adder: one carry-propagate addition of the two rows.
// Rows: N/2 partial products + 1 correction row + 1 accumulator row.
//
// Width: ACC_W = 2N + K; K guard bits keep up to 2^K accumulated products
// from overflowing. Result register resets to 0 (rst_n asynchronous, active
// low). Latency: the result of a MAC operation is in acc one clock later;
// one operation per clock.
//
// The Booth multiplier, the Wallace tree of carry-save adders and folding
// the previous result into the partial-product sum follow the design; the
// widths, the clr/en controls, the negation by correction row and the
// single-cycle timing are this implementation's choices.
module booth_mac #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 8,
  localparam int unsigned ACC_W = 2 * N + K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [N-1:0]     a,
  input  logic signed [N-1:0]     b,
  output logic signed [ACC_W-1:0] acc
);
  localparam int unsigned NPP  = N / 2;
  localparam int unsigned ROWS = NPP + 2;

  // rows left after one level of 3:2 reduction
  function automatic int unsigned next_rows(int unsigned r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  function automatic int unsigned num_levels(int unsigned r);
    int unsigned l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned rows_at(int unsigned r, int unsigned lvl);
    for (int unsigned i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  localparam int unsigned NLEV = num_levels(ROWS);

  initial begin
    assert (N % 2 == 0) else $error("booth_mac: N must be even");
  end

  // Booth encoder and partial-product rows
  logic [ACC_W-1:0] pp [ROWS];

  always_comb begin
    logic [N:0]       bx;
    logic [2:0]       grp;
    logic [ACC_W-1:0] a_ext, row, corr;
    bx    = {b, 1'b0};
    a_ext = ACC_W'(a);
    corr  = '0;
    for (int i = 0; i < NPP; i++) begin
      grp = bx[2*i +: 3];
      case (grp)
        3'b001, 3'b010: row = a_ext;          // +1
        3'b011:         row = a_ext << 1;     // +2
        3'b100:         row = ~(a_ext << 1);  // -2
        3'b101, 3'b110: row = ~a_ext;         // -1
        default:        row = '0;             //  0
      endcase
      // ~X << 2i = -(X << 2i) - 2^(2i): the correction row adds 2^(2i) back
      if (grp[2] && grp != 3'b111) corr[2*i] = 1'b1;
      pp[i] = row << (2 * i);
    end
    pp[NPP]     = corr;
    pp[NPP + 1] = clr ? '0 : acc;
  end

  // Wallace tree: each level reduces its rows three at a time
  for (genvar l = 0; l < NLEV; l++) begin : g_level
    localparam int unsigned RIN  = rows_at(ROWS, l);
    localparam int unsigned ROUT = next_rows(RIN);
    localparam int unsigned NGRP = RIN / 3;
    logic [ACC_W-1:0] rin  [RIN];
    logic [ACC_W-1:0] rout [ROUT];
    if (l == 0) begin : g_first
      for (genvar j = 0; j < RIN; j++) begin : g_in
        assign rin[j] = pp[j];
      end
    end else begin : g_next
      for (genvar j = 0; j < RIN; j++) begin : g_in
        assign rin[j] = g_level[l-1].rout[j];
      end
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_csa
      assign rout[2*g]   = rin[3*g] ^ rin[3*g+1] ^ rin[3*g+2];
      assign rout[2*g+1] = ((rin[3*g] & rin[3*g+1]) | (rin[3*g] & rin[3*g+2])
                           | (rin[3*g+1] & rin[3*g+2])) << 1;
    end
    for (genvar j = 3 * NGRP; j < RIN; j++) begin : g_pass
      assign rout[j - NGRP] = rin[j];
    end
  end

  // final carry-propagate adder and result register
  logic [ACC_W-1:0] result;
  assign result = g_level[NLEV-1].rout[0] + g_level[NLEV-1].rout[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= result;
  end
endmodule
