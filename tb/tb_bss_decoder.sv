// tb_bss_decoder: self-checking testbench of the BSS coefficient decoder.
//
// Applies every 16-bit coefficient to a 4-bit-digit decoder and a 3-bit-digit
// decoder. For each it rebuilds the coefficient from the mux controls alone,
// sum_i (en_i ? +/-(sel_i + 1) : 0) * 2^(D*i), and also evaluates the adder
// tree the way the processing element does (using only sel, en, sub and
// neg), and checks both against the coefficient. It also checks that every
// digit fits its multiplexer (8:1, 4:1, and 2:1 for the top 3-bit digit)
// and that a zero digit is never enabled with a negative sign.
module tb_bss_decoder;
  logic [15:0] h;
  int checks = 0, failures = 0;

  // 4-bit digits
  logic [2:0] sel4 [4];
  logic [3:0] en4, dn4;
  logic [2:0] sub4;
  logic       neg4;
  bss_decoder #(.D(4)) dut4 (.h(h), .sel(sel4), .en(en4), .dneg(dn4), .sub(sub4), .neg(neg4));

  // 3-bit digits
  logic [1:0] sel3 [6];
  logic [5:0] en3, dn3;
  logic [4:0] sub3;
  logic       neg3;
  bss_decoder #(.D(3)) dut3 (.h(h), .sel(sel3), .en(en3), .dneg(dn3), .sub(sub3), .neg(neg3));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("h=%h %s: got %0d expected %0d", h, what, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      longint want, r4, r3, m4 [4], m3 [6], t_a, t_b, t_c, t_e, t_r;
      h = 16'(v);
      #1;
      want = longint'($signed(h));
      // 4-bit: reconstruct from digits
      r4 = 0;
      for (int i = 0; i < 4; i++) begin
        m4[i] = en4[i] ? longint'(sel4[i]) + 1 : 0;
        r4 += (dn4[i] ? -m4[i] : m4[i]) * (longint'(1) << (4 * i));
        if (!en4[i] && dn4[i]) check("4-bit zero digit sign", 1, 0);
      end
      check("4-bit digits", r4, want);
      // 4-bit: tree evaluation
      t_a = sub4[0] ? m4[0] - m4[1] * 16 : m4[0] + m4[1] * 16;
      t_b = sub4[1] ? m4[2] - m4[3] * 16 : m4[2] + m4[3] * 16;
      t_r = sub4[2] ? t_a - t_b * 256 : t_a + t_b * 256;
      check("4-bit tree", neg4 ? -t_r : t_r, want);
      // 3-bit: reconstruct from digits
      r3 = 0;
      for (int i = 0; i < 6; i++) begin
        m3[i] = en3[i] ? longint'(sel3[i]) + 1 : 0;
        r3 += (dn3[i] ? -m3[i] : m3[i]) * (longint'(1) << (3 * i));
        if (!en3[i] && dn3[i]) check("3-bit zero digit sign", 1, 0);
      end
      check("3-bit digits", r3, want);
      check("3-bit top digit fits 2:1 mux", (sel3[5] > 1) ? 1 : 0, 0);
      t_a = sub3[0] ? m3[0] - m3[1] * 8 : m3[0] + m3[1] * 8;
      t_b = sub3[1] ? m3[2] - m3[3] * 8 : m3[2] + m3[3] * 8;
      t_c = sub3[2] ? m3[4] - m3[5] * 8 : m3[4] + m3[5] * 8;
      t_e = sub3[3] ? t_b - t_c * 64 : t_b + t_c * 64;
      t_r = sub3[4] ? t_a - t_e * 64 : t_a + t_e * 64;
      check("3-bit tree", neg3 ? -t_r : t_r, want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
