// lp_pkg_tb - checks the protocol-family arithmetic of lp_pkg against
// counts and properties stated for the family:
//   * 10 untimed left cuts and 25 untimed right cuts (enumerated here
//     directly from the cut constraints), and lcut_at/rcut_at list exactly
//     those, each once;
//   * 250 pairs, of which 91 are not live; 23 live pairs are DI;
//   * 22 live pairs are unpipelined, 137 pipelined;
//   * max has 32 states, the right cut R2152 leaves 22 states, L0123 leaves 26;
//   * the lattices are closed under complement: L(3-d)(3-c)(3-b)(3-a) and
//     R(4-b)(4-a)(8-d)(8-c); L0033, L1122, R2262, R2244, R4044 are
//     self-complementary;
//   * L2222 o R4444 is not live (row 2 is empty).
module lp_pkg_tb;
  import lp_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++; $display("FAIL %s: %0d, expected %0d", what, got, want);
    end
  endtask

  function automatic int shape_size(cut_t l, cut_t r);
    int n = 0;
    for (int row = 0; row < 4; row++)
      for (int c = 0; c <= 12; c++) n += int'(in_shape(l, r, row_e'(row), c));
    return n;
  endfunction

  function automatic cut_t mk(int a, int b, int c, int d);
    return cut_t'((a << 12) | (b << 8) | (c << 4) | d);
  endfunction

  initial begin
    int nl, nr, nlive, ndi, nnone, idx_hits;
    cut_t l, r;
    // direct enumeration of the untimed cuts
    nl = 0; nr = 0;
    for (int a = 0; a <= 3; a++) for (int b = 0; b <= 3; b++)
      for (int c = 0; c <= 3; c++) for (int d = 0; d <= 3; d++)
        if (a <= b && b <= c && c <= d && a == b && c == d) begin
          nl++;
          idx_hits = 0;
          for (int i = 0; i < NUM_LCUTS; i++) idx_hits += int'(lcut_at(i) == mk(a, b, c, d));
          expect_eq($sformatf("L%0d%0d%0d%0d listed", a, b, c, d), idx_hits, 1);
          expect_eq("lcut_si", int'(lcut_si(mk(a, b, c, d))), 1);
        end
    for (int a = 0; a <= 4; a++) for (int b = 0; b <= 4; b++)
      for (int c = 0; c <= 8; c++) for (int d = 0; d <= 8; d++)
        if (a >= b && b + 4 >= c && c >= d && d >= a &&
            a % 2 == 0 && b % 2 == 0 && c % 2 == 0 && d % 2 == 0) begin
          nr++;
          idx_hits = 0;
          for (int i = 0; i < NUM_RCUTS; i++) idx_hits += int'(rcut_at(i) == mk(a, b, c, d));
          expect_eq($sformatf("R%0d%0d%0d%0d listed", a, b, c, d), idx_hits, 1);
        end
    expect_eq("left cuts", nl, NUM_LCUTS);
    expect_eq("right cuts", nr, NUM_RCUTS);
    expect_eq("left cuts (family)", nl, 10);
    expect_eq("right cuts (family)", nr, 25);

    nlive = 0; ndi = 0; nnone = 0;
    for (int i = 0; i < NUM_LCUTS; i++)
      for (int j = 0; j < NUM_RCUTS; j++) begin
        l = lcut_at(i); r = rcut_at(j);
        if (is_live(l, r)) begin
          nlive++;
          if (cut_di(l) && cut_di(r)) ndi++;
          if (occ_of_rcut(r) == OCC_NONE) nnone++;
        end
      end
    expect_eq("non-live pairs", NUM_LCUTS * NUM_RCUTS - nlive, 91);
    expect_eq("live DI pairs", ndi, 23);
    expect_eq("unpipelined live pairs", nnone, 22);
    expect_eq("pipelined live pairs", nlive - nnone, 137);

    expect_eq("max states", shape_size(16'h0000, 16'h0000), 32);
    expect_eq("R2152 states", shape_size(16'h0000, 16'h2152), 22);
    expect_eq("L0123 states", shape_size(16'h0123, 16'h0000), 26);
    expect_eq("R2152 valid", int'(rcut_valid(16'h2152)), 1);
    expect_eq("R0011 not SI", int'(rcut_si(16'h0011)), 0);
    expect_eq("L2222 o R4444 live", int'(is_live(16'h2222, 16'h4444)), 0);
    expect_eq("initial state kept", int'(in_shape(16'h3333, 16'h4488, ROW1, COL_INIT)), 1);

    // complements
    for (int i = 0; i < NUM_LCUTS; i++) begin
      cut_t c;
      l = lcut_at(i);
      c = mk(3 - int'(l[3:0]), 3 - int'(l[7:4]), 3 - int'(l[11:8]), 3 - int'(l[15:12]));
      expect_eq($sformatf("complement of L%04h", l), int'(lcut_si(c)), 1);
    end
    for (int j = 0; j < NUM_RCUTS; j++) begin
      cut_t c;
      r = rcut_at(j);
      c = mk(4 - int'(r[11:8]), 4 - int'(r[15:12]), 8 - int'(r[3:0]), 8 - int'(r[7:4]));
      expect_eq($sformatf("complement of R%04h", r), int'(rcut_si(c)), 1);
    end
    expect_eq("L0033 self-complementary", int'(mk(3-3, 3-3, 3-0, 3-0) == 16'h0033), 1);
    expect_eq("L1122 self-complementary", int'(mk(3-2, 3-2, 3-1, 3-1) == 16'h1122), 1);
    expect_eq("R2262 self-complementary", int'(mk(4-2, 4-2, 8-2, 8-6) == 16'h2262), 1);
    expect_eq("R2244 self-complementary", int'(mk(4-2, 4-2, 8-4, 8-4) == 16'h2244), 1);
    expect_eq("R4044 self-complementary", int'(mk(4-0, 4-4, 8-4, 8-4) == 16'h4044), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
