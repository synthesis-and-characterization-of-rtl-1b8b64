// tb_approx_adders: self-checking testbench for the eleven approximate
// adders, 16-bit, in two banks: the high-performance precisions (the
// modules' defaults, e.g. LOA-10, ACA-4) and the low-power precisions
// (LOA-6, TruA-5, ESA-8, ETAII-6, SCSA-6, ACA-8, ACAA-6, CSA-5, GCSA-6,
// CSPA-6, CCA-6).
//
// Each adder is compared against a reference model written here in plain
// integer arithmetic, block by block, from the definition of the scheme
// (not from the RTL structure). Stimulus: corner operands, long carry
// chains (all-ones plus one, alternating patterns), and random operands from
// $urandom. Extra independent properties are checked too: adding 0 is exact
// for every carry-cut adder, SCSA and ETAII agree (same speculation, two
// structures), and the error rate of each adder is reported for comparison
// with published figures.
module tb_approx_adders;
  localparam int N = 16;
  localparam int NADD = 11;
  localparam int KV [2][NADD] = '{'{10, 9, 6, 3, 3, 4, 3, 5, 6, 5, 6},
                                  '{6, 5, 8, 6, 6, 8, 6, 5, 6, 6, 6}};
  localparam string NAME [NADD] = '{"LOA", "TruA", "ESA", "ETAII", "SCSA", "ACA",
                                     "ACAA", "CSA", "GCSA", "CSPA", "CCA"};

  logic [N-1:0] a, b;
  logic [N:0]   s [2][NADD];
  int checks = 0, failures = 0;
  int errs [2][NADD];

  // high-performance bank: module defaults
  loa_adder   u0  (.a, .b, .sum(s[0][0]));
  trua_adder  u1  (.a, .b, .sum(s[0][1]));
  esa_adder   u2  (.a, .b, .sum(s[0][2]));
  etaii_adder u3  (.a, .b, .sum(s[0][3]));
  scsa_adder  u4  (.a, .b, .sum(s[0][4]));
  aca_adder   u5  (.a, .b, .sum(s[0][5]));
  acaa_adder  u6  (.a, .b, .sum(s[0][6]));
  csa_adder   u7  (.a, .b, .sum(s[0][7]));
  gcsa_adder  u8  (.a, .b, .sum(s[0][8]));
  cspa_adder  u9  (.a, .b, .sum(s[0][9]));
  cca_adder   u10 (.a, .b, .sum(s[0][10]));
  // low-power bank, precisions as in KV[1]
  loa_adder   #(.K(6))         l0  (.a, .b, .sum(s[1][0]));
  trua_adder  #(.K(5))         l1  (.a, .b, .sum(s[1][1]));
  esa_adder   #(.K(8))         l2  (.a, .b, .sum(s[1][2]));
  etaii_adder #(.K(6))         l3  (.a, .b, .sum(s[1][3]));
  scsa_adder  #(.K(6))         l4  (.a, .b, .sum(s[1][4]));
  aca_adder   #(.K(8))         l5  (.a, .b, .sum(s[1][5]));
  acaa_adder  #(.K(6))         l6  (.a, .b, .sum(s[1][6]));
  csa_adder   #(.K(5))         l7  (.a, .b, .sum(s[1][7]));
  gcsa_adder  #(.K(6))         l8  (.a, .b, .sum(s[1][8]));
  cspa_adder  #(.K(6))         l9  (.a, .b, .sum(s[1][9]));
  cca_adder   #(.K(6))         l10 (.a, .b, .sum(s[1][10]));

  function automatic longint msk(int w);
    return (longint'(1) << w) - 1;
  endfunction
  // field of K bits of x starting at block j (x zero-extended)
  function automatic longint fld(longint x, int j, int k, int w);
    return (x >> (j * k)) & msk(w);
  endfunction

  // reference model of adder number id
  function automatic longint ref_sum(int bank, int id, longint x, longint y);
    int k = KV[bank][id];
    int nb = (N + k - 1) / k;
    longint r = 0;
    longint g [8], g2 [8], pr [8], pd [8];
    int cin;
    case (id)
      0: begin  // LOA
        r = ((x >> k) + (y >> k) + ((x >> (k - 1)) & (y >> (k - 1)) & 1)) << k;
        return r | ((x | y) & msk(k));
      end
      1: return ((x >> k) + (y >> k)) << k;  // TruA
      5: begin  // ACA: bit i from bit i and the K bits below it
        for (int i = 0; i <= N; i++) begin
          int lo = (i - k > 0) ? i - k : 0;
          longint t = ((x >> lo) & msk(i - lo + 1)) + ((y >> lo) & msk(i - lo + 1));
          r |= ((t >> (i - lo)) & 1) << i;
        end
        return r;
      end
      6: begin  // ACAA
        if (nb == 1) return x + y;
        for (int j = 1; j < nb; j++) begin
          longint t = fld(x, j - 1, k, 2 * k) + fld(y, j - 1, k, 2 * k);
          if (j == 1) r |= t & msk(k);
          if (j == nb - 1) r |= (t >> k) << (j * k);
          else             r |= ((t >> k) & msk(k)) << (j * k);
        end
        return r & msk(N + 1);
      end
      default: ;
    endcase
    // block-structured adders
    for (int j = 0; j < nb; j++) begin
      g[j]  = (fld(x, j, k, k) + fld(y, j, k, k)) >> k;
      pr[j] = ((fld(x, j, k, k) ^ fld(y, j, k, k)) == msk(k)) ? 1 : 0;
      g2[j] = (j == 0) ? g[0] : (fld(x, j - 1, k, 2 * k) + fld(y, j - 1, k, 2 * k)) >> (2 * k);
      pd[j] = ((fld(x, j, k, k) >> (k - (k + 1) / 2)) + (fld(y, j, k, k) >> (k - (k + 1) / 2))) >> ((k + 1) / 2);
    end
    for (int j = 0; j < nb; j++) begin
      longint t;
      if (j == 0) cin = 0;
      else case (id)
        2: cin = 0;                                             // ESA
        3, 4: cin = int'(g[j-1]);                               // ETAII, SCSA
        7: cin = (j >= 2 && pr[j-1] != 0) ? int'(g[j-2]) : int'(g[j-1]);  // CSA
        8: cin = (pr[j] != 0) ? int'(g2[j-1]) : int'(g[j-1]);   // GCSA
        9: cin = int'(pd[j-1]);                                 // CSPA
        10: cin = (g[j-1] != 0 || (pr[j] != 0 && pr[j-1] != 0)) ? 1 : 0;  // CCA
        default: cin = 0;
      endcase
      t = fld(x, j, k, k) + fld(y, j, k, k) + longint'(cin);
      if (j == nb - 1) r |= t << (j * k);
      else             r |= (t & msk(k)) << (j * k);
    end
    return r & msk(N + 1);
  endfunction

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
    a = x; b = y;
    #1;
    for (int bk = 0; bk < 2; bk++) begin
      for (int id = 0; id < NADD; id++) begin
        longint exp_s = ref_sum(bk, id, longint'(x), longint'(y));
        checks++;
        if (longint'(s[bk][id]) != exp_s) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s-%0d a=%h b=%h got=%h exp=%h", NAME[id], KV[bk][id], x, y, s[bk][id], exp_s);
        end
        if (longint'(s[bk][id]) != longint'(x) + longint'(y)) errs[bk][id]++;
      end
      // SCSA and ETAII implement the same speculation with different structures
      checks++;
      if (s[bk][3] !== s[bk][4]) begin
        failures++;
        $display("FAIL SCSA/ETAII differ a=%h b=%h", x, y);
      end
      // adding zero has no carries: exact for every adder that keeps the LSBs
      // and never speculates a carry of 1
      if (y == 0) begin
        for (int id = 0; id < NADD; id++) begin
          if (id == 1 || id == 10) continue;  // TruA drops LSBs; CCA may speculate 1
          checks++;
          if (s[bk][id] != {1'b0, x}) begin
            failures++;
            $display("FAIL %s a+0 a=%h got=%h", NAME[id], x, s[bk][id]);
          end
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nvec;
    foreach (errs[i, j]) errs[i][j] = 0;
    nvec = 0;
    apply('0, '0);
    apply('1, '0);
    apply('1, 16'h0001);
    apply('1, '1);
    apply(16'h5555, 16'hAAAB);
    apply(16'h7FFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < N; i++) apply(16'hFFFF >> i, 16'h0001 << i);
    for (int i = 0; i < 200; i++) apply(16'($urandom), 16'h0);
    for (int i = 0; i < 20000; i++) begin
      apply(16'($urandom), 16'($urandom));
      nvec++;
    end
    for (int bk = 0; bk < 2; bk++)
      for (int id = 0; id < NADD; id++)
        $display("%-6s K=%0d erroneous sums: %0d of %0d vectors (%.2f%%)", NAME[id], KV[bk][id],
                 errs[bk][id], nvec + 223 + N, 100.0 * real'(errs[bk][id]) / real'(nvec + 223 + N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
