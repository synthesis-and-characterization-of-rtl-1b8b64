// tb_approx_mults: self-checking testbench for the approximate multipliers
// (TruM, AM/TAM, TBM, BBM, PPAM, UDM, ICM).
//
// Reference values are computed here from each scheme's definition:
//   TruM  exact product of the operands with T LSBs cleared
//   TBM   exact signed product of the truncated operands
//   BBM   Booth rows formed from digit arithmetic, low columns dropped;
//         with VBL = 0 it must equal the exact signed product, and at VBL = 8
//         it may only fall short of the exact product by less than 8 * 2^8
//   AM    an independent model of the carry-free adder tree and of both
//         recovery schemes; the result may never exceed the exact product,
//         and a single partial-product row must come out exact
//   PPAM  exact product with the perforated bits of b cleared
//   UDM   exact product minus 2 * 4^(i+j) for every 2-bit digit pair 3 x 3
//   ICM   a bit-count model of the counter tree (rows taken four at a time,
//         each column's count c of four bits becomes c mod 2 plus a carry
//         for c >= 2); never above the exact product, exact for one row
// The low-power precisions TruM-5, AM2-14, AM1-15 and PPAM-J0K13 are
// checked against the same models.
// Stimulus: corners plus $urandom operands. Mean relative error distances
// are printed for comparison with published figures.
module tb_approx_mults;
  localparam int N = 16;

  logic [N-1:0] a, b;
  logic [2*N-1:0] p_trum, p_tam1, p_tam2, p_am1, p_am2, p_ppam, p_udm, p_icm;
  logic [2*N-1:0] p_trum5, p_am2_14, p_am1_15, p_ppam0;
  logic signed [2*N-1:0] p_tbm, p_bbm, p_bbm0;
  int checks = 0, failures = 0;
  real mred_icm = 0, mred_trum = 0, mred_tam1 = 0, mred_tam2 = 0, mred_tbm = 0;
  real mred_lp [4] = '{0.0, 0.0, 0.0, 0.0};
  int nmred = 0;

  trum_mult                                         u_trum (.a, .b, .p(p_trum));
  am_mult                                           u_tam1 (.a, .b, .p(p_tam1));
  am_mult   #(.M(16), .SCHEME(2), .TCOLS(16))       u_tam2 (.a, .b, .p(p_tam2));
  am_mult   #(.M(11), .SCHEME(1), .TCOLS(0))        u_am1  (.a, .b, .p(p_am1));
  am_mult   #(.M(32), .SCHEME(2), .TCOLS(0))        u_am2  (.a, .b, .p(p_am2));
  ppam_mult                                         u_ppam (.a, .b, .p(p_ppam));
  udm_mult                                          u_udm  (.a, .b, .p(p_udm));
  icm_mult                                          u_icm  (.a, .b, .p(p_icm));
  // low-power precisions
  trum_mult #(.T(5))                                u_trum5 (.a, .b, .p(p_trum5));
  am_mult   #(.M(14), .SCHEME(2), .TCOLS(0))        u_am214 (.a, .b, .p(p_am2_14));
  am_mult   #(.M(15), .SCHEME(1), .TCOLS(0))        u_am115 (.a, .b, .p(p_am1_15));
  ppam_mult #(.J(0), .K(13))                        u_ppam0 (.a, .b, .p(p_ppam0));
  tbm_mult                                          u_tbm  (.a(signed'(a)), .b(signed'(b)), .p(p_tbm));
  bbm_mult                                          u_bbm  (.a(signed'(a)), .b(signed'(b)), .p(p_bbm));
  bbm_mult  #(.VBL(0))                              u_bbm0 (.a(signed'(a)), .b(signed'(b)), .p(p_bbm0));

  // 4:2 counter tree: the count 4 is returned as 2
  function automatic longint icm_ref(longint x, longint y);
    longint v [16];
    longint nv [16];
    int cnt = 16;
    for (int j = 0; j < 16; j++) v[j] = (((y >> j) & 1) != 0) ? (x << j) : 0;
    while (cnt > 2) begin
      for (int g = 0; g < cnt / 4; g++) begin
        nv[2*g] = 0;
        nv[2*g+1] = 0;
        for (int k = 0; k < 32; k++) begin
          int c = 0;
          for (int r = 0; r < 4; r++) c += int'((v[4*g+r] >> k) & 1);
          if (c % 2 == 1) nv[2*g] |= longint'(1) << k;
          if (c >= 2) nv[2*g+1] |= longint'(1) << (k + 1);
        end
      end
      cnt = cnt / 2;
      for (int j = 0; j < cnt; j++) v[j] = nv[j];
    end
    return (v[0] + v[1]) & 64'hFFFF_FFFF;
  endfunction

  // carry-free approximate adder tree with error recovery, modelled on
  // unsigned integers
  function automatic longint am_ref(longint x, longint y, int m, int scheme, int tcols);
    longint v [16];
    longint lv [4];
    longint rec = 0, tot, keep;
    int cnt = 16;
    keep = ~((longint'(1) << tcols) - 1);
    for (int j = 0; j < 16; j++) v[j] = (((y >> j) & 1) != 0) ? ((x << j) & keep) : 0;
    for (int l = 0; l < 4; l++) begin
      lv[l] = 0;
      for (int k = 0; k < cnt / 2; k++) begin
        longint xo = v[2*k] ^ v[2*k+1];
        longint cy = ((v[2*k] & v[2*k+1]) << 1) & 64'hFFFF_FFFF;
        v[k] = xo | cy;
        lv[l] |= xo & cy;
      end
      cnt = cnt / 2;
    end
    for (int l = 0; l < 4; l++) rec = (scheme == 1) ? (rec | lv[l]) : (rec + lv[l]);
    rec &= ~((longint'(1) << (32 - m)) - 1);
    tot = (v[0] + rec) & 64'hFFFF_FFFF;
    return tot;
  endfunction

  // broken Booth reference: digit d = -2 b[2j+1] + b[2j] + b[2j-1]
  function automatic longint bbm_ref(longint x, longint y, int vbl);
    longint acc = 0, row, mag;
    int d;
    longint m32 = 64'hFFFF_FFFF;
    longint keep = ~((longint'(1) << vbl) - 1) & m32;
    for (int j = 0; j < 8; j++) begin
      int b1 = int'((y >> (2*j+1)) & 1), b0 = int'((y >> (2*j)) & 1);
      int bm = (j == 0) ? 0 : int'((y >> (2*j-1)) & 1);
      d = -2 * b1 + b0 + bm;
      mag = (d < 0 ? -d : d) * x;          // x is sign-extended
      row = (d < 0) ? (-mag - 1) : mag;    // one's complement for negatives
      acc += ((row << (2*j)) & keep);
      if (d < 0 && 2*j >= vbl) acc += longint'(1) << (2*j);
    end
    return acc & m32;
  endfunction

  task automatic chk(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp_v);
    end
  endtask

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
    longint ux, uy, sx, sy, exact_u, exact_s, m32, d;
    a = x; b = y;
    #1;
    m32 = 64'hFFFF_FFFF;
    ux = longint'(x); uy = longint'(y);
    sx = longint'(signed'(x)); sy = longint'(signed'(y));
    exact_u = ux * uy;
    exact_s = sx * sy;
    chk("TruM", longint'(p_trum), ((ux >> 7) << 7) * ((uy >> 7) << 7));
    chk("TBM", longint'(p_tbm), (((sx >>> 7) <<< 7) * ((sy >>> 7) <<< 7)));
    chk("BBM0", longint'(p_bbm0), exact_s);
    chk("BBM", longint'(p_bbm) & m32, bbm_ref(sx, sy, 8));
    d = exact_s - longint'(p_bbm);
    checks++;
    if (d < 0 || d >= 8 * 256) begin
      failures++;
      $display("FAIL BBM bound a=%h b=%h d=%0d", x, y, d);
    end
    chk("TAM1", longint'(p_tam1), am_ref(ux, uy, 16, 1, 16));
    chk("TAM2", longint'(p_tam2), am_ref(ux, uy, 16, 2, 16));
    chk("AM1", longint'(p_am1), am_ref(ux, uy, 11, 1, 0));
    chk("AM2", longint'(p_am2), am_ref(ux, uy, 32, 2, 0));
    checks++;
    if (longint'(p_tam1) > exact_u || longint'(p_tam2) > exact_u || longint'(p_am1) > exact_u) begin
      failures++;
      $display("FAIL AM above exact a=%h b=%h", x, y);
    end
    if ($countones(y) == 1) chk("AM1 one row", longint'(p_am1), exact_u);
    chk("PPAM", longint'(p_ppam), ux * (uy & ~longint'(16'hFFE)));
    begin
      longint u = exact_u;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (((ux >> (2*i)) & 3) == 3 && ((uy >> (2*j)) & 3) == 3) u -= 2 * (longint'(1) << (2*(i+j)));
      chk("UDM", longint'(p_udm), u);
    end
    chk("ICM", longint'(p_icm), icm_ref(ux, uy));
    chk("TruM-5", longint'(p_trum5), ((ux >> 5) << 5) * ((uy >> 5) << 5));
    chk("AM2-14", longint'(p_am2_14), am_ref(ux, uy, 14, 2, 0));
    chk("AM1-15", longint'(p_am1_15), am_ref(ux, uy, 15, 1, 0));
    chk("PPAM-J0K13", longint'(p_ppam0), ux * (uy & ~longint'(16'h1FFF)));
    checks++;
    if (longint'(p_icm) > exact_u) begin
      failures++;
      $display("FAIL ICM above exact a=%h b=%h", x, y);
    end
    if ($countones(y) == 1) chk("ICM one row", longint'(p_icm), exact_u);
    if (exact_u != 0) begin
      mred_trum += real'(exact_u - longint'(p_trum)) / real'(exact_u);
      mred_tam1 += real'(exact_u - longint'(p_tam1)) / real'(exact_u);
      mred_tam2 += real'(exact_u - longint'(p_tam2)) / real'(exact_u);
      mred_icm += real'(exact_u - longint'(p_icm)) / real'(exact_u);
      mred_lp[0] += real'(exact_u - longint'(p_trum5)) / real'(exact_u);
      mred_lp[1] += real'(exact_u - longint'(p_am2_14)) / real'(exact_u);
      mred_lp[2] += real'(exact_u - longint'(p_am1_15)) / real'(exact_u);
      mred_lp[3] += real'(exact_u - longint'(p_ppam0)) / real'(exact_u);
      if (exact_s != 0) mred_tbm += (exact_s > longint'(p_tbm) ? real'(exact_s - longint'(p_tbm)) : real'(longint'(p_tbm) - exact_s)) / (exact_s > 0 ? real'(exact_s) : real'(-exact_s));
      nmred++;
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
    apply('0, '0);
    apply('1, '1);
    apply(16'h8000, 16'h8000);
    apply(16'h7FFF, 16'h8000);
    apply(16'h8000, 16'h7FFF);
    apply(16'hFFFF, 16'h0001);
    for (int i = 0; i < N; i++) apply(16'($urandom), 16'h1 << i);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    $display("MRED TruM-7 %.5f  TAM1-16 %.5f  TAM2-16 %.5f  TBM-7 %.5f  ICM %.6f", mred_trum / nmred,
             mred_tam1 / nmred, mred_tam2 / nmred, mred_tbm / nmred, mred_icm / nmred);
    $display("MRED low power: TruM-5 %.5f  AM2-14 %.5f  AM1-15 %.5f  PPAM-J0K13 %.4f",
             mred_lp[0] / nmred, mred_lp[1] / nmred, mred_lp[2] / nmred, mred_lp[3] / nmred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
