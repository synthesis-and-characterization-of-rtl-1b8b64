// tb_approx_image_top: end-to-end test of the whole design at its default
// parameters (512 x 512 frames, TBM-7 IDCT, TAM1-16 smoothing and
// sharpening).
//
// One complete operation of every part runs concurrently:
//   - the IDCT reconstructs three 8x8 blocks (one with input stalls, one
//     with extreme coefficients); pixels are compared with the original
//     block (PSNR of the normal blocks >= 28 dB, error <= 80 per pixel);
//   - one full 512 x 512 frame (synthetic image: gradients, texture and flat
//     black/white patches) goes through smoothing and sharpening; every
//     output is compared with an exact reference computed here (error <= 8
//     for smoothing, <= 8 for sharpening), its position and order checked,
//     and the count must be 508 x 508;
//   - the arithmetic library is driven with random operands and each result
//     is compared with a bound derived from its scheme.
// Each mechanism is counted and must occur at least once: IDCT input stall,
// IDCT output clamping at 0 and 255, row-pass saturation block, line-buffer
// row wrap, frame completion, sharpening clamp at 0 and at 255, and an
// approximate result that differs from the exact one in the library.
module tb_approx_image_top;
  import approx_pkg::*;
  localparam int W = 512, H = 512;

  logic               clk = 0, rst_n = 0;
  logic               idct_in_valid = 0, idct_in_ready, idct_out_valid, idct_out_last;
  logic signed [15:0] idct_in_coef = 0;
  pixel_t             idct_out_pix;
  logic               in_valid = 0;
  pixel_t             in_pix = 0;
  logic               sm_ov, sh_ov;
  pixel_t             sm_op, sh_op;
  logic [8:0]         sm_ox, sh_ox;
  logic [8:0]         sm_oy, sh_oy;
  logic [15:0]        lib_a = 0, lib_b = 0;
  logic [16:0]        lib_sum [11];
  logic [31:0]        lib_prod [9];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  approx_image_top dut (
    .clk, .rst_n,
    .idct_in_valid, .idct_in_ready, .idct_in_coef, .idct_out_valid, .idct_out_last, .idct_out_pix,
    .sm_in_valid(in_valid), .sm_in_pix(in_pix), .sm_out_valid(sm_ov), .sm_out_pix(sm_op),
    .sm_out_x(sm_ox), .sm_out_y(sm_oy),
    .sh_in_valid(in_valid), .sh_in_pix(in_pix), .sh_out_valid(sh_ov), .sh_out_pix(sh_op),
    .sh_out_x(sh_ox), .sh_out_y(sh_oy),
    .lib_a, .lib_b, .lib_sum, .lib_prod
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // event counters
  int ev_stall = 0, ev_clamp_lo = 0, ev_clamp_hi = 0, ev_sat = 0, ev_rowwrap = 0;
  int ev_frame = 0, ev_sh_lo = 0, ev_sh_hi = 0, ev_lib_err = 0;

  // ---------------- image streams ----------------
  byte unsigned img [H][W];

  function automatic int gsm(int r, int c);
    if (r == 2 && c == 2) return 192;
    if (r == 0 || r == 4 || c == 0 || c == 4) return 16;
    return 64;
  endfunction
  function automatic int gsh(int r, int c);
    int d [5] = '{2, 1, 0, 1, 2};
    int t [3][3] = '{'{656, 416, 112}, '{416, 256, 64}, '{112, 64, 16}};
    return t[d[r]][d[c]];
  endfunction

  int ex_sm = 2, ey_sm = 2, ex_sh = 2, ey_sh = 2, n_sm = 0, n_sh = 0;
  int max_sm = 0, max_sh = 0;

  always @(posedge clk) begin
    if (rst_n && sm_ov) begin
      int s, e;
      s = 0;
      check(int'(sm_ox) == ex_sm && int'(sm_oy) == ey_sm, "smoothing position");
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) s += gsm(r, c) * int'(img[ey_sm-2+r][ex_sm-2+c]);
      e = int'(sm_op) - (s + 480) / 960;
      if (e < 0) e = -e;
      if (e > max_sm) max_sm = e;
      check(e <= 8, $sformatf("smoothing (%0d,%0d) error %0d ", ex_sm, ey_sm, e));
      n_sm++;
      if (ex_sm == W - 3) begin ex_sm = 2; ey_sm++; ev_rowwrap++; end
      else ex_sm++;
    end
    if (rst_n && sh_ov) begin
      int s, e, o;
      s = 0;
      check(int'(sh_ox) == ex_sh && int'(sh_oy) == ey_sh, "sharpening position");
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) s += gsh(r, c) * int'(img[ey_sh-2+r][ex_sh-2+c]);
      o = 2 * int'(img[ey_sh][ex_sh]) - (s + 2184) / 4368;
      if (o < 0) o = 0;
      if (o > 255) o = 255;
      if (sh_op == 0) ev_sh_lo++;
      if (sh_op == 255) ev_sh_hi++;
      e = int'(sh_op) - o;
      if (e < 0) e = -e;
      if (e > max_sh) max_sh = e;
      check(e <= 8, $sformatf("sharpening (%0d,%0d) error %0d", ex_sh, ey_sh, e));
      n_sh++;
      if (ex_sh == W - 3) begin ex_sh = 2; ey_sh++; end
      else ex_sh++;
    end
  end

  // ---------------- IDCT ----------------
  int  pix [64];
  int  coef [64];
  real idct_se = 0.0;
  int  idct_n = 0, idct_max = 0;

  task automatic idct_block(bit stall, bit measure);
    int k = 0, got = 0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real acc = 0.0;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++)
            acc += pix[m*8+n] * $cos((2*m+1)*u*3.14159265358979/16.0) * $cos((2*n+1)*v*3.14159265358979/16.0);
        acc = acc * 2.0;          // 1/64 normalisation, Q8.7
        if (acc > 32767.0) acc = 32767.0;
        coef[u*8+v] = int'($floor(acc + 0.5));
      end
    if (!measure) begin
      for (int i = 0; i < 64; i++) coef[i] = ((i % 3) == 0) ? 32767 : -32768;
      ev_sat++;
    end
    while (!idct_in_ready) @(posedge clk);
    while (k < 64) begin
      if (stall && ($urandom % 4 == 0)) begin
        idct_in_valid <= 0;
        ev_stall++;
      end else begin
        idct_in_valid <= 1;
        idct_in_coef  <= 16'(coef[k]);
        k++;
      end
      @(posedge clk);
    end
    idct_in_valid <= 0;
    while (got < 64) begin
      @(posedge clk);
      #1;
      if (idct_out_valid) begin
        check(idct_out_last == (got == 63), "IDCT out_last");
        if (idct_out_pix == 0) ev_clamp_lo++;
        if (idct_out_pix == 255) ev_clamp_hi++;
        if (measure) begin
          int e = int'(idct_out_pix) - pix[got];
          if (e < 0) e = -e;
          if (e > idct_max) idct_max = e;
          idct_se += real'(e * e);
          idct_n++;
        end
        got++;
      end
    end
  endtask

  // ---------------- arithmetic library ----------------
  task automatic lib_test();
    for (int i = 0; i < 3000; i++) begin
      longint ea, eb, ex, es, ps;
      lib_a <= 16'($urandom);
      lib_b <= 16'($urandom);
      @(posedge clk);
      #1;
      ea = longint'(lib_a); eb = longint'(lib_b);
      ex = ea + eb;
      // LOA-10: only the 10 LSB positions can be wrong, by less than 2^11
      check((longint'(lib_sum[0]) - ex) < 2048 && (ex - longint'(lib_sum[0])) < 2048, "LOA bound");
      // TruA-9: drops the 9 LSBs of both operands
      check(longint'(lib_sum[1]) == ((ea >> 9) + (eb >> 9)) << 9, "TruA");
      for (int k = 0; k < 11; k++) if (longint'(lib_sum[k]) != ex) ev_lib_err++;
      // carry-cut adders never add more than the exact sum, except CCA
      for (int k = 2; k < 10; k++) check(longint'(lib_sum[k]) <= ex, "carry-cut adder above exact");
      // TruM-7 and the AM family never exceed the exact product
      for (int k = 0; k < 4; k++) check(longint'(lib_prod[k]) <= ea * eb, "unsigned product above exact");
      check(longint'(lib_prod[0]) == ((ea >> 7) << 7) * ((eb >> 7) << 7), "TruM-7");
      // ICM loses 2 per saturated counter: never above, and exact for one row
      check(longint'(lib_prod[8]) <= ea * eb, "ICM above exact");
      if ($countones(lib_b) == 1) check(longint'(lib_prod[8]) == ea * eb, "ICM one row");
      es = longint'(signed'(lib_a)) * longint'(signed'(lib_b));
      ps = longint'(signed'(lib_prod[6]));
      check(ps == ((longint'(signed'(lib_a)) >>> 7) <<< 7) * ((longint'(signed'(lib_b)) >>> 7) <<< 7), "TBM-7");
      ps = longint'(signed'(lib_prod[7]));
      check(es - ps >= 0 && es - ps < 8 * 256, "BBM-8 bound");
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (x >= 100 && x < 160 && y >= 100 && y < 160)      img[y][x] = 0;
        else if (x >= 300 && x < 380 && y >= 50 && y < 120)  img[y][x] = 255;
        else if (y < 256) img[y][x] = 8'((x + 2 * y) / 3 + int'($urandom % 16));
        else              img[y][x] = 8'($urandom);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      begin : pixels
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            in_valid <= 1;
            in_pix   <= img[y][x];
            @(posedge clk);
          end
        in_valid <= 0;
        repeat (5) @(posedge clk);
        ev_frame++;
      end
      begin : idct
        for (int i = 0; i < 64; i++) pix[i] = int'($urandom % 256);
        idct_block(1'b0, 1'b1);
        for (int i = 0; i < 64; i++) pix[i] = ((i / 8) * 30 + (i % 8) * 4) % 256;
        idct_block(1'b1, 1'b1);
        idct_block(1'b0, 1'b0);
      end
      begin : lib
        lib_test();
      end
    join
    begin
      real psnr;
      psnr = 10.0 * $log10(255.0 * 255.0 / (idct_se / real'(idct_n)));
      $display("IDCT TBM-7: PSNR %.2f dB, max error %0d", psnr, idct_max);
      check(psnr >= 28.0 && idct_max <= 80, "IDCT quality");
    end
    $display("smoothing outputs %0d (max error %0d), sharpening outputs %0d (max error %0d)", n_sm, max_sm, n_sh, max_sh);
    check(n_sm == (W-4)*(H-4) && n_sh == (W-4)*(H-4), "output counts");
    $display("events: idct_stall=%0d idct_clamp0=%0d idct_clamp255=%0d idct_saturation=%0d row_wrap=%0d frames=%0d sharpen_clamp0=%0d sharpen_clamp255=%0d lib_approx=%0d",
             ev_stall, ev_clamp_lo, ev_clamp_hi, ev_sat, ev_rowwrap, ev_frame, ev_sh_lo, ev_sh_hi, ev_lib_err);
    check(ev_stall > 0, "no IDCT stall");
    check(ev_clamp_lo > 0, "no IDCT clamp at 0");
    check(ev_clamp_hi > 0, "no IDCT clamp at 255");
    check(ev_sat > 0, "no IDCT saturation");
    check(ev_rowwrap > 0, "no row wrap");
    check(ev_frame > 0, "no complete frame");
    check(ev_sh_lo > 0, "no sharpening clamp at 0");
    check(ev_sh_hi > 0, "no sharpening clamp at 255");
    check(ev_lib_err > 0, "library never approximated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
