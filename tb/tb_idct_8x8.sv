// tb_idct_8x8: self-checking testbench for the 8x8 inverse DCT.
//
// Random 8x8 pixel blocks (uniform, and smooth gradients) are transformed by
// a floating-point forward DCT (1/64 normalisation) written here, quantised
// to the Q8.7 input format and streamed into three instances: one with
// accurate multipliers, one with the default TBM-7 multipliers, and the
// BBM-8 alternative (broken Booth, break line at column 8).
//   - accurate instance: every reconstructed pixel must be within 1 of the
//     original pixel;
//   - TBM-7 instance: the PSNR over all blocks must reach 28 dB (published
//     image results for TBM-7 are about 30 dB), and no pixel may be off by
//     more than 80; the BBM-8 instance must reach 28 dB as well (with this
//     number format its dropped columns lie below the kept product bits, so
//     it comes out error-free);
//   - timing: 64 outputs per block, out_last on the 64th, and the first
//     output exactly 66 cycles after the last coefficient is accepted;
//   - input stalls (in_valid low for random cycles) must not change results;
//   - one block of extreme coefficients drives the intermediate into
//     saturation and the output into both clamp limits.
module tb_idct_8x8;
  import approx_pkg::*;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0;
  logic signed [15:0] in_coef = 0;
  logic               rdy_a, rdy_t, ov_a, ov_t, ol_a, ol_t, rdy_b, ov_b, ol_b;
  pixel_t             px_a, px_t, px_b;
  real                sq_err_b = 0.0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  idct_8x8 #(.MKIND(MK_ACC)) u_acc (.clk, .rst_n, .in_valid, .in_ready(rdy_a), .in_coef,
                                    .out_valid(ov_a), .out_last(ol_a), .out_pix(px_a));
  idct_8x8                   u_tbm (.clk, .rst_n, .in_valid, .in_ready(rdy_t), .in_coef,
                                    .out_valid(ov_t), .out_last(ol_t), .out_pix(px_t));
  idct_8x8 #(.MKIND(MK_BBM), .VBL(8)) u_bbm (.clk, .rst_n, .in_valid, .in_ready(rdy_b), .in_coef,
                                   .out_valid(ov_b), .out_last(ol_b), .out_pix(px_b));

  int     pix [64];
  int     coef [64];
  int     nout, nlast, cyc, t_last_in, t_first_out;
  real    sq_err;
  longint npix;
  int     max_err;
  int     sat_blocks = 0, clamp_lo = 0, clamp_hi = 0, stalls = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // forward DCT with 1/64 normalisation, quantised to Q8.7
  task automatic make_coefs();
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real acc = 0.0;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++)
            acc += pix[m*8+n] * $cos((2*m+1)*u*3.14159265358979/16.0) * $cos((2*n+1)*v*3.14159265358979/16.0);
        acc = acc / 64.0 * 128.0;  // to Q8.7
        if (acc > 32767.0) acc = 32767.0;
        coef[u*8+v] = int'($floor(acc + 0.5));
      end
  endtask

  // stream one block and collect 64 outputs from both instances
  task automatic run_block(bit stall, bit expect_exact);
    int k = 0, got = 0;
    while (!rdy_a) @(posedge clk);
    while (k < 64) begin
      if (stall && ($urandom % 4 == 0)) begin
        in_valid <= 0;
        stalls++;
      end else begin
        in_valid <= 1;
        in_coef  <= 16'(coef[k]);
        k++;
      end
      @(posedge clk);
      check(rdy_a == rdy_t, "ready mismatch");
    end
    in_valid <= 0;
    t_last_in = cyc;
    while (got < 64) begin
      @(posedge clk);
      #1;
      if (ov_a) begin
        int e;
        if (got == 0) begin
          t_first_out = cyc;
          check(t_first_out - t_last_in == 66, $sformatf("latency %0d", t_first_out - t_last_in));
        end
        check(ov_t == 1'b1 && ov_b == 1'b1, "approximate instances not in step");
        check(ol_a == (got == 63), "out_last position");
        if (expect_exact) begin
          e = int'(px_a) - pix[got];
          check(e <= 1 && e >= -1, $sformatf("accurate pixel %0d got %0d exp %0d", got, px_a, pix[got]));
          e = int'(px_t) - pix[got];
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          sq_err += real'(e * e);
          e = int'(px_b) - pix[got];
          sq_err_b += real'(e * e);
          npix++;
        end else begin
          if (px_a == 0) clamp_lo++;
          if (px_a == 255) clamp_hi++;
        end
        got++;
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real psnr, psnr_b;
    cyc = 0; sq_err = 0; npix = 0; max_err = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blkn = 0; blkn < 40; blkn++) begin
      for (int i = 0; i < 64; i++) begin
        if (blkn % 2 == 0) pix[i] = int'($urandom % 256);
        else               pix[i] = (blkn * 5 + (i / 8) * 9 + (i % 8) * 13) % 256;
      end
      make_coefs();
      run_block(blkn % 3 == 1, 1'b1);
    end
    // extreme coefficients: alternating full-scale values saturate the row pass
    for (int i = 0; i < 64; i++) coef[i] = ((i % 3) == 0) ? 32767 : -32768;
    run_block(1'b0, 1'b0);
    sat_blocks++;
    psnr = 10.0 * $log10(255.0 * 255.0 / (sq_err / real'(npix)));
    psnr_b = 10.0 * $log10(255.0 * 255.0 / (sq_err_b / real'(npix)));
    $display("TBM-7 IDCT: PSNR %.2f dB, max pixel error %0d; BBM-8 IDCT: PSNR %.2f dB", psnr, max_err, psnr_b);
    $display("events: stalled input cycles %0d, saturating blocks %0d, clamped low %0d, clamped high %0d",
             stalls, sat_blocks, clamp_lo, clamp_hi);
    check(psnr >= 28.0, "TBM-7 PSNR below 28 dB");
    check(max_err <= 80, "TBM-7 pixel error above 80");
    check(psnr_b >= 28.0, "BBM-8 PSNR below 28 dB");
    check(stalls > 0 && clamp_lo > 0 && clamp_hi > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
