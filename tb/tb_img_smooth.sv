// tb_img_smooth: self-checking testbench for the streaming 5x5 smoothing.
//
// A reduced 20 x 12 frame is used so that borders, line wrap and frame wrap
// all occur many times. Two frames are streamed back to back with random
// idle cycles into five instances: accurate multipliers, the default
// TAM1-16, TruM-7, and the low-power pair TAM2-16 and TruM-5. Reference:
// Y = round(sum(G * I) / 960) computed here from the kernel; the accurate
// instance must match exactly, TAM1-16 and TAM2-16 must stay within 8 grey
// levels and reach 33 dB, and the truncated ones are only reported (they are
// known to wreck this filter). Every output must carry the expected position,
// in raster order, exactly 2 cycles after the pixel that completes its
// window, and each frame must produce (W-4) x (H-4) outputs.
module tb_img_smooth;
  import approx_pkg::*;
  localparam int W = 20, H = 12;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0;
  pixel_t in_pix = 0;
  logic   ov [5];
  pixel_t op [5];
  logic [4:0] ox [5];
  logic [3:0] oy [5];
  int checks = 0, failures = 0;
  int img [2][H][W];
  int nclamp_lo = 0, nclamp_hi = 0, nidle = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  img_smooth #(.IMG_W(W), .IMG_H(H), .MKIND(MK_ACC))  u_acc  (.clk, .rst_n, .in_valid, .in_pix,
    .out_valid(ov[0]), .out_pix(op[0]), .out_x(ox[0]), .out_y(oy[0]));
  img_smooth #(.IMG_W(W), .IMG_H(H))                  u_tam1 (.clk, .rst_n, .in_valid, .in_pix,
    .out_valid(ov[1]), .out_pix(op[1]), .out_x(ox[1]), .out_y(oy[1]));
  img_smooth #(.IMG_W(W), .IMG_H(H), .MKIND(MK_TRUM)) u_trum (.clk, .rst_n, .in_valid, .in_pix,
    .out_valid(ov[2]), .out_pix(op[2]), .out_x(ox[2]), .out_y(oy[2]));
  img_smooth #(.IMG_W(W), .IMG_H(H), .SCHEME(2))  u_tam2 (.clk, .rst_n, .in_valid, .in_pix,
    .out_valid(ov[3]), .out_pix(op[3]), .out_x(ox[3]), .out_y(oy[3]));
  img_smooth #(.IMG_W(W), .IMG_H(H), .MKIND(MK_TRUM), .T(5)) u_trum5 (.clk, .rst_n, .in_valid, .in_pix,
    .out_valid(ov[4]), .out_pix(op[4]), .out_x(ox[4]), .out_y(oy[4]));

  function automatic int gw(int r, int c);
    if (r == 2 && c == 2) return 192;
    if (r == 0 || r == 4 || c == 0 || c == 4) return 16;
    return 64;
  endfunction
  function automatic int ref_out(int cx, int cy, int fr);
    int s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) s += gw(r, c) * img[fr][cy-2+r][cx-2+c];
    return (s + 480) / 960;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // expected outputs, in order: position, frame, cycle the window completes
  int qx [$], qy [$], qf [$], qc [$];
  int nout [2] = '{0, 0};
  real se_tam1 = 0.0, se_trum = 0.0, se_tam2 = 0.0, se_trum5 = 0.0;
  int maxe = 0, maxe2 = 0;

  always @(posedge clk) begin
    if (rst_n && ov[0]) begin
      int ex, ey, ef, ec, e;
      check(qx.size() > 0, "unexpected output");
      if (qx.size() > 0) begin
        ex = qx.pop_front(); ey = qy.pop_front(); ef = qf.pop_front(); ec = qc.pop_front();
        check(int'(ox[0]) == ex && int'(oy[0]) == ey, $sformatf("position (%0d,%0d) exp (%0d,%0d)", ox[0], oy[0], ex, ey));
        check(cyc - ec == 2, $sformatf("latency %0d", cyc - ec));
        e = ref_out(ex, ey, ef);
        check(int'(op[0]) == e, $sformatf("accurate (%0d,%0d) got %0d exp %0d", ex, ey, op[0], e));
        check(ov[1] && ov[2] && ox[1] == ox[0] && oy[2] == oy[0], "instances out of step");
        e = int'(op[1]) - int'(op[0]);
        if (e < 0) e = -e;
        if (e > maxe) maxe = e;
        se_tam1 += real'(e * e);
        e = int'(op[2]) - int'(op[0]);
        se_trum += real'(e * e);
        check(ov[3] && ov[4] && ox[3] == ox[0] && oy[4] == oy[0], "low-power instances out of step");
        e = int'(op[3]) - int'(op[0]);
        if (e < 0) e = -e;
        if (e > maxe2) maxe2 = e;
        se_tam2 += real'(e * e);
        e = int'(op[4]) - int'(op[0]);
        se_trum5 += real'(e * e);
        nout[ef]++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p1, p2, p3, p4;
    int n;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (x >= 3 && x < 9 && y >= 3 && y < 9)        img[f][y][x] = (f == 0) ? 0 : 255;
          else if (x >= 12 && x < 18 && y >= 2 && y < 10) img[f][y][x] = (f == 0) ? 255 : 0;
          else                                            img[f][y][x] = int'($urandom % 256);
        end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom % 5 == 0) begin
            in_valid <= 0;
            nidle++;
            @(posedge clk);
          end
          in_valid <= 1;
          in_pix   <= pixel_t'(img[f][y][x]);
          if (x >= 4 && y >= 4) begin
            qx.push_back(x - 2); qy.push_back(y - 2); qf.push_back(f); qc.push_back(cyc + 1);
          end
          @(posedge clk);
        end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    n = nout[0] + nout[1];
    p1 = 10.0 * $log10(255.0 * 255.0 / (se_tam1 / real'(n) + 1.0e-9));
    p2 = 10.0 * $log10(255.0 * 255.0 / (se_trum / real'(n) + 1.0e-9));
    p3 = 10.0 * $log10(255.0 * 255.0 / (se_tam2 / real'(n) + 1.0e-9));
    p4 = 10.0 * $log10(255.0 * 255.0 / (se_trum5 / real'(n) + 1.0e-9));
    $display("low power: TAM2-16 PSNR %.2f dB (max error %0d); TruM-5 PSNR %.2f dB", p3, maxe2, p4);
    $display("outputs per frame %0d %0d; TAM1-16 PSNR %.2f dB (max error %0d); TruM-7 PSNR %.2f dB", nout[0], nout[1], p1, maxe, p2);
    $display("events: idle input cycles %0d, frames %0d, clamped low %0d, clamped high %0d", nidle, 2, nclamp_lo, nclamp_hi);
    check(nout[0] == (W-4)*(H-4) && nout[1] == (W-4)*(H-4), "output count per frame");
    check(qx.size() == 0, "missing outputs");
    check(maxe <= 8, "TAM1-16 error above 8");
    check(p1 >= 33.0, "TAM1-16 PSNR below 33 dB");
    check(maxe2 <= 8, "TAM2-16 error above 8");
    check(p3 >= 33.0, "TAM2-16 PSNR below 33 dB");
    check(nidle > 0, "no idle cycles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
