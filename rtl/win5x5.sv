// win5x5: 5x5 sliding-window generator for a raster pixel stream.
//
// Pixels of an IMG_W x IMG_H frame arrive one per in_valid cycle in raster
// order (left to right, top to bottom). Four line buffers hold the previous
// four image rows; each accepted pixel together with the four buffered pixels
// of the same column forms a new window column that is shifted into a 5x5
// register window. A window is flagged valid only when it lies entirely
// inside the image, so a frame yields (IMG_W-4) x (IMG_H-4) windows, centred
// on x = 2..IMG_W-3, y = 2..IMG_H-3; border pixels get no window (a choice of
// this design). The window is registered: win_valid rises the cycle after
// the pixel that completes it. The counters wrap at the end of a frame, so
// frames may follow back to back.
//   win[r][c]   : row r = 0 is the oldest image row, column c = 0 the leftmost
//   win_x/win_y : image coordinates of the window centre
module win5x5
  import approx_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  pixel_t                   in_pix,
  output logic                     win_valid,
  output pixel_t                   win [5][5],
  output logic [$clog2(IMG_W)-1:0] win_x,
  output logic [$clog2(IMG_H)-1:0] win_y
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  pixel_t         lb0 [IMG_W];   // row y-1
  pixel_t         lb1 [IMG_W];   // row y-2
  pixel_t         lb2 [IMG_W];   // row y-3
  pixel_t         lb3 [IMG_W];   // row y-4
  logic [XW-1:0]  x;
  logic [YW-1:0]  y;
  pixel_t         col [5];

  // new window column, oldest row first
  always_comb begin
    col[0] = lb3[x];
    col[1] = lb2[x];
    col[2] = lb1[x];
    col[3] = lb0[x];
    col[4] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb0[x] <= in_pix;
      lb1[x] <= lb0[x];
      lb2[x] <= lb1[x];
      lb3[x] <= lb2[x];
      for (int r = 0; r < 5; r++) begin
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
        win[r][4] <= col[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
      win_x     <= '0;
      win_y     <= '0;
    end else begin
      win_valid <= in_valid && (x >= XW'(4)) && (y >= YW'(4));
      if (in_valid) begin
        win_x <= x - XW'(2);
        win_y <= y - YW'(2);
        if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= (y == YW'(IMG_H - 1)) ? '0 : y + YW'(1);
        end else begin
          x <= x + XW'(1);
        end
      end
    end
  end
endmodule
