// 3x3 window generator for a raster-order pixel stream.
//
// Pixels of a frame arrive one per in_valid in raster order, LINE pixels per
// row. Two line buffers hold the previous two rows. When the pixel at
// column x of row y arrives, the column {row y-2, row y-1, row y} at x is
// shifted into a 3x3 register array, so after the shift the array holds
// rows y-2..y and columns x-2..x. From the third pixel of the third row on
// (x >= 2 and y >= 2) the array is a complete window centred on pixel
// (y-1, x-1) and out_valid is raised with it on the next clock.
//
// The controller feeds this block an image padded by one replicated pixel
// on every side (LINE = image width + 2), so exactly one window comes out
// for every pixel of the original image, in raster order.
//
// Interface: start (one clock, while no pixel is fed) clears the row and
// column counters for a new frame. out_win uses dbmf_pkg::window_t ordering
// (0 top-left, 4 centre, 8 bottom-right). Latency: out_valid follows the
// in_valid of the completing pixel by one clock. in_valid may have gaps.
// Line buffers are plain arrays (distributed or block RAM on an FPGA).
//
// The published algorithm asks only that a 3x3 window be selected around each pixel in
// turn; the line-buffer structure is this design's own.
module window_gen
  import dbmf_pkg::*;
#(
  parameter int unsigned LINE = 127   // pixels per (padded) row
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  logic    in_valid,
  input  pixel_t  in_pix,
  output logic    out_valid,
  output window_t out_win
);

  localparam int unsigned XW = $clog2(LINE);

  pixel_t lb_prev [LINE];   // row y-1
  pixel_t lb_prev2[LINE];   // row y-2

  logic [XW-1:0] x;
  logic [1:0]    y;         // saturates at 2
  pixel_t        w [3][3];  // w[row][col], row 0 top, col 0 left

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_prev2[x] <= lb_prev[x];
      lb_prev[x]  <= in_pix;
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= w[r][1];
        w[r][1] <= w[r][2];
      end
      w[0][2] <= lb_prev2[x];
      w[1][2] <= lb_prev[x];
      w[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || start) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (y == 2'd2) && (x >= XW'(2));
      if (in_valid) begin
        if (x == XW'(LINE - 1)) begin
          x <= '0;
          if (y != 2'd2) y <= y + 2'd1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        out_win[r*3 + c] = w[r][c];
  end

endmodule
