// Decision based median filter for one 3x3 window.
//
// The centre pixel P of the window is tested and replaced as follows:
//   1. 0 < P < 255                       -> P is noise free and kept.
//   2. P is 0 or 255 and all nine pixels
//      equal P                           -> uniform region, P is kept.
//   3. every pixel is 0 or 255           -> mean of the nine pixels
//                                           (sum / 9, truncated).
//   4. more than half of the nine pixels
//      are 0 or 255 (at least five)      -> the nearest information pixel,
//                                           taken as the first one in raster
//                                           order of the window.
//   5. otherwise                         -> median of the information pixels
//                                           (0s and 255s removed).
// The median of the n remaining pixels is the element at position n/2
// (0-based, ascending), i.e. the upper middle one when n is even. It is
// found without compacting the list: the whole window goes through a
// sorting network, all 0s land at the bottom and all 255s at the top, so
// the information pixels occupy sorted[z .. z+n-1], z being the count of
// zeros, and the median is sorted[z + n/2].
//
// Interface: window is a dbmf_pkg::window_t (index 4 = centre). The decision
// logic is combinational and its result is registered: med/out_valid/fcase
// appear on the clock edge after in_valid, so one window per clock is
// filtered with one clock of latency. rst (synchronous, active high) clears
// med to 0 and out_valid to 0.
//
// The five decisions, the one-clock latency and the reset value of 0 follow
// the published design. The raster-order reading of "nearest", the upper median for
// even counts and the truncating mean are this design's choices, picked to
// agree with its worked examples.
module dbmf_filter
  import dbmf_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  window_t    window,
  output logic       out_valid,
  output pixel_t     med,
  output filt_case_e fcase
);

  window_t sorted;
  sort9 u_sort (.in(window), .sorted(sorted));

  pixel_t     centre;
  logic [3:0] n_info;     // information pixels in the window
  logic [3:0] n_zero;     // pepper pixels in the window
  logic       all_same;
  logic [11:0] sum;
  pixel_t     first_info;
  pixel_t     mean_pix;
  pixel_t     median_pix;
  pixel_t     result;
  filt_case_e dec;

  always_comb begin
    centre     = window[CENTRE];
    n_info     = '0;
    n_zero     = '0;
    all_same   = 1'b1;
    sum        = '0;
    first_info = PIX_MIN;
    for (int i = WIN_N - 1; i >= 0; i--) begin
      if (!is_noise(window[i])) begin
        n_info     = n_info + 4'd1;
        first_info = window[i];   // last write wins: lowest index
      end
      if (window[i] == PIX_MIN) n_zero = n_zero + 4'd1;
      if (window[i] != centre)  all_same = 1'b0;
      sum = sum + 12'(window[i]);
    end
    mean_pix   = pixel_t'(sum / 12'd9);
    median_pix = sorted[n_zero + (n_info >> 1)];

    if (!is_noise(centre)) begin
      dec = FC_CLEAN;    result = centre;
    end else if (all_same) begin
      dec = FC_UNIFORM;  result = centre;
    end else if (n_info == 4'd0) begin
      dec = FC_MEAN;     result = mean_pix;
    end else if (n_info <= 4'd4) begin
      dec = FC_NEAREST;  result = first_info;
    end else begin
      dec = FC_MEDIAN;   result = median_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      med       <= PIX_MIN;
      out_valid <= 1'b0;
      fcase     <= FC_CLEAN;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        med   <= result;
        fcase <= dec;
      end
    end
  end

endmodule
