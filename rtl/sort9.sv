// Nine-input sorting network (combinational).
//
// Sorts the nine pixels of a window into ascending order with an odd-even
// transposition network: nine stages of compare-exchange cells, even stages
// comparing pairs (0,1)(2,3)(4,5)(6,7), odd stages pairs (1,2)(3,4)(5,6)(7,8).
// Nine stages suffice for nine inputs. There is no clock; the decision based
// median filter registers the result it selects from the sorted vector.
// The structure is this design's choice; the filter only needs the window
// "sorted" to take a median.
module sort9
  import dbmf_pkg::*;
(
  input  window_t in,
  output window_t sorted   // sorted[0] smallest, sorted[8] largest
);

  always_comb begin
    window_t v;
    pixel_t  lo, hi;
    v = in;
    for (int s = 0; s < 9; s++) begin
      for (int i = s % 2; i + 1 < 9; i += 2) begin
        lo     = (v[i] < v[i+1]) ? v[i] : v[i+1];
        hi     = (v[i] < v[i+1]) ? v[i+1] : v[i];
        v[i]   = lo;
        v[i+1] = hi;
      end
    end
    sorted = v;
  end

endmodule
