// urdhwa_pp: vertical-and-crosswise partial product generator of the 8x8 Urdhwa multiplier.
//
// For each product column k (0..14) it forms every AND term a[i] & b[k-i] whose indices add up
// to k. That is the "vertical and crosswise" step of Urdhwa Tiryakbhyam multiplication. Column k
// holds min(k, 14-k) + 1 terms, so 64 in all, and they are packed from index 0 upward:
//   pp[k][q] = a[i] & b[k-i]   with i = q + max(0, k-7)
// Entries beyond a column's height are 0. Forming the terms with AND gates follows the
// published design; the packing order is this design's own. Purely combinational.
module urdhwa_pp #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] pp [2*WIDTH-1]
);
  always_comb begin
    for (int k = 0; k < 2*WIDTH-1; k++) begin
      pp[k] = '0;
      for (int q = 0; q < WIDTH; q++) begin
        int i;
        i = q + ((k > WIDTH-1) ? (k - (WIDTH-1)) : 0);
        if (i < WIDTH && i <= k && (k - i) < WIDTH)
          pp[k][q] = a[i] & b[k-i];
      end
    end
  end
endmodule
