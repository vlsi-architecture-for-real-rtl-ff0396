// median9: median of nine 8-bit values by a fixed comparator network of 19
// compare-exchange cells (the comparator tree of the depth median filter).
// The network itself is this design's choice. Purely combinational.
module median9 (
  input  logic [7:0] x [9],
  output logic [7:0] med
);
  localparam int NCX = 19;
  localparam int A [NCX] = '{1,4,7, 0,3,6, 1,4,7, 0,5,4, 3,1,2, 4,4,6, 4};
  localparam int B [NCX] = '{2,5,8, 1,4,7, 2,5,8, 3,8,7, 6,4,5, 7,2,4, 2};
  logic [7:0] p [9];
  logic [7:0] t;
  always_comb begin
    p = x;
    t = '0;
    for (int s = 0; s < NCX; s++) begin
      if (p[A[s]] > p[B[s]]) begin
        t       = p[A[s]];
        p[A[s]] = p[B[s]];
        p[B[s]] = t;
      end
    end
    med = p[4];
  end
endmodule
