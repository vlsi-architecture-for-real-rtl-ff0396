// z_scaling: scales the nearest and farthest depth values Z_min and Z_max by
// a power of two so that their integer parts fit in 8 bits, reducing the
// dynamic range the rest of the preprocessing arithmetic has to carry:
//
//   ScaleFactor = min{ 1, 2^-(ceil(log2 max{|Z_min|, |Z_max|}) - 8) }
//
// Scaling Z does not change the warping relation, because the homography is
// only defined up to a scale. The formula is the engine's; doing it directly
// on IEEE 754 single-precision values is this design's choice: for M = 1.f x 2^e,
// ceil(log2 M) is e when f = 0 and e + 1 otherwise, and multiplying by the
// scale factor subtracts the shift k = max(0, ceil(log2 M) - 8) from both
// exponents. A zero input does not raise the shift; a result that would fall
// below the normal range is flushed to zero. NaN and infinity inputs are not
// handled (depth ranges are finite).
//
// Purely combinational. Outputs: the shift k (ScaleFactor = 2^-k) and the
// two scaled values.
module z_scaling (
  input  logic [31:0] z_min,
  input  logic [31:0] z_max,
  output logic [7:0]  shift,
  output logic [31:0] z_min_s,
  output logic [31:0] z_max_s
);
  function automatic int ceil_log2(input logic [31:0] z);
    // exponent of the smallest power of two >= |z|; very small for zero
    if (z[30:23] == 8'd0) return -1000;
    return int'(z[30:23]) - 127 + ((z[22:0] != '0) ? 1 : 0);
  endfunction

  function automatic logic [31:0] scale(input logic [31:0] z, input logic [7:0] k);
    if (int'(z[30:23]) <= int'(k)) return {z[31], 31'd0};
    return {z[31], z[30:23] - k, z[22:0]};
  endfunction

  int c;
  always_comb begin
    c       = (ceil_log2(z_min) > ceil_log2(z_max)) ? ceil_log2(z_min) : ceil_log2(z_max);
    shift   = (c > 8) ? 8'(c - 8) : 8'd0;
    z_min_s = scale(z_min, shift);
    z_max_s = scale(z_max, shift);
  end
endmodule
