// fp_divider: IEEE 754 single-precision divider, one quotient bit per clock,
// 26 cycles from start to result. The preprocessing of the engine uses such a
// divider, with 9-bit sign/exponent and 23-bit fraction operands, where a
// sequential divider of 26 cycles replaces a much larger pipelined fixed-point one.
//
// How it works: the start cycle loads the two 24-bit significands (hidden 1
// restored) and the result exponent ea - eb + 127. If the dividend's significand is the
// smaller, it is doubled and the exponent lowered by one, so that the
// quotient lies in [1, 2). Each of the next 26 cycles is one restoring
// division step producing one quotient bit: 1 integer bit, 23 fraction bits,
// a guard bit and a round bit. The final remainder is the sticky bit. The result is
// rounded to nearest, ties to even.
//
// Special operands follow IEEE 754 (NaN, infinities, zeros, x/0 = inf,
// 0/0 = inf/inf = NaN, one quiet NaN pattern 7FC00000). Subnormal inputs are
// treated as zero and results below the normal range are flushed to zero;
// overflow gives infinity. Flushing subnormals is this design's choice, the
// operands the preprocessing divides are far from that range.
//
// Interface: pulse start with a (dividend) and b (divisor); busy is high for
// the 26 cycles; done pulses in the cycle the result q becomes valid, 26
// cycles after start. q holds until the next start.
module fp_divider #(
  parameter int STEPS = 26          // 24 significand bits + guard + round
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] q
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic        sign_q, special_q;
  logic [31:0] special_val_q;
  logic signed [10:0] exp_q;
  logic [24:0] rem_q;               // partial remainder, < 2 * divisor
  logic [23:0] div_q;
  logic [STEPS-1:0] quo_q;
  logic [$clog2(STEPS+1)-1:0] cnt_q;

  // operand decode
  logic        sa, sb, za, zb, ia, ib, na, nb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  always_comb begin
    sa = a[31];  ea = a[30:23];  ma = {1'b1, a[22:0]};
    sb = b[31];  eb = b[30:23];  mb = {1'b1, b[22:0]};
    za = (ea == 8'd0);           zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (a[22:0] == '0);
    ib = (eb == 8'hff) && (b[22:0] == '0);
    na = (ea == 8'hff) && (a[22:0] != '0);
    nb = (eb == 8'hff) && (b[22:0] != '0);
  end

  // one restoring step
  logic [24:0] diff;
  logic        ge;
  always_comb begin
    ge   = rem_q >= {1'b0, div_q};
    diff = ge ? rem_q - {1'b0, div_q} : rem_q;
  end

  // rounding of the finished quotient
  logic [23:0] sig;
  logic        guard, sticky, rnd_up;
  logic [24:0] sig_r;
  logic signed [10:0] exp_r;
  always_comb begin
    sig    = quo_q[STEPS-1:2];
    guard  = quo_q[1];
    sticky = quo_q[0] || (rem_q != '0);
    rnd_up = guard && (sticky || sig[0]);
    sig_r  = {1'b0, sig} + 25'(rnd_up);
    exp_r  = exp_q + 11'(sig_r[24]);
    if (special_q)            q = special_val_q;
    else if (exp_r >= 11'sd255) q = {sign_q, 8'hff, 23'd0};
    else if (exp_r <= 11'sd0)   q = {sign_q, 31'd0};
    else if (sig_r[24])       q = {sign_q, exp_r[7:0], sig_r[23:1]};
    else                      q = {sign_q, exp_r[7:0], sig_r[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      sign_q        <= 1'b0;
      special_q     <= 1'b0;
      special_val_q <= '0;
      exp_q         <= '0;
      rem_q         <= '0;
      div_q         <= '0;
      quo_q         <= '0;
      cnt_q         <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        cnt_q     <= '0;
        quo_q     <= '0;
        sign_q    <= sa ^ sb;
        div_q     <= mb;
        special_q <= 1'b1;
        if (na || nb || (ia && ib) || (za && zb)) special_val_q <= QNAN;
        else if (ia || zb)                        special_val_q <= {sa ^ sb, 8'hff, 23'd0};
        else if (za || ib)                        special_val_q <= {sa ^ sb, 31'd0};
        else                                      special_q     <= 1'b0;
        if (ma < mb) begin
          rem_q <= {ma, 1'b0};
          exp_q <= 11'(ea) - 11'(eb) + 11'sd126;
        end else begin
          rem_q <= {1'b0, ma};
          exp_q <= 11'(ea) - 11'(eb) + 11'sd127;
        end
      end else if (busy) begin
        quo_q <= {quo_q[STEPS-2:0], ge};
        rem_q <= {diff[23:0], 1'b0};
        cnt_q <= cnt_q + 1'b1;
        if (int'(cnt_q) == STEPS - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          rem_q <= diff;            // final remainder, only its zero-ness is used
        end
      end
    end
  end
endmodule
