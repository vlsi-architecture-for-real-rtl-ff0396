// bus_arbiter: grants the shared 64-bit external bus to one of N requesters
// per cycle.
//
// Requests are served round-robin. Requesters marked in HI_PRIO (in the
// engine: the forward-warping write port and the reverse-warping texture
// read ports, whose accesses are irregular and most frequent) win over the
// others; among each group the last granted requester has lowest priority
// next time. Two-level round-robin is this design's reading of "round-robin
// with higher priority for" those ports.
//
// Timing: gnt is combinational from req and is one-hot or zero; every grant
// is one bus transfer in that cycle. The round-robin pointer moves on a grant.
module bus_arbiter #(
  parameter int               N       = 5,
  parameter logic [N-1:0]     HI_PRIO = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  output logic [N-1:0]  gnt
);
  logic [$clog2(N)-1:0] last_q;

  function automatic logic [N-1:0] rr_pick(input logic [N-1:0] r,
                                           input logic [$clog2(N)-1:0] last);
    logic [N-1:0] g;
    int           idx;
    g = '0;
    for (int k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (r[idx] && g == '0) g[idx] = 1'b1;
    end
    return g;
  endfunction

  always_comb begin
    if ((req & HI_PRIO) != '0) gnt = rr_pick(req & HI_PRIO, last_q);
    else                       gnt = rr_pick(req, last_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= $clog2(N)'(N - 1);
    else begin
      for (int i = 0; i < N; i++)
        if (gnt[i]) last_q <= $clog2(N)'(i);
    end
  end

  // at most one grant, and only to a requester
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("bus_arbiter: more than one grant");
  a_req:    assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0)
    else $error("bus_arbiter: grant without request");
endmodule
