// tb_bus_arbiter: self-checking test of bus_arbiter (5 requesters, 0 and 3
// high priority). Random request patterns; each cycle the grant is compared
// with a reference round-robin model kept here: one grant to a requester,
// high-priority requesters first, rotating after the last granted one.
// Also checks fairness: under constant requests every low-priority
// requester is served once no high-priority request is pending.
module tb_bus_arbiter;
  localparam int N = 5;
  localparam logic [N-1:0] HI = 5'b01001;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;

  bus_arbiter #(.N(N), .HI_PRIO(HI)) dut (.clk, .rst_n, .req, .gnt);

  int checks = 0, failures = 0, last = N - 1;
  int served [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N-1:0] model(input logic [N-1:0] r);
    logic [N-1:0] pool;
    pool = ((r & HI) != 0) ? (r & HI) : r;
    for (int k = 1; k <= N; k++)
      if (pool[(last + k) % N]) return N'(1) << ((last + k) % N);
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i < 400) req = N'($urandom);
      else         req = ~HI;
      #1;
      check(gnt == model(req), $sformatf("cycle %0d req %b gnt %b exp %b", i, req, gnt, model(req)));
      for (int j = 0; j < N; j++) if (gnt[j]) begin last = j; if (i >= 400) served[j]++; end
    end
    for (int j = 0; j < N; j++)
      if (!HI[j]) check(served[j] >= 60, $sformatf("requester %0d starved", j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
