// tb_cowb_arbiter: requests are granted first come, first served. A
// reference queue in the testbench records arrival order (same-clock
// arrivals lowest index first); each requester holds its request for a
// random number of clocks after being granted, then releases.
module tb_cowb_arbiter;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt;
  logic gnt_valid;
  always #5 clk = ~clk;

  cowb_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt, .gnt_valid);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order[$];
  int hold[N];
  int served = 0;

  initial begin
    logic [N-1:0] nreq;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // the grant must match the head of the reference queue
      if (order.size() == 0) chk(gnt == '0 && !gnt_valid, "idle");
      else chk(gnt == N'(1) << order[0] && gnt_valid, $sformatf("grant at %0d", t));
      nreq = req;
      // the granted requester counts down and releases
      if (order.size() != 0) begin
        if (hold[order[0]] == 0) begin
          nreq[order[0]] = 1'b0;
          order.pop_front();
          served++;
        end else hold[order[0]]--;
      end
      // new requests from idle requesters (one clock after a release at earliest)
      for (int r = 0; r < N; r++)
        if (!req[r] && !nreq[r] && ($urandom % 6) == 0) begin
          nreq[r] = 1'b1;
          hold[r] = $urandom % 5;
          order.push_back(r);
        end
      req = nreq;
    end
    chk(served > 100, "requests served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
