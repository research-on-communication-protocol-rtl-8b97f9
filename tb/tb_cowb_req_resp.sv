// tb_cowb_req_resp: with arbitration the request wire follows want one clock
// later, granted needs both the request and the response, and the request
// falls one clock after want; without arbitration want is granted at once.
module tb_cowb_req_resp;

  logic clk = 0, rst_n = 0;
  logic want = 0, bus_gnt = 0;
  logic granted_a, bus_req_a, granted_e, bus_req_e;
  always #5 clk = ~clk;

  cowb_req_resp #(.NEED_ARB(1'b1)) dut_a (.clk, .rst_n, .want, .granted(granted_a),
                                           .bus_req(bus_req_a), .bus_gnt);
  cowb_req_resp #(.NEED_ARB(1'b0)) dut_e (.clk, .rst_n, .want, .granted(granted_e),
                                           .bus_req(bus_req_e), .bus_gnt);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pw;
    @(negedge clk); rst_n = 1;
    pw = 0;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      chk(bus_req_a == pw, $sformatf("request follows want, cycle %0d", t));
      want    = ($urandom % 3) != 0;
      bus_gnt = 1'($urandom);
      #1;
      chk(granted_a == (want && bus_req_a && bus_gnt), "granted needs request and response");
      chk(granted_e == want && bus_req_e == 0, "exclusive bus needs no arbitration");
      pw = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
