// tb_cowb_shared_bus: the granted port's beats appear on the shared bus,
// idle ports contribute nothing.
module tb_cowb_shared_bus;
  import cowb_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  beat_t port [N];
  logic [N-1:0] gnt = '0;
  beat_t bus;
  always #5 clk = ~clk;

  cowb_shared_bus #(.N(N)) dut (.clk, .rst_n, .port, .gnt, .bus);

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
    int w;
    beat_t b;
    foreach (port[i]) port[i] = BEAT_IDLE;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      w = $urandom % (N + 1);
      gnt = '0;
      foreach (port[i]) port[i] = BEAT_IDLE;
      b = '{valid: 1'($urandom), sof: 1'($urandom), data: 8'($urandom)};
      if (w < N) begin
        gnt[w]  = 1'b1;
        port[w] = b;
      end
      #1;
      chk(bus == ((w < N) ? b : BEAT_IDLE), $sformatf("cycle %0d owner %0d", t, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
