// tb_cowb_bus_port: the bus port registers its input by one clock while
// enabled and puts idle beats on the bus while disabled.
module tb_cowb_bus_port;
  import cowb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  beat_t d = BEAT_IDLE, q;
  always #5 clk = ~clk;

  cowb_bus_port dut (.clk, .rst_n, .en, .d, .q);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    beat_t prev;
    bit    prev_en;
    @(negedge clk); rst_n = 1;
    chk(q == BEAT_IDLE, "reset value");
    prev = BEAT_IDLE; prev_en = 0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      if (t > 0) chk(q == (prev_en ? prev : BEAT_IDLE), $sformatf("cycle %0d", t));
      en = ($urandom % 4) != 0;
      d  = '{valid: 1'($urandom), sof: 1'($urandom), data: 8'($urandom)};
      prev = d; prev_en = en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
