// tb_cowb_crc32: checks the frame-check unit against the standard CRC-32
// check value ("123456789" -> CBF43926) and against a bit-serial reference
// on random messages, including restarting with start in the middle of a run.
module tb_cowb_crc32;
  import cowb_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, start = 0;
  logic [7:0]  d = '0;
  logic [31:0] crc, check_v;
  always #5 clk = ~clk;

  cowb_crc32 dut (.clk, .rst_n, .en, .start, .d, .crc, .check(check_v));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic feed(bq_t q);
    foreach (q[k]) begin
      @(negedge clk);
      en = 1; start = (k == 0); d = q[k];
    end
    @(negedge clk);
    en = 0; start = 0;
  endtask

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    feed({8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39});
    chk(check_v == 32'hCBF4_3926, $sformatf("check value %h", check_v));
    chk(crc == ~32'hCBF4_3926, "raw register");
    for (int t = 0; t < 5; t++) begin
      q = {};
      for (int k = 0; k < 1 + t * 3; k++) q.push_back(8'($urandom));
      feed(q);
      chk(check_v == ref_crc(q), $sformatf("random message %0d", t));
    end
    // hold: no change while en is low
    q = {8'hAA};
    feed(q);
    repeat (3) @(negedge clk);
    chk(check_v == ref_crc(q), "hold while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
