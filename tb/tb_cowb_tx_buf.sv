// tb_cowb_tx_buf: writes a full-size frame image into the sending buffer and
// reads it back at random addresses; contents must survive later writes to
// other addresses (the buffer keeps a sent frame for resending).
module tb_cowb_tx_buf;
  import cowb_pkg::*;

  localparam int DEPTH = MAX_FRAME + 12;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  always #5 clk = ~clk;

  cowb_tx_buf dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] val(int a, int s);
    return 8'(a * 31 + s + (a >> 8));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(k); wr_data = val(k, 0);
    end
    // overwrite only the control region
    for (int k = MAX_FRAME; k < DEPTH; k++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(k); wr_data = val(k, 5);
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      a = (t < 200) ? int'($urandom % DEPTH) : t - 200 + MAX_FRAME - 100;
      if (a >= DEPTH) a = DEPTH - 1;
      rd_addr = AW'(a);
      #1;
      chk(rd_data == val(a, (a >= MAX_FRAME) ? 5 : 0), $sformatf("addr %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
