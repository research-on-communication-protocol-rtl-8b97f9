// tb_cowb_rx_buf: frames written to the reception buffer become readable
// only when committed; an aborted frame leaves nothing behind; a frame that
// does not fit raises ovf; a full descriptor queue raises ovf. Uses a
// 64-byte buffer to reach the full cases quickly.
module tb_cowb_rx_buf;
  import cowb_pkg::*;
  import cowb_tb_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, commit = 0, abort = 0, ovf;
  logic [7:0] wr_data = '0;
  addr_t c_sa = '0;
  ftype_t c_type = T_WRITE;
  len_t c_len = '0;
  logic rd_valid, rd_ready = 0, rd_last;
  logic [7:0] rd_data;
  addr_t rd_sa;
  ftype_t rd_type;
  len_t rd_len;
  always #5 clk = ~clk;

  cowb_rx_buf #(.DEPTH(DEPTH), .DESC_DEPTH(4)) dut (.*);

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

  // write a frame; finish with commit (ok=1) or abort; return ovf seen at the end
  task automatic put(bq_t d, addr_t sa, bit ok, output bit o);
    foreach (d[k]) begin
      @(negedge clk); wr_en = 1; wr_data = d[k];
    end
    @(negedge clk); wr_en = 0;
    o = ovf;
    commit = ok; abort = !ok; c_sa = sa; c_type = T_WRITE; c_len = len_t'(d.size());
    @(negedge clk); commit = 0; abort = 0;
  endtask

  // read one frame, compare
  task automatic get(bq_t d, addr_t sa);
    int k = 0;
    forever begin
      @(negedge clk);
      rd_ready = rd_valid;
      if (rd_valid) begin
        chk(rd_data == d[k] && rd_sa == sa && rd_len == len_t'(d.size()), $sformatf("byte %0d got %h sa %h len %0d exp %h", k, rd_data, rd_sa, rd_len, d[k]));
        chk(rd_last == (k == d.size() - 1), "last flag");
        k++;
        if (k == d.size()) break;
      end
    end
    @(posedge clk);
    #1 rd_ready = 0;
  endtask

  initial begin
    bit o;
    bq_t a, b, c;
    @(negedge clk); rst_n = 1;
    a = pattern(10, 1); b = pattern(20, 2); c = pattern(30, 3);
    put(a, 16'h0011, 1, o);
    chk(!o && rd_valid, "first frame committed");
    // open frame not visible, abort leaves nothing
    put(b, 16'h0022, 0, o);
    put(c, 16'h0033, 1, o);
    get(a, 16'h0011);
    get(c, 16'h0033);
    @(negedge clk);
    chk(!rd_valid, "aborted frame never visible");
    // overflow: 40 + 40 bytes into 64
    put(pattern(40, 4), 16'h0044, 1, o);
    chk(!o, "40 bytes fit");
    put(pattern(40, 5), 16'h0055, 0, o);
    chk(o, "second 40 bytes overflow");
    chk(!ovf, "ovf clears after abort");
    get(pattern(40, 4), 16'h0044);
    // descriptor queue full after four small frames
    for (int j = 0; j < 4; j++) begin
      put(pattern(2, j), 16'h0100 + addr_t'(j), 1, o);
      chk(!o, "small frame fits");
    end
    chk(ovf, "descriptor queue full");
    for (int j = 0; j < 4; j++) get(pattern(2, j), 16'h0100 + addr_t'(j));
    chk(!ovf, "descriptor queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
