// tb_cowb_rx_ctrl: drives frames built by the reference into the receiving
// controller and checks its decisions: data bytes written for a frame to the
// local address, commit with the right SA/TYPE/LENGTH on a good check,
// abort + request for sending again on a corrupted byte, abandoning frames
// for another address, resend request on a good TYPE 3 frame, overflow
// handling and rejection of LENGTH 0.
module tb_cowb_rx_ctrl;
  import cowb_pkg::*;
  import cowb_tb_pkg::*;

  localparam addr_t ME = 16'h0005;
  logic clk = 0, rst_n = 0;
  beat_t bus = BEAT_IDLE;
  logic wr_en, commit, abort, ovf = 0;
  logic [7:0] wr_data;
  addr_t c_sa, nack_addr;
  ftype_t c_type;
  len_t c_len;
  logic nack_req, retx_req, ev_drop, ev_crc_err, ev_overflow, ev_frame_ok;
  always #5 clk = ~clk;

  cowb_rx_ctrl dut (.clk, .rst_n, .local_addr(ME), .bus, .wr_en, .wr_data, .commit,
                    .abort, .c_sa, .c_type, .c_len, .ovf, .nack_req, .nack_addr,
                    .retx_req, .ev_drop, .ev_crc_err, .ev_overflow, .ev_frame_ok);

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

  // observed outputs
  bq_t wr_seen;
  int n_commit, n_abort, n_nack, n_retx, n_drop, n_crc, n_ovf, n_ok;
  addr_t last_sa, last_nack;
  ftype_t last_type;
  len_t last_len;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) wr_seen.push_back(wr_data);
    if (commit) begin n_commit++; last_sa = c_sa; last_type = c_type; last_len = c_len; end
    if (abort) n_abort++;
    if (nack_req) begin n_nack++; last_nack = nack_addr; end
    n_retx += int'(retx_req);
    n_drop += int'(ev_drop);
    n_crc  += int'(ev_crc_err);
    n_ovf  += int'(ev_overflow);
    n_ok   += int'(ev_frame_ok);
  end

  task automatic send(bq_t f, int flip_at);
    foreach (f[k]) begin
      @(negedge clk);
      bus = '{valid: 1'b1, sof: (k == 0), data: (k == flip_at) ? f[k] ^ 8'h01 : f[k]};
    end
    @(negedge clk); bus = BEAT_IDLE;
    repeat (2) @(negedge clk);
  endtask

  task automatic clear();
    wr_seen = {};
    n_commit = 0; n_abort = 0; n_nack = 0; n_retx = 0; n_drop = 0; n_crc = 0; n_ovf = 0; n_ok = 0;
  endtask

  initial begin
    bq_t d;
    @(negedge clk); rst_n = 1;

    clear(); d = pattern(25, 1);
    send(build_frame(ME, 16'h0009, T_WRITE, d), -1);
    chk(n_commit == 1 && n_abort == 0 && n_nack == 0 && n_ok == 1, "good frame committed");
    chk(wr_seen == d, "data bytes written");
    chk(last_sa == 16'h0009 && last_type == T_WRITE && last_len == 25, "descriptor");

    clear();
    send(build_frame(16'h0006, 16'h0009, T_WRITE, pattern(8, 2)), -1);
    chk(n_drop == 1 && n_commit == 0 && wr_seen.size() == 0 && n_nack == 0, "other address abandoned");

    clear();
    send(build_frame(ME, 16'h0007, T_WRITE, pattern(12, 3)), 10);
    chk(n_commit == 0 && n_abort == 1 && n_nack == 1 && n_crc == 1, "corrupted data byte");
    chk(last_nack == 16'h0007, "request for sending again goes to SA");

    clear();
    send(build_frame(ME, 16'h0007, T_WRITE, pattern(12, 3)), 12 + 7 + 2);
    chk(n_commit == 0 && n_nack == 1, "corrupted check byte");

    clear();
    send(build_frame(ME, 16'h0003, T_RESEND, {8'h00}), -1);
    chk(n_retx == 1 && n_commit == 0 && wr_seen.size() == 0, "resend request recognised");

    clear();
    ovf = 1;
    send(build_frame(ME, 16'h0004, T_READ, pattern(4, 4)), -1);
    ovf = 0;
    chk(n_ovf == 1 && n_commit == 0 && n_abort == 1 && n_nack == 1, "overflow aborts and asks again");

    clear();
    d = build_frame(ME, 16'h0004, T_WRITE, {8'h11});
    d[5] = 8'h00; d[6] = 8'h00;
    send(d, -1);
    chk(n_commit == 0 && n_nack == 1, "length 0 rejected");

    // back-to-back frames without idle beats
    clear();
    begin
      bq_t f1, f2;
      f1 = build_frame(ME, 16'h0001, T_WRITE, pattern(5, 7));
      f2 = build_frame(ME, 16'h0002, T_WRITE, pattern(6, 8));
      foreach (f2[k]) f1.push_back(f2[k]);
      foreach (f1[k]) begin
        @(negedge clk);
        bus = '{valid: 1'b1, sof: (k == 0 || k == 16), data: f1[k]};
      end
      @(negedge clk); bus = BEAT_IDLE;
      repeat (2) @(negedge clk);
    end
    chk(n_commit == 2 && wr_seen.size() == 11, "back-to-back frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
