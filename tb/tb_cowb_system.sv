// tb_cowb_system: end-to-end test of a two-slave COWB system at its default
// sizes (4096-byte reception buffers, frames up to 2048 data bytes).
//
// Behavioural resources stand in for the parts outside the bus: the main
// resource issues commands as a processor would; slave 0 is a memory
// controller model (WRITE frames carry a 2-byte address then the data; READ
// frames carry address and count, answered by a WRITE frame to the sender);
// slave 1 is a serial controller model that collects bytes and answers a
// READ with a counting pattern. The test covers: writing and reading back
// memory, address filtering, simultaneous use of both buses, two slaves
// contending for the shared bus, a corrupted byte on each bus (CRC error,
// request for sending again, resend), and overflow of a reception buffer
// by maximum-length frames. Bus framing (L + 11 contiguous bytes per frame)
// is checked on every frame. Each mechanism must occur at least once.
module tb_cowb_system;
  import cowb_pkg::*;

  localparam int N = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       mr_cmd_valid = 0, mr_cmd_ready;
  addr_t      mr_cmd_da = '0;
  ftype_t     mr_cmd_type = T_WRITE;
  len_t       mr_cmd_len = '0;
  logic       mr_dat_valid = 0, mr_dat_ready;
  logic [7:0] mr_dat_data = '0;
  logic       mr_rx_valid, mr_rx_ready = 1, mr_rx_last;
  logic [7:0] mr_rx_data;
  addr_t      mr_rx_sa;
  ftype_t     mr_rx_type;
  len_t       mr_rx_len;

  logic       sr_cmd_valid [N], sr_cmd_ready [N];
  addr_t      sr_cmd_da [N];
  ftype_t     sr_cmd_type [N];
  len_t       sr_cmd_len [N];
  logic       sr_dat_valid [N], sr_dat_ready [N];
  logic [7:0] sr_dat_data [N];
  logic       sr_rx_valid [N], sr_rx_ready [N], sr_rx_last [N];
  logic [7:0] sr_rx_data [N];
  addr_t      sr_rx_sa [N];
  ftype_t     sr_rx_type [N];
  len_t       sr_rx_len [N];

  beat_t      mr_bus, sr_bus;
  logic [N-1:0] sr_gnt;
  logic [N:0] ev_drop, ev_crc_err, ev_overflow, ev_frame_ok, ev_nack_sent, ev_retx;

  cowb_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_drop, n_crc_sr, n_crc_mr, n_nack, n_retx, n_ovf, n_both_req, n_parallel, n_maxlen;
  always @(posedge clk) if (rst_n) begin
    n_drop     += $countones(ev_drop);
    n_crc_sr   += $countones(ev_crc_err[N-1:0]);
    n_crc_mr   += int'(ev_crc_err[N]);
    n_nack     += $countones(ev_nack_sent);
    n_retx     += $countones(ev_retx);
    n_ovf      += $countones(ev_overflow);
    n_both_req += int'(&dut.sr_req);
    n_parallel += int'(mr_bus.valid && sr_bus.valid);
  end

  // ---------------- framing monitor ----------------
  task automatic frame_monitor(input bit which);
    beat_t b;
    int cnt, len;
    forever begin
      @(negedge clk);
      b = which ? sr_bus : mr_bus;
      if (b.valid && b.sof) begin
        cnt = 1; len = 0;
        forever begin
          @(negedge clk);
          b = which ? sr_bus : mr_bus;
          if (!b.valid || b.sof) break;
          cnt++;
          if (cnt == 6) len = int'(b.data) << 8;
          if (cnt == 7) len = len | int'(b.data);
          if (cnt == len + 11 && cnt > 11) break;
        end
        check(cnt == len + 11, $sformatf("bus %0d frame of %0d data bytes took %0d beats", which, len, cnt));
        if (len == MAX_DATA) n_maxlen++;
      end
    end
  endtask
  initial begin
    fork
      frame_monitor(0);
      frame_monitor(1);
    join_none
  end

  // ---------------- main resource ----------------
  typedef byte unsigned bq_t[$];
  typedef struct {
    addr_t  sa;
    ftype_t t;
    bq_t    d;
  } frame_t;

  task automatic mr_send(input addr_t da, input ftype_t t, input bq_t d);
    @(negedge clk);
    mr_cmd_valid = 1; mr_cmd_da = da; mr_cmd_type = t; mr_cmd_len = len_t'(d.size());
    while (!mr_cmd_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    mr_cmd_valid = 0;
    foreach (d[k]) begin
      mr_dat_valid = 1; mr_dat_data = d[k];
      while (!mr_dat_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
    end
    mr_dat_valid = 0;
  endtask

  frame_t mr_got[$];
  bq_t    mr_cur;
  always @(negedge clk) if (rst_n && mr_rx_valid && mr_rx_ready) begin
    mr_cur.push_back(mr_rx_data);
    if (mr_rx_last) begin
      frame_t f;
      f.sa = mr_rx_sa; f.t = mr_rx_type; f.d = mr_cur;
      mr_got.push_back(f);
      mr_cur = {};
    end
  end

  // ---------------- slave resources ----------------
  byte unsigned mem [65536];
  bq_t          serial_out;
  int           sr1_frames = 0;
  bq_t          sr_cur [N];
  frame_t       sr_req_q0[$], sr_req_q1[$];

  task automatic sr_send(input int i, input addr_t da, input bq_t d);
    @(negedge clk);
    sr_cmd_valid[i] = 1; sr_cmd_da[i] = da; sr_cmd_type[i] = T_WRITE;
    sr_cmd_len[i] = len_t'(d.size());
    while (!sr_cmd_ready[i]) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    sr_cmd_valid[i] = 0;
    foreach (d[k]) begin
      sr_dat_valid[i] = 1; sr_dat_data[i] = d[k];
      while (!sr_dat_ready[i]) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
    end
    sr_dat_valid[i] = 0;
  endtask

  for (genvar i = 0; i < N; i++) begin : g_rx
    always @(negedge clk) if (rst_n && sr_rx_valid[i] && sr_rx_ready[i]) begin
      sr_cur[i].push_back(sr_rx_data[i]);
      if (sr_rx_last[i]) begin
        frame_t f;
        f.sa = sr_rx_sa[i]; f.t = sr_rx_type[i]; f.d = sr_cur[i];
        sr_cur[i] = {};
        if (i == 0) begin
          if (f.t == T_WRITE) begin
            int a;
            a = (int'(f.d[0]) << 8) | int'(f.d[1]);
            for (int k = 2; k < f.d.size(); k++) mem[(a + k - 2) & 32'hFFFF] = f.d[k];
          end else sr_req_q0.push_back(f);
        end else begin
          if (f.t == T_WRITE) begin
            foreach (f.d[k]) serial_out.push_back(f.d[k]);
            sr1_frames++;
          end else sr_req_q1.push_back(f);
        end
      end
    end
  end

  // responders: READ frames carry address (2 bytes) and count (2 bytes)
  initial begin
    forever begin
      frame_t f; bq_t r; int a, c;
      wait (sr_req_q0.size() != 0);
      f = sr_req_q0.pop_front();
      a = (int'(f.d[0]) << 8) | int'(f.d[1]);
      c = (int'(f.d[2]) << 8) | int'(f.d[3]);
      r = {};
      for (int k = 0; k < c; k++) r.push_back(mem[(a + k) & 32'hFFFF]);
      sr_send(0, f.sa, r);
    end
  end
  initial begin
    forever begin
      frame_t f; bq_t r; int c;
      wait (sr_req_q1.size() != 0);
      f = sr_req_q1.pop_front();
      c = (int'(f.d[2]) << 8) | int'(f.d[3]);
      r = {};
      for (int k = 0; k < c; k++) r.push_back(byte'(8'hA0 + k));
      sr_send(1, f.sa, r);
    end
  end

  // ---------------- fault injection ----------------
  // Flip one bit of the n-th byte of the next frame seen on a bus.
  task automatic corrupt_next(input bit which, input int n);
    beat_t b;
    int cnt = 0;
    forever begin
      @(negedge clk);
      b = which ? sr_bus : mr_bus;
      if (b.valid && b.sof) cnt = 1;
      else if (b.valid && cnt > 0) cnt++;
      if (cnt == n) break;
    end
    b.data = b.data ^ 8'h10;
    if (which) force dut.sr_bus = b;
    else       force dut.mr_bus = b;
    @(negedge clk);
    if (which) release dut.sr_bus;
    else       release dut.mr_bus;
  endtask

  function automatic bq_t pattern(int n, int seed);
    bq_t q;
    for (int k = 0; k < n; k++) q.push_back(byte'((k * 7 + seed) & 32'hFF));
    return q;
  endfunction

  function automatic bq_t rd_cmd(int a, int c);
    return {byte'(a >> 8), byte'(a), byte'(c >> 8), byte'(c)};
  endfunction

  task automatic wait_mr_frames(int n, int limit);
    int t = 0;
    while (mr_got.size() < n && t < limit) begin @(negedge clk); t++; end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    bq_t wd, payload, hello;
    frame_t f;
    int t0;
    for (int i = 0; i < N; i++) begin
      sr_cmd_valid[i] = 0; sr_cmd_da[i] = '0; sr_cmd_type[i] = T_WRITE; sr_cmd_len[i] = '0;
      sr_dat_valid[i] = 0; sr_dat_data[i] = '0; sr_rx_ready[i] = 1;
    end
    foreach (mem[k]) mem[k] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // 1. write 16 bytes to memory (slave 0), read them back
    payload = pattern(16, 3);
    wd = {8'h01, 8'h00};
    foreach (payload[k]) wd.push_back(payload[k]);
    mr_send(16'h0001, T_WRITE, wd);
    repeat (60) @(negedge clk);
    for (int k = 0; k < 16; k++) check(mem[16'h0100 + k] == payload[k], "memory write");
    check(n_drop >= 1, "slave 1 abandoned the frame for slave 0");

    t0 = mr_got.size();
    mr_send(16'h0001, T_READ, rd_cmd(16'h0100, 16));
    wait_mr_frames(t0 + 1, 2000);
    check(mr_got.size() == t0 + 1, "read response arrived");
    if (mr_got.size() == t0 + 1) begin
      f = mr_got[t0];
      check(f.sa == 16'h0001 && f.t == T_WRITE && f.d.size() == 16, "read response header");
      foreach (payload[k]) check(f.d[k] == payload[k], "read data");
    end

    // 2. serial slave
    hello = {8'h48, 8'h45, 8'h4C, 8'h4C, 8'h4F};
    mr_send(16'h0002, T_WRITE, hello);
    repeat (60) @(negedge clk);
    check(serial_out.size() == 5, "serial bytes");
    foreach (hello[k]) if (k < serial_out.size()) check(serial_out[k] == hello[k], "serial data");

    // 3. both slaves answer at once (arbitration), while MR keeps writing
    t0 = mr_got.size();
    mr_send(16'h0001, T_READ, rd_cmd(16'h0100, 300));
    mr_send(16'h0002, T_READ, rd_cmd(0, 200));
    mr_send(16'h0002, T_WRITE, pattern(100, 9));
    wait_mr_frames(t0 + 2, 5000);
    check(mr_got.size() == t0 + 2, "two read responses");
    if (mr_got.size() == t0 + 2) begin
      int got1, got2;
      got1 = 0; got2 = 0;
      for (int j = t0; j < t0 + 2; j++) begin
        f = mr_got[j];
        if (f.sa == 16'h0001 && f.d.size() == 300) begin
          got1 = 1;
          for (int k = 0; k < 300; k++) check(f.d[k] == mem[16'h0100 + k], "contended read, memory");
        end
        if (f.sa == 16'h0002 && f.d.size() == 200) begin
          got2 = 1;
          for (int k = 0; k < 200; k++) check(f.d[k] == byte'(8'hA0 + k), "contended read, serial");
        end
      end
      check(got1 == 1 && got2 == 1, "both responses identified");
    end

    // 4. corrupted byte on the MR exclusive bus: slave asks, MR resends
    payload = pattern(40, 77);
    wd = {8'h02, 8'h00};
    foreach (payload[k]) wd.push_back(payload[k]);
    fork
      corrupt_next(0, 20);
      mr_send(16'h0001, T_WRITE, wd);
    join
    repeat (300) @(negedge clk);
    for (int k = 0; k < 40; k++) check(mem[16'h0200 + k] == payload[k], "write after resend");
    check(n_crc_sr >= 1 && n_retx >= 1, "slave CRC error and MR resend");

    // 5. corrupted byte on the SR shared bus: MR asks, slave resends
    t0 = mr_got.size();
    fork
      corrupt_next(1, 12);
      mr_send(16'h0001, T_READ, rd_cmd(16'h0200, 40));
    join
    wait_mr_frames(t0 + 1, 3000);
    check(mr_got.size() == t0 + 1, "exactly one good response after resend");
    if (mr_got.size() >= t0 + 1) begin
      f = mr_got[t0];
      check(f.d.size() == 40, "resent response length");
      foreach (payload[k]) if (k < f.d.size()) check(f.d[k] == payload[k], "resent response data");
    end
    check(n_crc_mr >= 1, "MR CRC error");

    // 6. overflow: serial slave stalls, three maximum-length frames
    sr_rx_ready[1] = 0;
    sr1_frames = 0;
    serial_out = {};
    for (int j = 0; j < 3; j++) mr_send(16'h0002, T_WRITE, pattern(MAX_DATA, j));
    repeat (3000) @(negedge clk);
    check(n_ovf >= 1, "reception buffer overflow seen");
    sr_rx_ready[1] = 1;
    t0 = 0;
    while (sr1_frames < 3 && t0 < 60000) begin @(negedge clk); t0++; end
    check(sr1_frames == 3, "three frames delivered after overflow");
    check(serial_out.size() == 3 * MAX_DATA, "overflow data size");
    for (int j = 0; j < 3; j++) begin
      payload = pattern(MAX_DATA, j);
      for (int k = 0; k < MAX_DATA; k++)
        if (j * MAX_DATA + k < serial_out.size() && serial_out[j * MAX_DATA + k] != payload[k]) begin
          check(0, "overflow data content");
          break;
        end
    end
    check(serial_out.size() == 3 * MAX_DATA, "frames in order");

    repeat (100) @(negedge clk);
    // every mechanism must have happened
    check(n_drop > 0,     "mechanism: address filter");
    check(n_crc_sr > 0,   "mechanism: CRC error at slave");
    check(n_crc_mr > 0,   "mechanism: CRC error at main");
    check(n_nack > 0,     "mechanism: request for sending again");
    check(n_retx > 0,     "mechanism: resend");
    check(n_ovf > 0,      "mechanism: buffer overflow");
    check(n_both_req > 0, "mechanism: shared-bus contention");
    check(n_parallel > 0, "mechanism: both buses busy at once");
    check(n_maxlen > 0,   "mechanism: maximum-length frame");
    $display("drop=%0d crc_sr=%0d crc_mr=%0d nack=%0d retx=%0d ovf=%0d contention=%0d parallel=%0d maxlen=%0d",
             n_drop, n_crc_sr, n_crc_mr, n_nack, n_retx, n_ovf, n_both_req, n_parallel, n_maxlen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
