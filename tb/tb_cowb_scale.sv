// tb_cowb_scale: a COWB system with four slave interfaces, each with a
// behavioural memory behind it. The main resource writes a block to every
// slave, then sends a read command to each in turn, so all four answers
// compete for the shared bus. Checks: every slave stored its own block and
// no other, every answer arrives once with the right data, answers arrive in
// the order the slaves asked for the bus (first come, first served), and at
// least three requests were waiting at the same time.
module tb_cowb_scale;
  import cowb_pkg::*;
  import cowb_tb_pkg::*;

  localparam int N = 4;
  localparam int BLK = 64;

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

  cowb_system #(.N_SR(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int max_waiting = 0;
  int req_order[$];
  logic [N-1:0] req_q = '0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.sr_req) > max_waiting) max_waiting = $countones(dut.sr_req);
    for (int i = 0; i < N; i++) if (dut.sr_req[i] && !req_q[i]) req_order.push_back(i);
    req_q <= dut.sr_req;
  end

  // slave memories: WRITE stores the data, READ answers with it
  bq_t store [N];
  bq_t cur [N];
  int  pending_read [N];
  for (genvar i = 0; i < N; i++) begin : g_sr
    always @(negedge clk) if (rst_n && sr_rx_valid[i] && sr_rx_ready[i]) begin
      cur[i].push_back(sr_rx_data[i]);
      if (sr_rx_last[i]) begin
        if (sr_rx_type[i] == T_WRITE) store[i] = cur[i];
        else pending_read[i]++;
        cur[i] = {};
      end
    end
    initial begin
      forever begin
        wait (pending_read[i] != 0);
        pending_read[i]--;
        @(negedge clk);
        sr_cmd_valid[i] = 1; sr_cmd_da[i] = 16'h0000; sr_cmd_type[i] = T_WRITE;
        sr_cmd_len[i] = len_t'(store[i].size());
        while (!sr_cmd_ready[i]) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        sr_cmd_valid[i] = 0;
        foreach (store[i][k]) begin
          sr_dat_valid[i] = 1; sr_dat_data[i] = store[i][k];
          while (!sr_dat_ready[i]) @(negedge clk);
          @(posedge clk);
          @(negedge clk);
        end
        sr_dat_valid[i] = 0;
      end
    end
  end

  addr_t got_sa[$];
  bq_t   got_d[$];
  bq_t   mcur;
  always @(negedge clk) if (rst_n && mr_rx_valid && mr_rx_ready) begin
    mcur.push_back(mr_rx_data);
    if (mr_rx_last) begin
      got_sa.push_back(mr_rx_sa);
      got_d.push_back(mcur);
      mcur = {};
    end
  end

  task automatic mr_send(addr_t da, ftype_t t, bq_t d);
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

  initial begin
    for (int i = 0; i < N; i++) begin
      sr_cmd_valid[i] = 0; sr_cmd_da[i] = '0; sr_cmd_type[i] = T_WRITE; sr_cmd_len[i] = '0;
      sr_dat_valid[i] = 0; sr_dat_data[i] = '0; sr_rx_ready[i] = 1;
      pending_read[i] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    for (int i = 0; i < N; i++) mr_send(16'h0001 + addr_t'(i), T_WRITE, pattern(BLK, 10 + i));
    repeat (300) @(negedge clk);
    for (int i = 0; i < N; i++) chk(store[i] == pattern(BLK, 10 + i), $sformatf("slave %0d stored its block", i));

    // read commands to all four, back to back
    for (int i = 0; i < N; i++) mr_send(16'h0001 + addr_t'(i), T_READ, {8'h00});
    begin
      int t = 0;
      while (got_sa.size() < N && t < 5000) begin @(negedge clk); t++; end
    end
    chk(got_sa.size() == N, "four answers");
    chk(req_order.size() >= N, "four bus requests");
    for (int j = 0; j < N && j < got_sa.size() && j < req_order.size(); j++) begin
      chk(got_sa[j] == 16'h0001 + addr_t'(req_order[j]), $sformatf("answer %0d in request order", j));
      chk(got_d[j] == pattern(BLK, 10 + req_order[j]), $sformatf("answer %0d data", j));
    end
    chk(max_waiting >= 3, $sformatf("requests waiting at once: %0d", max_waiting));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
