// tb_cowb_rni: a main interface (IS_MR = 1) and a slave interface (IS_MR = 0)
// joined back to back by two one-way links, with the testbench answering
// the slave's bus request after a delay. Checks: frames in both directions
// arrive with the right SA, TYPE and data; a frame for another address is
// abandoned; a corrupted byte on either link leads to a request for sending
// again and one correct delivery; the slave never sends without the grant.
module tb_cowb_rni;
  import cowb_pkg::*;
  import cowb_tb_pkg::*;

  localparam addr_t MRA = 16'h0000, SRA = 16'h0001;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // side 0 = main, side 1 = slave
  beat_t      tx [2], rx [2];
  logic       bus_req [2], bus_gnt [2];
  logic       cmd_valid [2], cmd_ready [2], dat_valid [2], dat_ready [2];
  addr_t      cmd_da [2];
  ftype_t     cmd_type [2];
  len_t       cmd_len [2];
  logic [7:0] dat_data [2];
  logic       rx_valid [2], rx_ready [2], rx_last [2];
  logic [7:0] rx_data [2];
  addr_t      rx_sa [2];
  ftype_t     rx_type [2];
  len_t       rx_len [2];
  logic       ev_drop [2], ev_crc_err [2], ev_overflow [2], ev_frame_ok [2], ev_nack_sent [2], ev_retx [2];

  for (genvar s = 0; s < 2; s++) begin : g_rni
    cowb_rni #(.IS_MR(s == 0)) u (
      .clk, .rst_n, .local_addr (s == 0 ? MRA : SRA),
      .bus_rx (rx[s]), .bus_tx (tx[s]), .bus_req (bus_req[s]), .bus_gnt (bus_gnt[s]),
      .cmd_valid (cmd_valid[s]), .cmd_ready (cmd_ready[s]), .cmd_da (cmd_da[s]),
      .cmd_type (cmd_type[s]), .cmd_len (cmd_len[s]),
      .dat_valid (dat_valid[s]), .dat_ready (dat_ready[s]), .dat_data (dat_data[s]),
      .rx_valid (rx_valid[s]), .rx_ready (rx_ready[s]), .rx_data (rx_data[s]),
      .rx_last (rx_last[s]), .rx_sa (rx_sa[s]), .rx_type (rx_type[s]), .rx_len (rx_len[s]),
      .ev_drop (ev_drop[s]), .ev_crc_err (ev_crc_err[s]), .ev_overflow (ev_overflow[s]),
      .ev_frame_ok (ev_frame_ok[s]), .ev_nack_sent (ev_nack_sent[s]), .ev_retx (ev_retx[s])
    );
  end

  // links with optional corruption of the n-th beat of the next frame
  int flip_n [2] = '{0, 0};
  int beat_no [2] = '{0, 0};
  always @(posedge clk) for (int s = 0; s < 2; s++) begin
    if (tx[s].valid) beat_no[s] <= tx[s].sof ? 1 : beat_no[s] + 1;
    if (rx[1-s].data != tx[s].data) flip_n[s] = 0;   // one corruption only
  end
  always_comb for (int s = 0; s < 2; s++) begin
    rx[1-s] = tx[s];
    if (tx[s].valid && flip_n[s] != 0 &&
        ((tx[s].sof ? 1 : beat_no[s] + 1) == flip_n[s]))
      rx[1-s].data = tx[s].data ^ 8'h40;
  end

  // the slave's arbiter: answer a request four clocks later, hold while requested
  int req_age;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin req_age <= 0; bus_gnt[1] <= 0; end
    else begin
      req_age    <= bus_req[1] ? req_age + 1 : 0;
      bus_gnt[1] <= bus_req[1] && req_age >= 3;
    end
  assign bus_gnt[0] = 1'b1;

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

  int n_drop, n_crc [2], n_retx [2], bad_tx;
  always @(posedge clk) if (rst_n) begin
    n_drop += int'(ev_drop[1]);
    for (int s = 0; s < 2; s++) begin
      n_crc[s]  += int'(ev_crc_err[s]);
      n_retx[s] += int'(ev_retx[s]);
    end
    if (tx[1].valid && !bus_gnt[1]) bad_tx++;
  end

  typedef struct { addr_t sa; ftype_t t; bq_t d; } frame_t;
  frame_t got0[$], got1[$];
  bq_t cur [2];
  always @(negedge clk) if (rst_n) for (int s = 0; s < 2; s++)
    if (rx_valid[s] && rx_ready[s]) begin
      cur[s].push_back(rx_data[s]);
      if (rx_last[s]) begin
        frame_t f;
        f.sa = rx_sa[s]; f.t = rx_type[s]; f.d = cur[s];
        if (s == 0) got0.push_back(f); else got1.push_back(f);
        cur[s] = {};
      end
    end

  task automatic send(int s, addr_t da, ftype_t t, bq_t d);
    @(negedge clk);
    cmd_valid[s] = 1; cmd_da[s] = da; cmd_type[s] = t; cmd_len[s] = len_t'(d.size());
    while (!cmd_ready[s]) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    cmd_valid[s] = 0;
    foreach (d[k]) begin
      dat_valid[s] = 1; dat_data[s] = d[k];
      while (!dat_ready[s]) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
    end
    dat_valid[s] = 0;
  endtask

  initial begin
    bq_t d;
    for (int s = 0; s < 2; s++) begin
      cmd_valid[s] = 0; cmd_da[s] = '0; cmd_type[s] = T_WRITE; cmd_len[s] = '0;
      dat_valid[s] = 0; dat_data[s] = '0; rx_ready[s] = 1;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    d = pattern(30, 1);
    send(0, SRA, T_WRITE, d);
    repeat (80) @(negedge clk);
    chk(got1.size() == 1, "main to slave delivered");
    if (got1.size() == 1) chk(got1[0].sa == MRA && got1[0].t == T_WRITE && got1[0].d == d, "main to slave content");

    send(0, 16'h0002, T_WRITE, pattern(5, 2));
    repeat (40) @(negedge clk);
    chk(n_drop == 1 && got1.size() == 1, "other address abandoned");

    d = pattern(50, 3);
    send(1, MRA, T_WRITE, d);
    repeat (150) @(negedge clk);
    chk(got0.size() == 1, "slave to main delivered");
    if (got0.size() == 1) chk(got0[0].sa == SRA && got0[0].d == d, "slave to main content");

    // corrupted byte, main to slave
    d = pattern(20, 4);
    flip_n[0] = 15;
    send(0, SRA, T_READ, d);
    repeat (200) @(negedge clk);
    chk(n_crc[1] == 1 && n_retx[0] == 1, $sformatf("slave saw error, main resent %0d %0d %0d", n_crc[1], n_retx[0], got1.size()));
    chk(got1.size() == 2, "delivered once after resend");
    if (got1.size() == 2) chk(got1[1].t == T_READ && got1[1].d == d, "resent content");

    // corrupted byte, slave to main
    d = pattern(64, 5);
    flip_n[1] = 20;
    send(1, MRA, T_WRITE, d);
    repeat (400) @(negedge clk);
    chk(n_crc[0] == 1 && n_retx[1] == 1, "main saw error, slave resent");
    chk(got0.size() == 2, "delivered once after resend (slave side)");
    if (got0.size() == 2) chk(got0[1].d == d, "resent content (slave side)");
    chk(bad_tx == 0, "slave never drove without grant");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
