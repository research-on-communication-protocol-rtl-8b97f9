// tb_cowb_tx_ctrl: the sending controller, with its sending buffer, packs
// frames that match the reference layout and check, sends them one byte per
// clock only after the grant, builds a request for sending again on
// nack_req, sends the last data frame again on retx_req, and serves a
// pending nack before a new command. Packing a frame of L bytes, with the
// data offered every clock, must take L + 11 clocks from command to want.
module tb_cowb_tx_ctrl;
  import cowb_pkg::*;
  import cowb_tb_pkg::*;

  localparam int DEPTH = MAX_FRAME + 12;
  localparam int AW = $clog2(DEPTH);
  localparam addr_t ME = 16'h0009;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, dat_valid = 0, dat_ready;
  addr_t cmd_da = '0;
  ftype_t cmd_type = T_WRITE;
  len_t cmd_len = '0;
  logic [7:0] dat_data = '0;
  logic nack_req = 0, retx_req = 0;
  addr_t nack_addr = '0;
  logic buf_wr_en;
  logic [AW-1:0] buf_wr_addr, buf_rd_addr;
  logic [7:0] buf_wr_data, buf_rd_data;
  logic want, granted;
  beat_t tx;
  logic ev_nack_sent, ev_retx;
  logic gnt_en = 0;
  always #5 clk = ~clk;

  assign granted = want && gnt_en;

  cowb_tx_ctrl dut (.clk, .rst_n, .local_addr(ME), .cmd_valid, .cmd_ready, .cmd_da,
                    .cmd_type, .cmd_len, .dat_valid, .dat_ready, .dat_data, .nack_req,
                    .nack_addr, .retx_req, .buf_wr_en, .buf_wr_addr, .buf_wr_data,
                    .buf_rd_addr, .buf_rd_data, .want, .granted, .tx, .ev_nack_sent, .ev_retx);
  cowb_tx_buf u_buf (.clk, .wr_en(buf_wr_en), .wr_addr(buf_wr_addr), .wr_data(buf_wr_data),
                     .rd_addr(buf_rd_addr), .rd_data(buf_rd_data));

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

  int n_nack_ev, n_retx_ev, bad_tx;
  always @(posedge clk) if (rst_n) begin
    n_nack_ev += int'(ev_nack_sent);
    n_retx_ev += int'(ev_retx);
    if (tx.valid && !granted) bad_tx++;
  end

  // give a command and its data; return clocks from command accept to want
  task automatic issue(addr_t da, ftype_t t, bq_t d, output int lat);
    int c = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_da = da; cmd_type = t; cmd_len = len_t'(d.size());
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    fork
      begin
        @(negedge clk);
        cmd_valid = 0;
        foreach (d[k]) begin
          dat_valid = 1; dat_data = d[k];
          while (!dat_ready) @(negedge clk);
          @(posedge clk);
          @(negedge clk);
        end
        dat_valid = 0;
      end
      begin
        while (!want) begin @(posedge clk); #1; c++; end
      end
    join
    lat = c;
  endtask

  // grant after a few clocks and collect one frame from the bus
  task automatic collect(output bq_t f);
    f = {};
    while (!want) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(!tx.valid, "nothing sent before the grant");
    gnt_en = 1;
    forever begin
      @(negedge clk);
      if (tx.valid) begin
        if (f.size() == 0) chk(tx.sof, "first byte flagged");
        else chk(!tx.sof, "later bytes not flagged");
        f.push_back(tx.data);
      end else if (f.size() != 0) break;
    end
    gnt_en = 0;
  endtask

  initial begin
    bq_t d, f, exp1;
    int lat;
    @(negedge clk); rst_n = 1;

    d = pattern(20, 1);
    exp1 = build_frame(16'h0003, ME, T_WRITE, d);
    issue(16'h0003, T_WRITE, d, lat);
    chk(lat == 20 + 11, $sformatf("packing took %0d clocks", lat));
    collect(f);
    chk(f == exp1, "data frame");

    @(negedge clk); nack_req = 1; nack_addr = 16'h0007;
    @(negedge clk); nack_req = 0;
    collect(f);
    chk(f == build_frame(16'h0007, ME, T_RESEND, {8'h00}), "request for sending again");
    repeat (2) @(negedge clk);
    chk(n_nack_ev == 1, "nack event");

    @(negedge clk); retx_req = 1;
    @(negedge clk); retx_req = 0;
    collect(f);
    chk(f == exp1, "resent frame is the last data frame");
    repeat (2) @(negedge clk);
    chk(n_retx_ev == 1, "resend event");

    d = pattern(MAX_DATA, 2);
    issue(16'h0004, T_READ, d, lat);
    chk(lat == MAX_DATA + 11, "packing time, maximum length");
    collect(f);
    chk(f == build_frame(16'h0004, ME, T_READ, d), "maximum-length frame");

    // a pending nack goes before a waiting command
    @(negedge clk); nack_req = 1; nack_addr = 16'h0002;
    @(negedge clk); nack_req = 0;
    cmd_valid = 1; cmd_da = 16'h0001; cmd_type = T_WRITE; cmd_len = 1;
    chk(!cmd_ready, "command held while the nack is pending");
    cmd_valid = 0;
    collect(f);
    chk(f == build_frame(16'h0002, ME, T_RESEND, {8'h00}), "nack served first");
    chk(bad_tx == 0, "never sent without grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
