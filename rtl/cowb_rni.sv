// cowb_rni: resource network interface of the Chip-Only-Writing Bus.
//
// One module serves both ends of the COWB, as in the document, where the
// main and slave interfaces share their inner structure and differ only in
// the buses they use:
//   IS_MR = 0 (SRNI): receives on the MR exclusive bus, sends on the SR
//                     shared bus after asking the arbitration module;
//   IS_MR = 1 (MRNI): receives on the SR shared bus, sends on the MR
//                     exclusive bus, which needs no arbitration.
// Inside: receive port -> receiving controller (address filter, CRC check)
// -> reception buffer -> resource; resource -> sending controller (packing,
// CRC) -> sending buffer -> send port, with the request-and-response unit
// between the sending controller and the arbitration module. A CRC failure
// makes the receiving controller ask the sending controller for a request
// for sending again; a received request for sending again makes it resend
// its last data frame. That is the document's structure (its figure of the
// resource network interface); widths, handshakes and sizes are this
// design's.
//
// Resource side (the document's SRI): a command (DA, TYPE, LENGTH) and its
// data bytes on valid/ready streams to send; received frames come out as a
// valid/ready byte stream with SA, TYPE, LENGTH and a last flag. Event
// outputs pulse for one clock.
// Latency: a frame of L data bytes is packed in L + 11 clocks, then sent in
// L + 11 clocks once granted; it leaves the port one clock after leaving the
// sending controller and enters the peer's controller one clock later.
module cowb_rni
  import cowb_pkg::*;
#(
  parameter bit          IS_MR       = 1'b0,
  parameter int unsigned RXBUF_DEPTH = 4096
)(
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      local_addr,
  // COWB buses
  input  beat_t      bus_rx,
  output beat_t      bus_tx,
  output logic       bus_req,
  input  logic       bus_gnt,
  // resource: send
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  addr_t      cmd_da,
  input  ftype_t     cmd_type,
  input  len_t       cmd_len,
  input  logic       dat_valid,
  output logic       dat_ready,
  input  logic [7:0] dat_data,
  // resource: receive
  output logic       rx_valid,
  input  logic       rx_ready,
  output logic [7:0] rx_data,
  output logic       rx_last,
  output addr_t      rx_sa,
  output ftype_t     rx_type,
  output len_t       rx_len,
  // events
  output logic       ev_drop,
  output logic       ev_crc_err,
  output logic       ev_overflow,
  output logic       ev_frame_ok,
  output logic       ev_nack_sent,
  output logic       ev_retx
);

  localparam int unsigned TXBUF_DEPTH = MAX_FRAME + 12;
  localparam int unsigned TAW         = $clog2(TXBUF_DEPTH);

  // ---------------- receive path ----------------
  beat_t rx_q;
  cowb_bus_port u_rx_port (.clk, .rst_n, .en(1'b1), .d(bus_rx), .q(rx_q));

  logic       wr_en, commit, abort, ovf;
  logic [7:0] wr_data;
  addr_t      c_sa;
  ftype_t     c_type;
  len_t       c_len;
  logic       nack_req, retx_req;
  addr_t      nack_addr;

  cowb_rx_ctrl u_rx_ctrl (
    .clk, .rst_n, .local_addr,
    .bus (rx_q),
    .wr_en, .wr_data, .commit, .abort, .c_sa, .c_type, .c_len, .ovf,
    .nack_req, .nack_addr, .retx_req,
    .ev_drop, .ev_crc_err, .ev_overflow, .ev_frame_ok
  );

  cowb_rx_buf #(.DEPTH(RXBUF_DEPTH)) u_rx_buf (
    .clk, .rst_n,
    .wr_en, .wr_data, .commit, .abort, .c_sa, .c_type, .c_len, .ovf,
    .rd_valid (rx_valid), .rd_ready (rx_ready), .rd_data (rx_data),
    .rd_last (rx_last), .rd_sa (rx_sa), .rd_type (rx_type), .rd_len (rx_len)
  );

  // ---------------- send path ----------------
  logic           buf_wr_en;
  logic [TAW-1:0] buf_wr_addr, buf_rd_addr;
  logic [7:0]     buf_wr_data, buf_rd_data;
  logic           want, granted;
  beat_t          tx_d;

  cowb_tx_ctrl #(.BUF_DEPTH(TXBUF_DEPTH)) u_tx_ctrl (
    .clk, .rst_n, .local_addr,
    .cmd_valid, .cmd_ready, .cmd_da, .cmd_type, .cmd_len,
    .dat_valid, .dat_ready, .dat_data,
    .nack_req, .nack_addr, .retx_req,
    .buf_wr_en, .buf_wr_addr, .buf_wr_data, .buf_rd_addr, .buf_rd_data,
    .want, .granted,
    .tx (tx_d),
    .ev_nack_sent, .ev_retx
  );

  cowb_tx_buf #(.DEPTH(TXBUF_DEPTH)) u_tx_buf (
    .clk,
    .wr_en (buf_wr_en), .wr_addr (buf_wr_addr), .wr_data (buf_wr_data),
    .rd_addr (buf_rd_addr), .rd_data (buf_rd_data)
  );

  cowb_req_resp #(.NEED_ARB(!IS_MR)) u_req_resp (
    .clk, .rst_n, .want, .granted, .bus_req, .bus_gnt
  );

  cowb_bus_port u_tx_port (.clk, .rst_n, .en(granted), .d(tx_d), .q(bus_tx));

endmodule
