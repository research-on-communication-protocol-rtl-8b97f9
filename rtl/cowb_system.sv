// cowb_system: a Chip-Only-Writing Bus (COWB) resource system.
//
// One main resource (MR) and N_SR slave resources (SR) talk over two
// one-way buses. The MR exclusive bus is written only by the main network
// interface (MRNI) and read by every slave interface (SRNI), which keeps the
// frames addressed to it and abandons the rest. The SR shared bus is written
// by one SRNI at a time, chosen first come first served by the arbitration
// module, and read by the MRNI. Because the two buses are separate, the MR
// can send to one SR while another SR sends to the MR. This is the structure
// of the document; the resources themselves (a processor on the MR side,
// memory and serial controllers on the SR side) are outside this module and
// connect through the resource ports brought out here.
//
// Addresses: the MRNI has MR_ADDR, SRNI i has SR_ADDR0 + i (this design's
// choice; the document says each SR is given an address). mr_bus and sr_bus
// show the two buses for observation.
module cowb_system
  import cowb_pkg::*;
#(
  parameter int unsigned N_SR        = 2,
  parameter int unsigned RXBUF_DEPTH = 4096,
  parameter addr_t       MR_ADDR     = 16'h0000,
  parameter addr_t       SR_ADDR0    = 16'h0001
)(
  input  logic       clk,
  input  logic       rst_n,
  // main resource: send
  input  logic       mr_cmd_valid,
  output logic       mr_cmd_ready,
  input  addr_t      mr_cmd_da,
  input  ftype_t     mr_cmd_type,
  input  len_t       mr_cmd_len,
  input  logic       mr_dat_valid,
  output logic       mr_dat_ready,
  input  logic [7:0] mr_dat_data,
  // main resource: receive
  output logic       mr_rx_valid,
  input  logic       mr_rx_ready,
  output logic [7:0] mr_rx_data,
  output logic       mr_rx_last,
  output addr_t      mr_rx_sa,
  output ftype_t     mr_rx_type,
  output len_t       mr_rx_len,
  // slave resources: send
  input  logic       sr_cmd_valid [N_SR],
  output logic       sr_cmd_ready [N_SR],
  input  addr_t      sr_cmd_da    [N_SR],
  input  ftype_t     sr_cmd_type  [N_SR],
  input  len_t       sr_cmd_len   [N_SR],
  input  logic       sr_dat_valid [N_SR],
  output logic       sr_dat_ready [N_SR],
  input  logic [7:0] sr_dat_data  [N_SR],
  // slave resources: receive
  output logic       sr_rx_valid [N_SR],
  input  logic       sr_rx_ready [N_SR],
  output logic [7:0] sr_rx_data  [N_SR],
  output logic       sr_rx_last  [N_SR],
  output addr_t      sr_rx_sa    [N_SR],
  output ftype_t     sr_rx_type  [N_SR],
  output len_t       sr_rx_len   [N_SR],
  // observation: buses and events, index N_SR is the MRNI
  output beat_t      mr_bus,
  output beat_t      sr_bus,
  output logic [N_SR-1:0] sr_gnt,
  output logic [N_SR:0]   ev_drop,
  output logic [N_SR:0]   ev_crc_err,
  output logic [N_SR:0]   ev_overflow,
  output logic [N_SR:0]   ev_frame_ok,
  output logic [N_SR:0]   ev_nack_sent,
  output logic [N_SR:0]   ev_retx
);

  beat_t         sr_port [N_SR];
  logic [N_SR-1:0] sr_req;
  logic          gnt_valid;
  logic          mr_bus_req_unused;

  cowb_rni #(.IS_MR(1'b1), .RXBUF_DEPTH(RXBUF_DEPTH)) u_mrni (
    .clk, .rst_n,
    .local_addr (MR_ADDR),
    .bus_rx (sr_bus), .bus_tx (mr_bus),
    .bus_req (mr_bus_req_unused), .bus_gnt (1'b1),
    .cmd_valid (mr_cmd_valid), .cmd_ready (mr_cmd_ready), .cmd_da (mr_cmd_da),
    .cmd_type (mr_cmd_type), .cmd_len (mr_cmd_len),
    .dat_valid (mr_dat_valid), .dat_ready (mr_dat_ready), .dat_data (mr_dat_data),
    .rx_valid (mr_rx_valid), .rx_ready (mr_rx_ready), .rx_data (mr_rx_data),
    .rx_last (mr_rx_last), .rx_sa (mr_rx_sa), .rx_type (mr_rx_type), .rx_len (mr_rx_len),
    .ev_drop (ev_drop[N_SR]), .ev_crc_err (ev_crc_err[N_SR]),
    .ev_overflow (ev_overflow[N_SR]), .ev_frame_ok (ev_frame_ok[N_SR]),
    .ev_nack_sent (ev_nack_sent[N_SR]), .ev_retx (ev_retx[N_SR])
  );

  for (genvar i = 0; i < N_SR; i++) begin : g_sr
    cowb_rni #(.IS_MR(1'b0), .RXBUF_DEPTH(RXBUF_DEPTH)) u_srni (
      .clk, .rst_n,
      .local_addr (SR_ADDR0 + addr_t'(i)),
      .bus_rx (mr_bus), .bus_tx (sr_port[i]),
      .bus_req (sr_req[i]), .bus_gnt (sr_gnt[i]),
      .cmd_valid (sr_cmd_valid[i]), .cmd_ready (sr_cmd_ready[i]), .cmd_da (sr_cmd_da[i]),
      .cmd_type (sr_cmd_type[i]), .cmd_len (sr_cmd_len[i]),
      .dat_valid (sr_dat_valid[i]), .dat_ready (sr_dat_ready[i]), .dat_data (sr_dat_data[i]),
      .rx_valid (sr_rx_valid[i]), .rx_ready (sr_rx_ready[i]), .rx_data (sr_rx_data[i]),
      .rx_last (sr_rx_last[i]), .rx_sa (sr_rx_sa[i]), .rx_type (sr_rx_type[i]), .rx_len (sr_rx_len[i]),
      .ev_drop (ev_drop[i]), .ev_crc_err (ev_crc_err[i]),
      .ev_overflow (ev_overflow[i]), .ev_frame_ok (ev_frame_ok[i]),
      .ev_nack_sent (ev_nack_sent[i]), .ev_retx (ev_retx[i])
    );
  end

  cowb_arbiter #(.N(N_SR)) u_arb (
    .clk, .rst_n, .req (sr_req), .gnt (sr_gnt), .gnt_valid
  );

  cowb_shared_bus #(.N(N_SR)) u_sr_bus (
    .clk, .rst_n, .port (sr_port), .gnt (sr_gnt), .bus (sr_bus)
  );

endmodule
