// cowb_tx_ctrl: sending controller of a COWB network interface.
//
// Packs a frame into the sending buffer: the seven header bytes (DA, SA,
// TYPE, LENGTH), the data bytes taken from the resource, and the four CHECK
// bytes produced by its CRC unit. Once the whole frame is in the buffer it
// asks the request-and-response unit for the bus (want) and, when granted,
// reads the frame out to the bus, one byte per clock, first byte flagged as
// start of frame. This sequence follows the document.
//
// Two requests come from the receiving side, as in the document: nack_req
// (a received frame failed its check) makes the controller build and send a
// request-for-sending-again frame (TYPE 3, one data byte 00) to nack_addr,
// in a separate region of the buffer; retx_req (the other side asked for a
// resend) sends the last data frame again without rebuilding it. Priority,
// this design's choice: request for sending again, then resend, then a new
// frame from the resource. A single pending entry is kept for each; a second
// nack before the first is served replaces its address. A resend request
// that arrives while a new data frame is being packed is ignored, since the
// frame it refers to is being overwritten.
//
// Resource interface: cmd_valid/cmd_ready carry DA, TYPE and LENGTH
// (1..2048); then LENGTH bytes on dat_valid/dat_ready. Bus timing: from grant,
// one byte per clock; want falls on the clock after the last byte.
module cowb_tx_ctrl
  import cowb_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = MAX_FRAME + 12,
  localparam int unsigned AW       = $clog2(BUF_DEPTH),
  localparam int unsigned CTRL_BASE = MAX_FRAME
)(
  input  logic          clk,
  input  logic          rst_n,
  input  addr_t         local_addr,
  // resource side
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  addr_t         cmd_da,
  input  ftype_t        cmd_type,
  input  len_t          cmd_len,
  input  logic          dat_valid,
  output logic          dat_ready,
  input  logic [7:0]    dat_data,
  // receiving controller
  input  logic          nack_req,
  input  addr_t         nack_addr,
  input  logic          retx_req,
  // sending buffer
  output logic          buf_wr_en,
  output logic [AW-1:0] buf_wr_addr,
  output logic [7:0]    buf_wr_data,
  output logic [AW-1:0] buf_rd_addr,
  input  logic [7:0]    buf_rd_data,
  // request and response
  output logic          want,
  input  logic          granted,
  // bus
  output beat_t         tx,
  // events
  output logic          ev_nack_sent,
  output logic          ev_retx
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA, S_CRC, S_REQ, S_SEND} state_t;
  state_t state;

  logic          slot;        // 0: data frame region, 1: control frame region
  addr_t         f_da;
  ftype_t        f_type;
  len_t          f_len;
  len_t          cnt;
  logic [AW-1:0] total;       // bytes of the frame being sent
  logic [AW-1:0] last_total;  // bytes of the frame held in region 0
  logic          have_last;
  logic          pend_nack, pend_retx;
  logic          done;
  addr_t         pend_addr;

  wire [AW-1:0] base = slot ? AW'(CTRL_BASE) : '0;

  // header byte i
  logic [7:0] hdr_byte;
  always_comb begin
    unique case (cnt[2:0])
      3'd0: hdr_byte = f_da[15:8];
      3'd1: hdr_byte = f_da[7:0];
      3'd2: hdr_byte = local_addr[15:8];
      3'd3: hdr_byte = local_addr[7:0];
      3'd4: hdr_byte = f_type;
      3'd5: hdr_byte = f_len[15:8];
      default: hdr_byte = f_len[7:0];
    endcase
  end

  // CRC over header and data bytes as they are written
  logic        crc_en, crc_start;
  logic [7:0]  crc_d;
  logic [31:0] crc_q, crc_check;
  cowb_crc32 u_crc (
    .clk, .rst_n,
    .en    (crc_en),
    .start (crc_start),
    .d     (crc_d),
    .crc   (crc_q),
    .check (crc_check)
  );

  wire accept_cmd = (state == S_IDLE) && !pend_nack && !(pend_retx && have_last) && cmd_valid;
  wire data_byte  = (state == S_DATA) && (slot || dat_valid);

  assign cmd_ready = (state == S_IDLE) && !pend_nack && !(pend_retx && have_last);
  assign dat_ready = (state == S_DATA) && !slot;

  always_comb begin
    buf_wr_en   = 1'b0;
    buf_wr_addr = base + AW'(cnt);
    buf_wr_data = hdr_byte;
    crc_en      = 1'b0;
    crc_start   = 1'b0;
    crc_d       = hdr_byte;
    unique case (state)
      S_HDR: begin
        buf_wr_en = 1'b1;
        crc_en    = 1'b1;
        crc_start = (cnt == '0);
      end
      S_DATA: begin
        buf_wr_addr = base + AW'(HDR_BYTES) + AW'(cnt);
        buf_wr_data = slot ? 8'h00 : dat_data;
        crc_d       = buf_wr_data;
        buf_wr_en   = data_byte;
        crc_en      = data_byte;
      end
      S_CRC: begin
        buf_wr_addr = base + AW'(HDR_BYTES) + AW'(f_len) + AW'(cnt);
        buf_wr_data = crc_check[31 - 8*cnt[1:0] -: 8];
        buf_wr_en   = 1'b1;
      end
      default: ;
    endcase
  end

  assign want        = (state == S_REQ) || (state == S_SEND);
  assign buf_rd_addr = base + AW'(cnt);
  assign done        = (state == S_SEND) && (AW'(cnt) == total - 1'b1);

  always_comb begin
    tx = BEAT_IDLE;
    if (state == S_SEND) begin
      tx.valid = 1'b1;
      tx.sof   = (cnt == '0);
      tx.data  = buf_rd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      slot         <= 1'b0;
      f_da         <= '0;
      f_type       <= T_WRITE;
      f_len        <= '0;
      cnt          <= '0;
      total        <= '0;
      last_total   <= '0;
      have_last    <= 1'b0;
      pend_nack    <= 1'b0;
      pend_retx    <= 1'b0;
      pend_addr    <= '0;
      ev_nack_sent <= 1'b0;
      ev_retx      <= 1'b0;
    end else begin
      ev_nack_sent <= 1'b0;
      ev_retx      <= 1'b0;
      if (nack_req) begin
        pend_nack <= 1'b1;
        pend_addr <= nack_addr;
      end
      if (retx_req && !(state inside {S_HDR, S_DATA, S_CRC} && !slot))
        pend_retx <= 1'b1;

      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (pend_nack) begin
            pend_nack <= nack_req;          // a nack arriving now stays pending
            slot      <= 1'b1;
            f_da      <= pend_addr;
            f_type    <= T_RESEND;
            f_len     <= len_t'(1);
            state     <= S_HDR;
          end else if (pend_retx && have_last) begin
            pend_retx <= retx_req;
            slot      <= 1'b0;
            total     <= last_total;
            ev_retx   <= 1'b1;
            state     <= S_REQ;
          end else if (accept_cmd) begin
            pend_retx <= 1'b0;
            have_last <= 1'b0;
            slot      <= 1'b0;
            f_da      <= cmd_da;
            f_type    <= cmd_type;
            f_len     <= cmd_len;
            state     <= S_HDR;
          end
        end
        S_HDR: begin
          if (cnt == len_t'(HDR_BYTES - 1)) begin
            cnt   <= '0;
            state <= S_DATA;
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: if (data_byte) begin
          if (cnt == f_len - 1'b1) begin
            cnt   <= '0;
            state <= S_CRC;
          end else cnt <= cnt + 1'b1;
        end
        S_CRC: begin
          if (cnt == len_t'(CRC_BYTES - 1)) begin
            cnt   <= '0;
            total <= AW'(HDR_BYTES + CRC_BYTES) + AW'(f_len);
            if (!slot) begin
              last_total <= AW'(HDR_BYTES + CRC_BYTES) + AW'(f_len);
              have_last  <= 1'b1;
            end
            state <= S_REQ;
          end else cnt <= cnt + 1'b1;
        end
        S_REQ: if (granted) state <= S_SEND;
        S_SEND: begin
          if (done) begin
            cnt          <= '0;
            ev_nack_sent <= slot;
            state        <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    accept_cmd |-> (cmd_len != '0 && cmd_len <= len_t'(MAX_DATA)));

endmodule
