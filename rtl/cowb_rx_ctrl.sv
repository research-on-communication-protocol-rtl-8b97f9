// cowb_rx_ctrl: receiving controller of a COWB network interface.
//
// Follows every frame on the bus it listens to. After the two DA bytes it
// compares the destination with the local address: a frame for another
// resource is abandoned (ev_drop) and the controller waits for the next
// start of frame. A frame for this resource is received to the end: its data
// bytes go to the reception buffer while the CRC unit folds in DA..DATA, and
// the four CHECK bytes are compared with the computed value. On agreement the
// frame is committed (ev_frame_ok); a request for sending again (TYPE 3) is
// not stored but raises retx_req for the sending controller. On disagreement,
// an out-of-range LENGTH, or a full buffer, the frame is aborted and nack_req
// asks the sending controller to send a request for sending again to the
// frame's SA. These steps follow the document; the start-of-frame flag, the
// handling of a bad LENGTH and of buffer overflow are this design's choices.
//
// Input bus: one beat_t per clock (valid, sof, byte). Outputs to the buffer
// and to the sending controller are single-clock pulses issued on the clock
// that takes the last CHECK byte.
module cowb_rx_ctrl
  import cowb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      local_addr,
  input  beat_t      bus,
  // reception buffer
  output logic       wr_en,
  output logic [7:0] wr_data,
  output logic       commit,
  output logic       abort,
  output addr_t      c_sa,
  output ftype_t     c_type,
  output len_t       c_len,
  input  logic       ovf,
  // sending controller
  output logic       nack_req,
  output addr_t      nack_addr,
  output logic       retx_req,
  // events
  output logic       ev_drop,
  output logic       ev_crc_err,
  output logic       ev_overflow,
  output logic       ev_frame_ok
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA, S_CHK} state_t;
  state_t      state;
  logic [2:0]  hcnt;        // header byte index 1..6 (byte 0 carries sof)
  len_t        dcnt;        // data / check byte index
  logic [7:0]  da_hi, len_hi;
  addr_t       sa;
  logic [7:0]  ftype_raw;
  len_t        len;
  logic [23:0] chk_sr;

  logic [31:0] crc_q, crc_check;
  wire  take     = bus.valid;
  wire  crc_en   = take && (bus.sof || state == S_HDR || state == S_DATA);

  cowb_crc32 u_crc (
    .clk, .rst_n,
    .en    (crc_en),
    .start (bus.sof),
    .d     (bus.data),
    .crc   (crc_q),
    .check (crc_check)
  );

  wire is_resend = (ftype_raw == T_RESEND);
  wire last_chk  = take && !bus.sof && state == S_CHK && dcnt == len_t'(CRC_BYTES - 1);
  wire crc_good  = ({chk_sr, bus.data} == crc_check);

  assign wr_en   = take && !bus.sof && state == S_DATA && !is_resend;
  assign wr_data = bus.data;
  assign c_sa    = sa;
  assign c_type  = ftype_t'(ftype_raw);
  assign c_len   = len;
  assign nack_addr = sa;

  // a new sof in the middle of an own frame cuts it short
  wire cut       = take && bus.sof && (state == S_DATA || state == S_CHK ||
                                       (state == S_HDR && hcnt >= 3'd2));
  wire len_bad   = take && !bus.sof && state == S_HDR && hcnt == 3'd6 &&
                   ({len_hi, bus.data} == '0 || {len_hi, bus.data} > len_t'(MAX_DATA));

  always_comb begin
    commit      = 1'b0;
    abort       = cut;
    nack_req    = 1'b0;
    retx_req    = 1'b0;
    ev_crc_err  = 1'b0;
    ev_overflow = 1'b0;
    ev_frame_ok = 1'b0;
    if (len_bad) begin
      nack_req   = 1'b1;
      ev_crc_err = 1'b1;
    end
    if (last_chk) begin
      if (!crc_good) begin
        abort      = 1'b1;
        nack_req   = 1'b1;
        ev_crc_err = 1'b1;
      end else if (is_resend) begin
        retx_req    = 1'b1;
        ev_frame_ok = 1'b1;
      end else if (ovf) begin
        abort       = 1'b1;
        nack_req    = 1'b1;
        ev_overflow = 1'b1;
      end else begin
        commit      = 1'b1;
        ev_frame_ok = 1'b1;
      end
    end
  end

  assign ev_drop = take && !bus.sof && state == S_HDR && hcnt == 3'd1 &&
                   {da_hi, bus.data} != local_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hcnt      <= '0;
      dcnt      <= '0;
      da_hi     <= '0;
      len_hi    <= '0;
      sa        <= '0;
      ftype_raw <= '0;
      len       <= '0;
      chk_sr    <= '0;
    end else if (take) begin
      if (bus.sof) begin
        state <= S_HDR;
        hcnt  <= 3'd1;
        da_hi <= bus.data;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_HDR: begin
            hcnt <= hcnt + 1'b1;
            unique case (hcnt)
              3'd1: if ({da_hi, bus.data} != local_addr) state <= S_IDLE;
              3'd2: sa[15:8]  <= bus.data;
              3'd3: sa[7:0]   <= bus.data;
              3'd4: ftype_raw <= bus.data;
              3'd5: len_hi    <= bus.data;
              3'd6: begin
                len   <= {len_hi, bus.data};
                dcnt  <= '0;
                state <= len_bad ? S_IDLE : S_DATA;
              end
              default: state <= S_IDLE;
            endcase
          end
          S_DATA: begin
            if (dcnt == len - 1'b1) begin
              dcnt  <= '0;
              state <= S_CHK;
            end else begin
              dcnt <= dcnt + 1'b1;
            end
          end
          S_CHK: begin
            chk_sr <= {chk_sr[15:0], bus.data};
            dcnt   <= dcnt + 1'b1;
            if (last_chk) state <= S_IDLE;
          end
        endcase
      end
    end
  end

endmodule
