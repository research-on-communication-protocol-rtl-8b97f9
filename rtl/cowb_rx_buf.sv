// cowb_rx_buf: reception buffer of a COWB network interface.
//
// The receiving controller writes the data field of an accepted frame here
// while the CRC is still being computed; only when the frame's check field
// agrees is the frame committed and made visible to the resource. A frame
// that fails is aborted: the write pointer returns to the last commit point,
// so no byte of a bad frame ever reaches the resource. This commit/abort
// scheme, the sizes and the overflow rule are this design's choices; the
// document says only that data is stored in the reception buffer and passed
// on when the CRC is correct.
//
// Write side: wr_en/wr_data append a byte to the open frame. If the buffer is
// full the byte is dropped and ovf is set until the next commit or abort.
// commit (with the frame's SA, TYPE and LENGTH) closes the frame; ovf also
// reports that the descriptor queue has no room, and the controller must
// abort rather than commit when ovf is high. Read side: a valid/ready byte
// stream with last on the final byte of each frame and the frame's SA, TYPE
// and LENGTH alongside. Read is asynchronous from the array.
module cowb_rx_buf
  import cowb_pkg::*;
#(
  parameter int unsigned DEPTH      = 4096,  // bytes, power of two
  parameter int unsigned DESC_DEPTH = 4      // committed frames, power of two
)(
  input  logic       clk,
  input  logic       rst_n,
  // from the receiving controller
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic       commit,
  input  logic       abort,
  input  addr_t      c_sa,
  input  ftype_t     c_type,
  input  len_t       c_len,
  output logic       ovf,
  // to the resource
  output logic       rd_valid,
  input  logic       rd_ready,
  output logic [7:0] rd_data,
  output logic       rd_last,
  output addr_t      rd_sa,
  output ftype_t     rd_type,
  output len_t       rd_len
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned DW = $clog2(DESC_DEPTH);

  typedef struct packed {
    addr_t  sa;
    ftype_t ftype;
    len_t   len;
  } desc_t;

  logic [7:0] mem [DEPTH];
  desc_t      dq  [DESC_DEPTH];

  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic [DW:0] dq_wr, dq_rd;
  len_t        rd_cnt;
  logic        data_ovf;

  wire  [AW:0] used    = wr_ptr - rd_ptr;
  wire         full    = (used == (AW+1)'(DEPTH));
  wire  [DW:0] dq_used = dq_wr - dq_rd;
  wire         dq_full = (dq_used == (DW+1)'(DESC_DEPTH));
  wire         dq_empty = (dq_wr == dq_rd);

  assign ovf = data_ovf | dq_full;

  always_ff @(posedge clk)
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk)
    if (commit && !ovf) dq[dq_wr[DW-1:0]] <= '{sa: c_sa, ftype: c_type, len: c_len};

  // read side
  desc_t head;
  assign head     = dq[dq_rd[DW-1:0]];
  assign rd_valid = !dq_empty;
  assign rd_data  = mem[rd_ptr[AW-1:0]];
  assign rd_last  = (rd_cnt == head.len - 1'b1);
  assign rd_sa    = head.sa;
  assign rd_type  = head.ftype;
  assign rd_len   = head.len;

  wire rd_fire = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      commit_ptr <= '0;
      rd_ptr     <= '0;
      dq_wr      <= '0;
      dq_rd      <= '0;
      rd_cnt     <= '0;
      data_ovf   <= 1'b0;
    end else begin
      if (abort || (commit && ovf)) begin
        wr_ptr   <= commit_ptr;
        data_ovf <= 1'b0;
      end else if (commit) begin
        commit_ptr <= wr_ptr;
        dq_wr      <= dq_wr + 1'b1;
        data_ovf   <= 1'b0;
      end else if (wr_en) begin
        if (full) data_ovf <= 1'b1;
        else      wr_ptr   <= wr_ptr + 1'b1;
      end

      if (rd_fire) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (rd_last) begin
          rd_cnt <= '0;
          dq_rd  <= dq_rd + 1'b1;
        end else begin
          rd_cnt <= rd_cnt + 1'b1;
        end
      end
    end
  end

  // The resource can only read committed bytes.
  a_no_read_past_commit: assert property (@(posedge clk) disable iff (!rst_n)
    rd_fire |-> (rd_ptr != commit_ptr));

endmodule
