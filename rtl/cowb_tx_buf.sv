// cowb_tx_buf: sending buffer of a COWB network interface.
//
// Holds a packed frame (header, data, CRC) written by the sending controller
// and read back, byte by byte, when the bus is granted. The frame stays in the
// buffer after it has been sent, so that it can be sent again when the
// receiver asks for it. The region from CTRL_BASE up holds a short control
// frame (a request for sending again) so that building one does not destroy
// the last data frame. Write is synchronous, read is asynchronous.
// DEPTH = one largest frame (2059 bytes) plus 12 bytes for the control frame.
module cowb_tx_buf
  import cowb_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_FRAME + 12,
  localparam int unsigned AW   = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];

endmodule
