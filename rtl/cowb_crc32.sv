// cowb_crc32: running CRC-32 of a COWB frame, one byte per clock.
//
// The CHECK field of a COWB frame is a CRC (4 bytes); the polynomial is this
// design's choice: the IEEE 802.3 CRC-32 (reflected 0xEDB88320, preset all
// ones, result inverted). The same unit serves the receiving controller
// (recompute and compare) and the sending controller (generate).
//
// Interface: with en high the byte d is folded into the register; with start
// also high the register restarts from the preset before folding d in, so
// start marks the first byte of a frame. crc is the raw register, check the
// inverted value that goes into (or is compared with) the CHECK field.
// Timing: crc/check reflect all bytes accepted up to the previous edge.
module cowb_crc32
  import cowb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  logic [7:0]  d,
  output logic [31:0] crc,
  output logic [31:0] check
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= CRC_INIT;
    else if (en)     crc <= crc32_step(start ? CRC_INIT : crc, d);
  end

  assign check = ~crc;

endmodule
