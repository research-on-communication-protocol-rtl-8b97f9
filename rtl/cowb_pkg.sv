// cowb_pkg: types and constants shared by the Chip-Only-Writing Bus (COWB).
//
// A COWB frame is DA(2) SA(2) TYPE(1) LENGTH(2) DATA(1..2048) CHECK(4) bytes,
// the field sizes and the data range being those of the protocol definition.
// This implementation's own choices: the buses carry one byte per clock,
// multi-byte fields are sent most significant byte first, the TYPE codes
// below, and the CHECK field is the CRC-32 of IEEE 802.3 (reflected
// polynomial 0xEDB88320, preset all ones, final inversion) over DA..DATA.
package cowb_pkg;

  localparam int unsigned ADDR_W   = 16;     // DA / SA width (2 bytes)
  localparam int unsigned LEN_W    = 16;     // LENGTH field width (2 bytes)
  localparam int unsigned HDR_BYTES = 7;     // DA + SA + TYPE + LENGTH
  localparam int unsigned CRC_BYTES = 4;
  localparam int unsigned MAX_DATA  = 2048;  // largest DATA field
  localparam int unsigned MAX_FRAME = HDR_BYTES + MAX_DATA + CRC_BYTES;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  len_t;

  // TYPE field: write data, read command, request for sending again.
  typedef enum logic [7:0] {
    T_WRITE  = 8'h01,
    T_READ   = 8'h02,
    T_RESEND = 8'h03
  } ftype_t;

  // One clock of a COWB bus: a byte, its valid flag and a start-of-frame
  // flag that is set on the first DA byte.
  typedef struct packed {
    logic       valid;
    logic       sof;
    logic [7:0] data;
  } beat_t;

  localparam beat_t BEAT_IDLE = '{valid: 1'b0, sof: 1'b0, data: 8'h00};

  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // One byte step of the reflected CRC-32.
  function automatic logic [31:0] crc32_step(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

endpackage
