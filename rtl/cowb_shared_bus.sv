// cowb_shared_bus: the SR shared bus of the COWB.
//
// All slave interfaces can write to this bus, and the main interface reads
// it. Only the interface holding the arbiter's grant may drive it; the others
// present idle beats, so the bus is the OR of all ports (a wired-OR bus in
// logic form). An assertion checks that no port other than the granted one
// ever puts a valid beat on the bus, which is the rule the arbitration
// module exists to keep. Purely combinational.
module cowb_shared_bus
  import cowb_pkg::*;
#(
  parameter int unsigned N = 2
)(
  input  logic         clk,
  input  logic         rst_n,
  input  beat_t        port [N],
  input  logic [N-1:0] gnt,
  output beat_t        bus
);

  always_comb begin
    bus = BEAT_IDLE;
    for (int i = 0; i < N; i++) bus = bus | port[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    a_only_granted_drives: assert property (@(posedge clk) disable iff (!rst_n)
      port[i].valid |-> gnt[i]);
  end

endmodule
