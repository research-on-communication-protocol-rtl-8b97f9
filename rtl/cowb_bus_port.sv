// cowb_bus_port: the COWB interface of a network interface (one bus side).
//
// Each network interface meets a COWB bus through a register: on the receive
// side it samples the bus, on the send side it drives it. The send side of a
// slave interface drives the shared bus only while it holds the grant; when
// en is low the port puts an idle beat (all zeros) on its output, so the
// shared bus can combine ports without conflict. The register stage and the
// idle-when-not-enabled rule are this design's choices; the document only
// names the "MR exclusive" and "SR shared" COWB interfaces.
//
// Timing: one clock from d to q.
module cowb_bus_port
  import cowb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  beat_t d,
  output beat_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= BEAT_IDLE;
    else if (en)  q <= d;
    else          q <= BEAT_IDLE;
  end

endmodule
