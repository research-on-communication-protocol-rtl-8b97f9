// cowb_req_resp: request-and-response unit of a COWB network interface.
//
// When the sending controller has a complete frame in its buffer it raises
// want. On the shared bus (NEED_ARB = 1, slave interfaces) this unit raises
// its own request wire to the arbitration module and reports granted once
// the response comes back; it keeps the request up until the controller
// drops want after the last byte, which is the release. On the exclusive bus
// of the main interface (NEED_ARB = 0) there is no one to ask and want is
// granted at once. The request/response wires follow the document; the
// level-held request that doubles as release is this design's choice.
//
// Timing (NEED_ARB = 1): bus_req rises one clock after want, granted follows
// bus_gnt combinationally once the request is up, bus_req falls one clock
// after want falls.
module cowb_req_resp #(
  parameter bit NEED_ARB = 1'b1
)(
  input  logic clk,
  input  logic rst_n,
  input  logic want,
  output logic granted,
  output logic bus_req,
  input  logic bus_gnt
);

  if (NEED_ARB) begin : g_arb
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) bus_req <= 1'b0;
      else        bus_req <= want;
    end
    assign granted = want && bus_req && bus_gnt;

    a_gnt_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
      granted |-> bus_req);
  end else begin : g_excl
    assign bus_req = 1'b0;
    assign granted = want;
  end

endmodule
