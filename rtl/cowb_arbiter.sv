// cowb_arbiter: arbitration module of the COWB shared bus.
//
// Each slave interface has its own request wire. Requests are served in the
// order they arrive: a new request joins the tail of a queue, the head of the
// queue holds the grant until its request falls, then the next entry is
// granted. First come, first served is the document's rule; requests that
// arrive on the same clock are queued lowest index first (this design's
// choice). gnt is one-hot and registered (it comes from the queue head);
// gnt_valid says some requester holds the bus.
module cowb_arbiter #(
  parameter int unsigned N = 2
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         gnt_valid
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic [IW-1:0] q [N];
  logic [CW-1:0] count;
  logic [N-1:0]  queued;

  logic [IW-1:0] q_n [N];
  logic [CW-1:0] count_n;
  logic [N-1:0]  queued_n;

  always_comb begin
    q_n      = q;
    count_n  = count;
    queued_n = queued;
    // release by the head
    if (count != '0 && !req[q[0]]) begin
      queued_n[q[0]] = 1'b0;
      for (int i = 0; i < N - 1; i++) q_n[i] = q[i+1];
      q_n[N-1] = '0;
      count_n  = count - 1'b1;
    end
    // arrivals, lowest index first
    for (int r = 0; r < N; r++) begin
      if (req[r] && !queued[r]) begin
        q_n[count_n[IW-1:0]] = IW'(r);
        queued_n[r]          = 1'b1;
        count_n              = count_n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
      count  <= '0;
      queued <= '0;
    end else begin
      q      <= q_n;
      count  <= count_n;
      queued <= queued_n;
    end
  end

  always_comb begin
    gnt = '0;
    if (count != '0) gnt[q[0]] = 1'b1;
  end
  assign gnt_valid = (count != '0);

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
