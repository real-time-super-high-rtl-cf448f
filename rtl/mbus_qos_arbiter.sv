// mbus_qos_arbiter: quality-of-service arbiter of the memory bus (MBUS)
// that carries inter-chip image exchange and local traffic.
//
// Every master has a static priority class (prio, 0 lowest .. 3 highest,
// e.g. highest for the pre-filter boundary rows the neighbouring chip needs
// before its deblocking, lower for the 128-row reference exchange that only
// has to finish within the picture).  A master whose buffer runs close to
// underrun (level <= lo_th) or overrun (level >= hi_th) is raised
// temporarily above every static class (dynamic QoS).  The highest
// effective priority wins; equal priorities are served round-robin.  One
// grant per cycle, combinational from the requests; the round-robin pointer
// moves after each grant.  Static plus dynamic priority follows the
// document; levels, thresholds and the tie rule are this design's choice.
module mbus_qos_arbiter #(
  parameter int unsigned N  = 4,
  parameter int unsigned LW = 8          // buffer level width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [1:0]    prio  [N],
  input  logic [LW-1:0] level [N],
  input  logic [LW-1:0] lo_th [N],
  input  logic [LW-1:0] hi_th [N],
  output logic [N-1:0]  gnt,
  output logic [N-1:0]  boosted
);
  logic [$clog2(N)-1:0] rr;
  int win;
  always_comb begin
    int best;
    best = -1; win = 0;
    for (int i = 0; i < N; i++)
      boosted[i] = req[i] && (level[i] <= lo_th[i] || level[i] >= hi_th[i]);
    for (int n = 0; n < N; n++) begin
      int c, p;
      c = (int'(rr) + n) % N;
      p = boosted[c] ? 4 : int'(prio[c]);
      if (req[c] && p > best) begin best = p; win = c; end
    end
    gnt = '0;
    if (best >= 0) gnt[win] = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (|req) rr <= ($clog2(N))'((win + 1) % N);
  end
endmodule
