// green_arbiter: round-robin arbiter for one dual-ported memory bank.
//
// Up to two of the N requesters are granted per cycle, one per bank port.
// Starting from the requester after the last one served, the first
// requesting index gets port 0 and the next one port 1. The priority pointer
// then moves past the last granted requester, so every requester is served
// within ceil(N/2) cycles while it keeps requesting. Requesters not granted
// must hold their request (the array stalls meanwhile). gnt is one-hot per
// port; port_of tells which port a granted requester uses.
//
// The architecture names an arbiter between the array and the banked
// memory; the round-robin policy and the two grants per cycle (one per
// port) are this design's choices.
module green_arbiter #(
  parameter int unsigned N = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic [N-1:0] port_of
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;
  logic [IW-1:0] last;
  logic          any;

  always_comb begin
    int unsigned n_g;
    gnt = '0; port_of = '0; n_g = 0; last = ptr; any = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (req[idx] && n_g < 2) begin
        gnt[idx]     = 1'b1;
        port_of[idx] = (n_g == 1);
        n_g++;
        last = IW'(idx);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (any) ptr <= (int'(last) == N - 1) ? '0 : last + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $countones(gnt) <= 2);
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
