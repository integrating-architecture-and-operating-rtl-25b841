// rr_arbiter: round-robin choice among N simultaneous requests.
//
// The Processor Interface serves processors' calls, and the shared memory
// bus serves its masters, in round-robin order: the search for a request
// starts just after the requester that was granted last. The document names
// round robin as one strategy the PI may use; the arbiter itself is this
// design's own.
//
// Interface: req[N] in; gnt[N] out, one-hot or zero, combinational from req
// and the pointer; gnt_idx is its index and any_gnt says one exists. When
// `advance` is high at a clock edge the pointer moves to the granted
// requester, so the next search starts after it. Reset makes requester 0
// the first in line.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any_gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // last granted requester

  always_comb begin
    int unsigned k;
    gnt     = '0;
    gnt_idx = '0;
    any_gnt = 1'b0;
    for (int unsigned off = 1; off <= N; off++) begin
      k = (int'(last) + off) % N;
      if (!any_gnt && req[k]) begin
        any_gnt = 1'b1;
        gnt[k]  = 1'b1;
        gnt_idx = k[$clog2(N)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last <= IW'(N - 1);
    else if (advance && any_gnt) last <= gnt_idx;
  end

endmodule
