// rr_arbiter: rotating-priority arbiter.
//
// N requesters share one resource. The grant goes to the first requester at
// or after the priority pointer, counting upward and wrapping. When the
// caller takes a grant (`accept`), the pointer moves to the requester after
// the granted one, so the granted requester has the lowest priority next
// time and every requester is served within N grants. The grant is
// combinational from `req`; the pointer is a register, reset to requester 0.
// Rotating priority for fairness follows the router specification; the
// pointer update rule is this design's choice.
module rr_arbiter #(
  parameter int N = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic                 accept,     // take the current grant
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any
);

  localparam int IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    // Walk from the highest offset down so the smallest offset wins.
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (req[idx]) begin
        grant     = '0;
        grant[idx] = 1'b1;
        grant_idx = idx;
        any       = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (accept && any)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

endmodule
