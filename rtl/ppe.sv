// ppe: programmable priority encoder, the Input Selector of a round-robin
// arbiter.
//
// Given N request lines and a pointer, it grants the request at the pointer
// if there is one, otherwise the first request above the pointer, otherwise
// the lowest-indexed request below it (circular order). It is purely
// combinational: the grant is valid in the same cycle as the requests.
// The selection rule is the one the design's round-robin arbiter defines; the
// "thermometer mask, then fall back to the unmasked requests" structure is
// this design's choice of circuit.
//
// Interface: req[N], ptr (index of the highest-priority line) in; gnt[N]
// (one-hot), gnt_idx, any (at least one request) out.
module ppe #(
  parameter int unsigned N = 16,
  localparam int unsigned E = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] req,
  input  logic [E-1:0] ptr,
  output logic [N-1:0] gnt,
  output logic [E-1:0] gnt_idx,
  output logic         any
);

  logic [N-1:0] masked;
  logic [N-1:0] pick_from;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) masked[i] = req[i] && (i >= 32'(ptr));
    pick_from = (|masked) ? masked : req;
    gnt     = '0;
    gnt_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (pick_from[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        gnt_idx = E'(i);
      end
    end
    any = |req;
  end

endmodule
