// rr_arbiter: generic round-robin arbiter (Input Selector + Pointer Updater).
//
// An E-bit pointer RPT names the input with the highest priority. Each cycle
// the Input Selector (a programmable priority encoder, module ppe) grants the
// requesting input found first when searching circularly from RPT. At the
// clock edge the Pointer Updater sets RPT to (granted index + 1) mod N; with
// no request RPT keeps its value, and no_req is high. This follows the
// generic arbiter the design builds on. The update_en input is this design's
// addition so that iSLIP can move a pointer only when a grant is accepted in
// the first iteration; tie it high for a plain round-robin arbiter.
//
// Timing: gnt/gnt_idx/no_req are combinational from req and RPT; RPT changes
// at the rising clock edge. Synchronous active-low reset clears RPT to 0.
module rr_arbiter #(
  parameter int unsigned N = 16,
  localparam int unsigned E = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update_en,
  output logic [N-1:0] gnt,
  output logic [E-1:0] gnt_idx,
  output logic         no_req,
  output logic [E-1:0] rpt
);

  logic any;

  ppe #(.N(N)) u_sel (
    .req    (req),
    .ptr    (rpt),
    .gnt    (gnt),
    .gnt_idx(gnt_idx),
    .any    (any)
  );

  assign no_req = !any;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rpt <= '0;
    end else if (update_en && any) begin
      rpt <= (32'(gnt_idx) == N - 1) ? '0 : gnt_idx + E'(1);
    end
  end

  // At most one grant, and only to a requester.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt) && ((gnt & ~req) == '0));

endmodule
