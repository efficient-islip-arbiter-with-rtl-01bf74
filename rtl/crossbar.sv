// crossbar: mux-based N x N crossbar switch fabric.
//
// conn[i][j] high connects input i to output j; it comes from the scheduler's
// decision register, which never connects one input to two outputs or two
// inputs to one output. Each output is an AND-OR multiplexer over the inputs,
// so the fabric is purely combinational and synthesizes without transmission
// gates. out_valid[j] is high when some input is connected to output j and
// that input presents valid data.
module crossbar
  import islip_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][N-1:0] conn,      // [input][output]
  input  logic [N-1:0]        in_valid,
  input  packet_t             in_pkt  [N],
  output logic [N-1:0]        out_valid,
  output packet_t             out_pkt [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = 1'b0;
      out_pkt[j]   = '0;
      for (int i = 0; i < N; i++) begin
        if (conn[i][j] && in_valid[i]) begin
          out_valid[j] = 1'b1;
          out_pkt[j]   = out_pkt[j] | in_pkt[i];
        end
      end
    end
  end

endmodule
