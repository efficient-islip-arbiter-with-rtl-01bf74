// output_block: switch output that hands a packet to the connected device.
//
// A one-packet register. It is loaded from the crossbar (in_valid) and
// presents the packet with out_valid until the device takes it (out_ready).
// free is high when the register can accept a packet in this cycle: it is
// empty or its packet is leaving now. The scheduler only matches outputs that
// are free. Register depth and the valid/ready handshake are this design's
// choices.
module output_block
  import islip_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  packet_t in_pkt,
  output logic    free,
  output logic    out_valid,
  output packet_t out_pkt,
  input  logic    out_ready
);

  assign free = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      if (in_valid) begin
        out_valid <= 1'b1;
        out_pkt   <= in_pkt;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> free);

endmodule
