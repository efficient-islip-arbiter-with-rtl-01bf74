// tb_output_block: loads packets when the block is free and drains them with
// a random ready; checks the held packet, out_valid and free each cycle.
module tb_output_block;
  import islip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, free, out_valid, out_ready;
  packet_t in_pkt, out_pkt;
  logic m_valid;
  packet_t m_pkt;
  int checks = 0, failures = 0;

  output_block dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pkt(in_pkt), .free(free),
    .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_pkt = '0; out_ready = 0; m_valid = 0; m_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      out_ready = ($urandom_range(2) == 0);
      in_pkt = {16'($urandom), $urandom};
      #1;
      checks++;
      if (free != (!m_valid || out_ready)) failures++;
      in_valid = free && ($urandom_range(1) == 0);
      #1;
      checks++;
      if (out_valid != m_valid || (m_valid && out_pkt != m_pkt)) failures++;
      @(posedge clk);
      if (in_valid) begin
        m_valid = 1; m_pkt = in_pkt;
      end else if (out_ready) m_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
