// tb_ppe: exhaustive-ish random check of the programmable priority encoder.
// A reference search (circular scan starting at the pointer) is computed in
// the testbench and compared with the one-hot grant, the index and 'any'.
module tb_ppe;
  localparam int N = 16;
  localparam int E = $clog2(N);
  logic [N-1:0] req, gnt;
  logic [E-1:0] ptr, gnt_idx;
  logic         any;
  int checks = 0, failures = 0;

  ppe #(.N(N)) dut (.req(req), .ptr(ptr), .gnt(gnt), .gnt_idx(gnt_idx), .any(any));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int exp_idx;
      req = (t % 5 == 0) ? N'(1 << $urandom_range(N-1)) : N'($urandom);
      if (t % 97 == 0) req = '0;
      ptr = E'($urandom_range(N-1));
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++) begin
        int c;
        c = (int'(ptr) + k) % N;
        if (exp_idx < 0 && req[c]) exp_idx = c;
      end
      checks++;
      if (any !== (exp_idx >= 0)) failures++;
      if (exp_idx >= 0) begin
        checks++;
        if (gnt !== N'(1 << exp_idx) || int'(gnt_idx) != exp_idx) begin
          failures++;
          if (failures < 5) $display("ppe mismatch req=%h ptr=%0d gnt=%h idx=%0d exp=%0d", req, ptr, gnt, gnt_idx, exp_idx);
        end
      end else begin
        checks++;
        if (gnt !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
