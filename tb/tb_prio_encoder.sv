// tb_prio_encoder: exhaustive check of the priority encoder for N = 16 (lowest set
// bit wins) and a few vectors for N = 2.
module tb_prio_encoder;
  logic [15:0] req16;
  logic        any16;
  logic [3:0]  idx16;
  logic [1:0]  req2;
  logic        any2;
  logic [0:0]  idx2;

  prio_encoder #(.N(16)) dut16 (.req(req16), .any(any16), .idx(idx16));
  prio_encoder #(.N(2))  dut2  (.req(req2),  .any(any2),  .idx(idx2));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int lo;
      lo    = 0;
      req16 = 16'(v);
      #1;
      for (int i = 15; i >= 0; i--) if (req16[i]) lo = i;
      checks++;
      if (any16 != (v != 0) || (v != 0 && idx16 != 4'(lo))) begin
        failures++;
        if (failures < 10) $display("FAIL: req %h any %b idx %0d expected %0d", req16, any16, idx16, lo);
      end
    end
    for (int v = 0; v < 4; v++) begin
      req2 = 2'(v);
      #1;
      checks++;
      if (any2 != (v != 0) || (v != 0 && idx2 != (v[0] ? 1'b0 : 1'b1))) begin
        failures++;
        $display("FAIL: N=2 req %b any %b idx %0d", req2, any2, idx2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
