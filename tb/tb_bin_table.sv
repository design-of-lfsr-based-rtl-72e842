// tb_bin_table: checks the binary-encoded TCAM table against an array model with
// {block ID, word} addressing, one-cycle read latency and a simultaneous write.
module tb_bin_table;
  localparam int N_BLK = 2, C = 8, D = 16;
  localparam int AW = 1 + 4, EW = 2*C + 1;

  logic          clk = 1'b0;
  logic          re = 1'b0, we = 1'b0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [EW-1:0] rdata, wdata = '0;

  bin_table #(.N_BLK(N_BLK), .C(C), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [EW-1:0] model [2**AW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick();
    we = 1'b1;
    for (int id = 0; id < N_BLK; id++)
      for (int w = 0; w < D; w++) begin
        waddr = AW'(id * D + w);
        wdata = EW'($urandom);
        model[id * D + w] = wdata;
        tick();
      end
    we = 1'b0;
    for (int i = 0; i < 200; i++) begin
      int id, w, wa;
      id = $urandom_range(N_BLK - 1, 0);
      w  = $urandom_range(D - 1, 0);
      wa = $urandom_range(2**AW - 1, 0);
      re = 1'b1; raddr = AW'(id * D + w);
      we = (i % 3 == 0); waddr = AW'(wa); wdata = EW'($urandom);
      tick();
      check(rdata == model[id * D + w], $sformatf("entry %0d/%0d: %h expected %h (i=%0d we=%b wa=%0d wd=%h)", id, w, rdata, model[id*D+w], i, we, wa, wdata));
      if (we) model[wa] = wdata;
      re = 1'b0; we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
