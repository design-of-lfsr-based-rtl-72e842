// tb_lfsr_mem: checks the TCAM memory block against an array model: synchronous
// read with one-cycle latency, read data held while re is low, read-first behaviour
// when reading the word being written, and single-bit inversion by the upset port.
module tb_lfsr_mem;
  localparam int AW = 8;
  localparam int DW = 17;

  logic                  clk = 1'b0;
  logic                  re = 1'b0, we = 1'b0, inj_en = 1'b0;
  logic [AW-1:0]         raddr = '0, waddr = '0, inj_addr = '0;
  logic [DW-1:0]         wdata = '0, rdata;
  logic [$clog2(DW)-1:0] inj_bit = '0;

  lfsr_mem #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];

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
    logic [DW-1:0] held;
    tick();
    // fill
    we = 1'b1;
    for (int a = 0; a < 2**AW; a++) begin
      waddr = AW'(a);
      wdata = DW'($urandom);
      model[a] = wdata;
      tick();
    end
    we = 1'b0;
    // random reads
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(2**AW - 1, 0);
      re = 1'b1; raddr = AW'(a);
      tick();
      re = 1'b0;
      check(rdata == model[a], $sformatf("read %0d: %h expected %h", a, rdata, model[a]));
      held = rdata;
      raddr = raddr + 1'b1;
      tick();
      check(rdata == held, "rdata not held while re is low");
    end
    // read-first on a simultaneous write
    re = 1'b1; raddr = 8'd5; we = 1'b1; waddr = 8'd5; wdata = ~model[5];
    tick();
    re = 1'b0; we = 1'b0;
    check(rdata == model[5], "read during write must return the old word");
    model[5] = ~model[5];
    re = 1'b1; tick(); re = 1'b0;
    check(rdata == model[5], "new word after write");
    // upset injection
    for (int i = 0; i < 50; i++) begin
      int a, b;
      a = $urandom_range(2**AW - 1, 0);
      b = $urandom_range(DW - 1, 0);
      inj_en = 1'b1; inj_addr = AW'(a); inj_bit = $clog2(DW)'(b);
      tick();
      inj_en = 1'b0;
      model[a][b] = ~model[a][b];
      re = 1'b1; raddr = AW'(a);
      tick();
      re = 1'b0;
      check(rdata == model[a], $sformatf("upset at %0d bit %0d: %h expected %h", a, b, rdata, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
