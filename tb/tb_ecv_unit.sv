// tb_ecv_unit: checks the correction vector. A behavioural table in the testbench
// answers reads one cycle late, as bin_table does. For random entries and patterns
// the unit must produce, one cycle after the last entry, the match bit of every word
// (bit w for word w) and an even-parity bit over them.
module tb_ecv_unit;
  localparam int C = 8, D = 16;

  logic         clk = 1'b0, rst = 1'b1;
  logic         start = 1'b0, req_valid = 1'b0, req_last = 1'b0;
  logic [2*C:0] entry;
  logic [C-1:0] pattern = '0;
  logic         done;
  logic [D:0]   ecv;

  ecv_unit #(.C(C), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2*C:0] table_m [D];
  int           raddr = 0;

  always @(posedge clk) entry <= table_m[raddr];

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
    repeat (2) tick();
    rst = 1'b0;
    for (int rep = 0; rep < 100; rep++) begin
      logic [D-1:0] exp;
      pattern = C'($urandom);
      for (int w = 0; w < D; w++) begin
        logic [C-1:0] m, v;
        m = C'($urandom) & C'($urandom);
        v = ($urandom_range(1, 0) == 1) ? pattern : C'($urandom);
        table_m[w] = {1'($urandom_range(3, 0) != 0), m, v};
        exp[w] = table_m[w][2*C] && (((pattern ^ v) & ~m) == '0);
      end
      start = 1'b1;
      tick();
      start = 1'b0;
      for (int k = 0; k < D; k++) begin
        req_valid = 1'b1; req_last = (k == D - 1); raddr = k;
        tick();
        check(!done || k == 0, "done too early");
      end
      req_valid = 1'b0; req_last = 1'b0;
      check(!done, "done one cycle early");
      tick();
      check(done, "done missing one cycle after the last entry");
      check(ecv == {^exp, exp}, $sformatf("ecv %h expected %h", ecv, {^exp, exp}));
      tick();
      check(!done, "done longer than one cycle");
      repeat ($urandom_range(3, 0)) tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
