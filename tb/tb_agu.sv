// tb_agu: checks the correction address generator. For each block ID it starts the
// unit and checks that table reads {ID, 0..D-1} are issued on the D cycles after
// start, that rd_last marks the last one, that busy holds until ecv_done, that the
// write enable goes to the started block only, and that a start while busy is ignored.
module tb_agu;
  localparam int N_BLK = 4, D = 16;

  logic        clk = 1'b0, rst = 1'b1;
  logic        start = 1'b0, ecv_done = 1'b0;
  logic [1:0]  base_addr = '0;
  logic        busy, rd_valid, rd_last;
  logic [5:0]  bt_raddr;
  logic [3:0]  mem_we;

  agu #(.N_BLK(N_BLK), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) tick();
    rst = 1'b0;
    tick();
    check(!busy && !rd_valid && mem_we == '0, "idle after reset");
    for (int rep = 0; rep < 8; rep++) begin
      int id, extra;
      id    = rep % N_BLK;
      extra = $urandom_range(4, 0);
      start = 1'b1; base_addr = 2'(id);
      tick();
      start = 1'b0; base_addr = 2'(id + 1);   // the unit must keep the started ID
      for (int k = 0; k < D; k++) begin
        check(busy && rd_valid, $sformatf("read %0d not issued", k));
        check(bt_raddr == {2'(id), 4'(k)}, $sformatf("address %h expected %h", bt_raddr, {2'(id), 4'(k)}));
        check(rd_last == (k == D - 1), "rd_last");
        check(mem_we == '0, "early write");
        if (k == 3) start = 1'b1;             // ignored while busy
        tick();
        start = 1'b0;
      end
      // wait for the correction vector
      for (int e = 0; e < extra; e++) begin
        check(busy && !rd_valid && mem_we == '0, "waiting for ecv_done");
        tick();
      end
      ecv_done = 1'b1;
      #1;
      check(mem_we == 4'(1 << id), $sformatf("write enable %b for block %0d", mem_we, id));
      tick();
      ecv_done = 1'b0;
      #1;
      check(!busy && mem_we == '0, "busy cleared after the write");
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
