// tb_rw_ctrl: checks the read/write controller against behavioural memory blocks and
// a behavioural binary table (synchronous, read-first, as in the real blocks).
//   - power-up clear: ready low for max(2^C, N_BLK*D) cycles, every row and entry zero
//   - lookups: read of each block at its key slice, refused when not ready
//   - correction writes pass to the block selected by corr_we
//   - update: waits while lookups or a correction are in flight, then rewrites bit w
//     of every row with the ternary match, keeps the other bits, adjusts the parity
//     (a row that had a bad parity keeps it), writes the table entries, and takes
//     2^C + 1 cycles once it starts; corr_allow is low during the sweep
module tb_rw_ctrl;
  import ertcam_pkg::*;
  localparam int N_BLK = 2, C = 8, D = 16, W = N_BLK * C, ROWS = 2 ** C;

  logic             clk = 1'b0, rst = 1'b1;
  logic             srch_en = 1'b0, srch_go;
  logic [W-1:0]     srch_key = '0;
  logic             upd_en = 1'b0, upd_valid = 1'b0;
  logic [3:0]       upd_addr = '0;
  logic [W-1:0]     upd_value = '0, upd_mask = '0;
  logic             pipe_busy = 1'b0, corr_busy = 1'b0, corr_allow;
  logic [N_BLK-1:0] corr_we = '0;
  logic [C-1:0]     corr_addr = '0;
  logic [D:0]       corr_data = '0;
  logic             mem_re;
  logic [C-1:0]     mem_raddr [N_BLK];
  logic [D:0]       mem_rdata [N_BLK];
  logic [N_BLK-1:0] mem_we;
  logic [C-1:0]     mem_waddr;
  logic [D:0]       mem_wdata [N_BLK];
  logic             bt_we;
  logic [4:0]       bt_waddr;
  logic [2*C:0]     bt_wdata;
  logic             ready;

  rw_ctrl #(.N_BLK(N_BLK), .C(C), .D(D)) dut (.*);

  always #5 clk = ~clk;

  // behavioural memories
  logic [D:0]   mem [N_BLK][ROWS];
  logic [2*C:0] tbl [N_BLK * D];
  always @(posedge clk) begin
    for (int b = 0; b < N_BLK; b++) begin
      if (mem_re) mem_rdata[b] <= mem[b][mem_raddr[b]];
      if (mem_we[b]) mem[b][mem_waddr] <= mem_wdata[b];
    end
    if (bt_we) tbl[bt_waddr] <= bt_wdata;
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [D:0] prev_mem [N_BLK][ROWS];
    tick();
    for (int b = 0; b < N_BLK; b++)
      for (int r = 0; r < ROWS; r++) mem[b][r] = '1;
    for (int e = 0; e < N_BLK * D; e++) tbl[e] = '1;
    tick();
    rst = 1'b0;
    n = 0;
    #1;
    while (!ready) begin
      check(!corr_allow && !srch_go, "lookups or corrections during the power-up clear");
      srch_en = 1'b1;
      tick();
      n++;
    end
    srch_en = 1'b0;
    check(n == ROWS, $sformatf("power-up clear %0d cycles, expected %0d", n, ROWS));
    for (int b = 0; b < N_BLK; b++)
      for (int r = 0; r < ROWS; r++) check(mem[b][r] == '0, "row not cleared");
    for (int e = 0; e < N_BLK * D; e++) check(tbl[e] == '0, "table entry not cleared");

    // random contents with correct parity, one row of block 1 with a bad parity
    for (int b = 0; b < N_BLK; b++)
      for (int r = 0; r < ROWS; r++) begin
        logic [D-1:0] v;
        v = D'($urandom);
        mem[b][r] = {^v, v};
      end
    mem[1][77][5] = ~mem[1][77][5];

    // lookups
    for (int i = 0; i < 20; i++) begin
      srch_en = 1'b1; srch_key = W'($urandom);
      #1;
      check(srch_go && mem_re, "lookup not issued");
      for (int b = 0; b < N_BLK; b++) check(mem_raddr[b] == srch_key[b*C +: C], "lookup address");
      check(mem_we == '0, "write during lookup");
      tick();
      check(mem_rdata[0] == mem[0][srch_key[C-1:0]], "lookup data");
    end
    srch_en = 1'b0;

    // correction write
    corr_we = 2'b10; corr_addr = 8'd200; corr_data = 17'h1_2345;
    #1;
    check(mem_we == 2'b10 && mem_waddr == 8'd200 && mem_wdata[1] == 17'h1_2345, "correction write");
    tick();
    corr_we = '0;
    check(mem[1][200] == 17'h1_2345, "correction written");
    mem[1][200] = {^mem[1][200][D-1:0], mem[1][200][D-1:0]};

    // updates of words 5 (valid) and 9 (delete), the first one held off by a correction
    for (int u = 0; u < 2; u++) begin
      logic [W-1:0] v, m;
      int           w, hold;
      bit           vld;
      w    = (u == 0) ? 5 : 9;
      vld  = (u == 0);
      v    = W'($urandom);
      m    = W'($urandom) & W'($urandom);
      hold = (u == 0) ? 7 : 0;
      for (int b = 0; b < N_BLK; b++)
        for (int r = 0; r < ROWS; r++) prev_mem[b][r] = mem[b][r];
      upd_en = 1'b1; upd_addr = 4'(w); upd_value = v; upd_mask = m; upd_valid = vld;
      srch_en = 1'b1;
      tick();
      upd_en = 1'b0; upd_value = '0; upd_mask = '0;
      check(!ready && !srch_go, "lookups refused after an update request");
      corr_busy = (hold > 0);
      for (int h = 0; h < hold; h++) begin
        check(corr_allow && !mem_re && mem_we == '0, "waiting state");
        tick();
      end
      corr_busy = 1'b0;
      tick();   // leaves the waiting state
      n = 0;
      while (!ready) begin
        check(!corr_allow && !srch_go, "correction or lookup during the sweep");
        tick();
        n++;
      end
      srch_en = 1'b0;
      check(n == ROWS + 1, $sformatf("sweep %0d cycles, expected %0d", n, ROWS + 1));
      for (int b = 0; b < N_BLK; b++) begin
        check(tbl[b * D + w] == {vld, m[b*C +: C], v[b*C +: C]}, "table entry");
        for (int r = 0; r < ROWS; r++) begin
          logic [D:0] exp;
          bit         nb;
          nb  = vld && (((C'(r) ^ v[b*C +: C]) & ~m[b*C +: C]) == '0);
          exp = prev_mem[b][r];
          exp[w] = nb;
          exp[D] = prev_mem[b][r][D] ^ prev_mem[b][r][w] ^ nb;
          check(mem[b][r] == exp, $sformatf("block %0d row %0d: %h expected %h", b, r, mem[b][r], exp));
        end
      end
      check(^mem[1][77] == 1'b1, "bad parity of the damaged row lost by the sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
