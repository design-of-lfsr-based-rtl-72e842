// tb_err_detect: checks lookup combining and error detection. The testbench holds
// its own copy of two memory blocks (some words with a wrong parity bit) and reads
// them with one-cycle latency like the real blocks. For random lookups and random
// cap_en it predicts the match vector (AND of the blocks), match flag and lowest
// match address, the per-block parity errors, and the capture of the lowest damaged
// block ID with its key slice, all two cycles after the lookup.
module tb_err_detect;
  localparam int N_BLK = 2, C = 8, D = 16, W = N_BLK * C;

  logic             clk = 1'b0, rst = 1'b1;
  logic             srch = 1'b0, cap_en = 1'b0;
  logic [W-1:0]     key = '0;
  logic [D:0]       rdata [N_BLK];
  logic             res_valid, match, err, cap;
  logic [D-1:0]     match_vec;
  logic [3:0]       match_addr;
  logic [N_BLK-1:0] err_vec;
  logic [0:0]       base_addr;
  logic [C-1:0]     bit_pattern;

  err_detect #(.N_BLK(N_BLK), .C(C), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  logic [D:0] mem [N_BLK][2**C];

  always @(posedge clk)
    if (srch) for (int b = 0; b < N_BLK; b++) rdata[b] <= mem[b][key[b*C +: C]];

  typedef struct { int t; logic [W-1:0] k; } req_t;
  req_t q[$];
  int   cap_en_at = -1;   // last cycle in which cap_en was high
  int   n_cap = 0, n_err = 0, n_match = 0, n_dual = 0;

  always @(negedge clk) begin
    if (!rst) begin
      if (srch) begin
        req_t r;
        r.t = cyc;
        r.k = key;
        q.push_back(r);
      end
      check(res_valid == (q.size() > 0 && q[0].t == cyc - 2), "res_valid timing");
      if (res_valid && q.size() > 0) begin
        req_t r;
        logic [D-1:0]     ev;
        logic [N_BLK-1:0] ee;
        int               lo, eb;
        r  = q.pop_front();
        ev = '1;
        for (int b = 0; b < N_BLK; b++) begin
          ev   &= mem[b][r.k[b*C +: C]][D-1:0];
          ee[b] = ^mem[b][r.k[b*C +: C]];
        end
        lo = -1;
        for (int w = D - 1; w >= 0; w--) if (ev[w]) lo = w;
        eb = -1;
        for (int b = N_BLK - 1; b >= 0; b--) if (ee[b]) eb = b;
        check(match_vec == ev, $sformatf("match_vec %h expected %h", match_vec, ev));
        check(match == (lo >= 0), "match flag");
        if (lo >= 0) check(match_addr == 4'(lo), $sformatf("match_addr %0d expected %0d", match_addr, lo));
        check(err_vec == ee, $sformatf("err_vec %b expected %b", err_vec, ee));
        check(err == (eb >= 0), "err flag");
        check(cap == (eb >= 0 && cap_en_at == cyc - 1), "cap");
        if (cap) begin
          check(base_addr == 1'(eb), "base_addr");
          check(bit_pattern == r.k[eb*C +: C], "bit_pattern");
          n_cap++;
        end
        if (eb >= 0) n_err++;
        if (lo >= 0) n_match++;
        if (ee == '1) n_dual++;
      end else begin
        check(cap == 1'b0, "cap without a result");
      end
      if (cap_en) cap_en_at = cyc;
    end
  end

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // words with mostly dense match bits so that the AND is often non-zero,
    // about one in eight with a parity error
    for (int b = 0; b < N_BLK; b++)
      for (int r = 0; r < 2**C; r++) begin
        logic [D-1:0] v;
        v = D'($urandom) | D'($urandom) | D'($urandom);
        mem[b][r] = {^v ^ ($urandom_range(7, 0) == 0), v};
      end
    repeat (2) tick();
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      srch   = ($urandom_range(3, 0) != 0);
      key    = W'($urandom);
      cap_en = ($urandom_range(1, 0) == 1);
      tick();
    end
    srch = 1'b0;
    repeat (4) tick();
    $display("captures=%0d errors=%0d matches=%0d dual=%0d", n_cap, n_err, n_match, n_dual);
    check(n_cap > 0 && n_err > n_cap && n_match > 0 && n_dual > 0, "mechanism not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
