// tb_ertcam_top: end-to-end test of the error-resilient TCAM at its default size
// (16-bit keys, 2 memory blocks of 8 key bits, 16 TCAM words).
//
// A reference model in the testbench keeps the TCAM words (value, mask, valid) and a
// record of every bit the test inverts in the memory blocks. For each lookup it
// predicts, at issue time, the match vector each block should return (including the
// inverted bits), the parity errors, the match address, and whether the error is
// captured for correction. It then checks
//   - the 2-cycle lookup latency and every lookup result,
//   - the power-up clear time and the update time (2^C + 2 cycles when quiet),
//   - that a captured error is repaired exactly D + 2 cycles after the result that
//     found it (corr_done, corr_busy), after which the row reads clean,
//   - that an update waits for a running correction.
// Every mechanism (match, miss, multiple match, don't-care match, insert, delete,
// detection, correction, lookups during correction, errors seen while busy, errors in
// two blocks, parity-bit upset, update waiting for a correction, upset carried through
// an update sweep, two flips in one row that parity cannot see) is counted and must
// occur at least once.
module tb_ertcam_top;
  localparam int KEY_W = 16;
  localparam int N_BLK = 2;
  localparam int D     = 16;
  localparam int C     = KEY_W / N_BLK;
  localparam int IW    = 1;
  localparam int DA    = 4;
  localparam int BW    = 5;
  localparam int ROWS  = 2 ** C;

  logic             clk = 1'b0;
  logic             reset = 1'b1;
  logic             ready;
  logic             en = 1'b0;
  logic [KEY_W-1:0] din = '0;
  logic             match_valid, match;
  logic [DA-1:0]    match_addr;
  logic [D-1:0]     match_vec;
  logic             err;
  logic [N_BLK-1:0] err_vec;
  logic             we = 1'b0;
  logic [DA-1:0]    wr_addr = '0;
  logic [KEY_W-1:0] wr_mask = '0;
  logic             wr_valid = 1'b0;
  logic             corr_busy, corr_done;
  logic             inj_en = 1'b0;
  logic [IW-1:0]    inj_blk = '0;
  logic [C-1:0]     inj_addr = '0;
  logic [BW-1:0]    inj_bit = '0;

  ertcam_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference model ----------------
  logic [KEY_W-1:0] r_val [D];
  logic [KEY_W-1:0] r_msk [D];
  logic             r_vld [D];
  logic [D:0]       flips [N_BLK][ROWS];

  function automatic logic [D-1:0] blk_bits(int b, logic [C-1:0] row);
    logic [D-1:0] v;
    for (int w = 0; w < D; w++)
      v[w] = r_vld[w] && (((row ^ r_val[w][b*C +: C]) & ~r_msk[w][b*C +: C]) == '0);
    return v;
  endfunction

  typedef struct {
    int               t;
    logic [KEY_W-1:0] key;
    logic [D-1:0]     vec;
    logic [N_BLK-1:0] errv;
    bit               ovl;
  } lookup_t;
  lookup_t q[$];

  // correction model
  int corr_free_at = 0;   // first cycle in which a new error may be captured (cap_en)
  int exp_done_at  = -1;
  int cap_start    = -1;
  int cap_blk, cap_row;

  // mechanism counters
  int n_lookup = 0, n_match = 0, n_miss = 0, n_multi = 0, n_dc = 0;
  int n_insert = 0, n_delete = 0, n_detect = 0, n_corr = 0, n_overlap = 0;
  int n_even = 0;
  int n_ignored = 0, n_dual = 0, n_parbit = 0, n_upd_wait = 0, n_carry = 0;

  always @(negedge clk) begin
    if (!reset) begin
      // lookup issue: expected result from the model as it stands now
      if (en && ready) begin
        lookup_t l;
        l.t   = cyc;
        l.key = din;
        l.vec = '1;
        for (int b = 0; b < N_BLK; b++) begin
          logic [C-1:0] row;
          row        = din[b*C +: C];
          l.vec     &= blk_bits(b, row) ^ flips[b][row][D-1:0];
          l.errv[b]  = ^flips[b][row];
        end
        l.ovl = corr_busy;
        for (int b = 0; b < N_BLK; b++)
          if (flips[b][din[b*C +: C]] != '0 && !l.errv[b]) n_even++;
        q.push_back(l);
        n_lookup++;
        if (corr_busy) n_overlap++;
      end

      // lookup result
      if (match_valid) begin
        lookup_t l;
        check(q.size() > 0, "result without a lookup");
        if (q.size() > 0) begin
          logic [DA-1:0] ea;
          l = q.pop_front();
          check(cyc - l.t == 2, $sformatf("lookup latency %0d, expected 2", cyc - l.t));
          check(match_vec == l.vec, $sformatf("key %h: match_vec %h, expected %h", l.key, match_vec, l.vec));
          check(err_vec == l.errv, $sformatf("key %h: err_vec %b, expected %b", l.key, err_vec, l.errv));
          check(err == (|l.errv), "err flag");
          check(match == (|l.vec), "match flag");
          ea = '0;
          for (int w = D - 1; w >= 0; w--) if (l.vec[w]) ea = DA'(w);
          if (|l.vec) check(match_addr == ea, $sformatf("match_addr %0d, expected %0d", match_addr, ea));
          if (l.errv == '0) begin
            if (|l.vec) n_match++; else n_miss++;
            if ($countones(l.vec) > 1) n_multi++;
            if (|l.vec && r_msk[ea] != '0) n_dc++;
          end
          if (|l.errv) begin
            n_detect++;
            if ($countones(l.errv) > 1) n_dual++;
            if (cyc - 1 >= corr_free_at) begin
              cap_blk = 0;
              for (int b = N_BLK - 1; b >= 0; b--) if (l.errv[b]) cap_blk = b;
              cap_row      = int'(l.key[cap_blk*C +: C]);
              cap_start    = cyc;
              exp_done_at  = cyc + D + 2;
              corr_free_at = cyc + D + 3;
            end else begin
              n_ignored++;
            end
          end
        end
      end

      // correction timing
      check(corr_done == (cyc == exp_done_at), "corr_done timing");
      check(corr_busy == (cap_start >= 0 && cyc > cap_start && cyc <= exp_done_at), "corr_busy timing");
      if (cyc == exp_done_at) begin
        flips[cap_blk][cap_row] = '0;
        n_corr++;
      end

      // upset injection
      if (inj_en) begin
        flips[inj_blk][inj_addr][inj_bit] = ~flips[inj_blk][inj_addr][inj_bit];
        if (inj_bit == BW'(D)) n_parbit++;
      end

      // update accepted: change the model; the sweep rewrites bit w of every row
      if (we && ready) begin
        r_val[wr_addr] = din;
        r_msk[wr_addr] = wr_mask;
        r_vld[wr_addr] = wr_valid;
        for (int b = 0; b < N_BLK; b++)
          for (int r = 0; r < ROWS; r++)
            if (flips[b][r][BW'(wr_addr)]) begin
              flips[b][r][BW'(wr_addr)] = 1'b0;
              flips[b][r][D]       = ~flips[b][r][D];
              n_carry++;
            end
        if (wr_valid) n_insert++; else n_delete++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic idle(int n);
    repeat (n) tick();
  endtask

  task automatic lookup(input logic [KEY_W-1:0] k);
    while (!ready) tick();
    en  = 1'b1;
    din = k;
    tick();
    en  = 1'b0;
  endtask

  // Writes a TCAM word and returns how many cycles ready stayed low.
  task automatic update(input int w, input logic [KEY_W-1:0] v, input logic [KEY_W-1:0] m,
                        input bit vld, output int n, output int t_acc);
    while (!ready) tick();
    we       = 1'b1;
    wr_addr  = DA'(w);
    din      = v;
    wr_mask  = m;
    wr_valid = vld;
    t_acc    = cyc;
    tick();
    we = 1'b0;
    n  = 0;
    while (!ready) begin
      tick();
      n++;
    end
  endtask

  task automatic quiet_update(input int w, input logic [KEY_W-1:0] v, input logic [KEY_W-1:0] m,
                              input bit vld);
    int n, t;
    idle(3);
    update(w, v, m, vld, n, t);
    check(n == ROWS + 2, $sformatf("update took %0d cycles, expected %0d", n, ROWS + 2));
  endtask

  task automatic inject(input int b, input logic [C-1:0] row, input int bitn);
    inj_en   = 1'b1;
    inj_blk  = IW'(b);
    inj_addr = row;
    inj_bit  = BW'(bitn);
    tick();
    inj_en = 1'b0;
  endtask

  // A key that matches word w (random bits in its don't-care positions).
  function automatic logic [KEY_W-1:0] key_for(int w);
    logic [KEY_W-1:0] rnd;
    rnd = KEY_W'($urandom);
    return (r_val[w] & ~r_msk[w]) | (rnd & r_msk[w]);
  endfunction

  task automatic random_lookups(int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(1, 0) == 1) lookup(key_for($urandom_range(D - 1, 0)));
      else                           lookup(KEY_W'($urandom));
    end
  endtask

  task automatic wait_corr_done();
    while (exp_done_at >= cyc) tick();
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n, t, t0;
    logic [KEY_W-1:0] k;
    for (int w = 0; w < D; w++) begin
      r_val[w] = '0;
      r_msk[w] = '0;
      r_vld[w] = 1'b0;
    end
    for (int b = 0; b < N_BLK; b++)
      for (int r = 0; r < ROWS; r++) flips[b][r] = '0;

    // reset and power-up clear
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    t0 = cyc;
    while (!ready) tick();
    check(cyc - t0 == ROWS, $sformatf("power-up clear took %0d cycles, expected %0d", cyc - t0, ROWS));

    // empty TCAM: nothing matches
    random_lookups(8);

    // fill the TCAM: words 3 and 9 overlap, word 5 is all don't-care in block 1
    for (int w = 0; w < D; w++) begin
      logic [KEY_W-1:0] v, m;
      v = KEY_W'($urandom);
      m = KEY_W'($urandom) & KEY_W'($urandom);
      if (w == 9) begin
        v = r_val[3];
        m = r_msk[3] | 16'h000f;
      end
      if (w == 5) m = 16'hff00;
      quiet_update(w, v, m, 1'b1);
    end
    random_lookups(200);

    // delete a word, then look for it
    k = key_for(6);
    quiet_update(6, r_val[6], r_msk[6], 1'b0);
    lookup(k);
    random_lookups(20);

    // single upset in a match bit of block 0, lookups continue during correction
    idle(3);
    k = key_for(2);
    inject(0, k[0 +: C], 2);
    lookup(k);
    random_lookups(25);
    wait_corr_done();
    idle(2);
    lookup(k);

    // upset in the parity bit of block 1
    k = key_for(4);
    inject(1, k[C +: C], D);
    lookup(k);
    wait_corr_done();
    idle(2);
    lookup(k);

    // upsets in both blocks on one key: block 0 first, block 1 on the next lookup
    k = key_for(7);
    inject(0, k[0 +: C], 7);
    inject(1, k[C +: C], 11);
    lookup(k);
    wait_corr_done();
    idle(2);
    lookup(k);
    wait_corr_done();
    idle(2);
    lookup(k);

    // second error found while the first is being corrected: ignored, found again later
    begin
      logic [KEY_W-1:0] k2;
      k  = key_for(8);
      k2 = key_for(10);
      k2[0 +: C] = k[0 +: C] + 8'd1;
      inject(0, k[0 +: C], 8);
      inject(0, k2[0 +: C], 10);
      lookup(k);
      lookup(k2);
      wait_corr_done();
      idle(2);
      lookup(k2);
      wait_corr_done();
      idle(2);
      lookup(k);
      lookup(k2);
    end

    // update requested while a correction runs: it waits for the correction
    idle(3);
    k = key_for(11);
    inject(1, k[C +: C], 11);
    lookup(k);
    while (!corr_busy) tick();
    idle(2);
    update(12, KEY_W'($urandom), 16'h0003, 1'b1, n, t);
    check(n == exp_done_at + ROWS + 2 - t,
          $sformatf("update behind correction took %0d cycles, expected %0d", n, exp_done_at + ROWS + 2 - t));
    if (n > ROWS + 2) n_upd_wait++;

    // latent upset carried through an update sweep, then found and repaired
    idle(3);
    k = key_for(13);
    inject(0, k[0 +: C], 13);
    quiet_update(13, r_val[13], r_msk[13] | 16'h0100, 1'b1);
    k = key_for(13);
    lookup(k);
    wait_corr_done();
    idle(2);
    lookup(k);

    random_lookups(100);

    // two flips in one row keep the parity even: not detected, the model predicts
    // the wrong match bits and the test checks that no error is reported
    idle(2);
    k = key_for(14);
    inject(1, k[C +: C], 14);
    inject(1, k[C +: C], 3);
    lookup(k);
    idle(3);
    check(n_even > 0, "even upset not looked up");
    idle(5);
    check(q.size() == 0, "lookups left without a result");

    $display("mechanisms: lookup=%0d match=%0d miss=%0d multi=%0d dontcare=%0d insert=%0d delete=%0d",
             n_lookup, n_match, n_miss, n_multi, n_dc, n_insert, n_delete);
    $display("            even_upset_unseen=%0d", n_even);
    $display("            detect=%0d correct=%0d overlap=%0d ignored=%0d dual=%0d parity_bit=%0d upd_wait=%0d carried=%0d",
             n_detect, n_corr, n_overlap, n_ignored, n_dual, n_parbit, n_upd_wait, n_carry);
    check(n_match > 0,    "no matching lookup");
    check(n_miss > 0,     "no missing lookup");
    check(n_multi > 0,    "no multiple match");
    check(n_dc > 0,       "no don't-care match");
    check(n_insert > 0,   "no insert");
    check(n_delete > 0,   "no delete");
    check(n_detect > 0,   "no error detected");
    check(n_corr > 0,     "no correction");
    check(n_overlap > 0,  "no lookup during a correction");
    check(n_ignored > 0,  "no error seen while busy");
    check(n_dual > 0,     "no error in two blocks");
    check(n_parbit > 0,   "no parity-bit upset");
    check(n_upd_wait > 0, "no update waiting for a correction");
    check(n_carry > 0,    "no upset carried through an update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
