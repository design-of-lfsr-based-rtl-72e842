// ertcam_top: error-resilient ternary CAM with parity detection and background
// correction from a binary-encoded table.
//
// The TCAM of D words by KEY_W bits is stored column-wise in N_BLK memory blocks
// (lfsr_mem). Block i is addressed by key bits [i*C +: C] (C = KEY_W/N_BLK) and its
// word at address a holds, for every TCAM word, whether that word's slice matches a,
// plus an even-parity bit. A lookup reads all blocks at once and ANDs their words
// into the match vector; the lowest matching word index is the match address.
// Every word read is parity checked (err_detect). When a block's word is damaged its
// ID and the key slice that addressed it are captured; the correction unit then
// walks the block's part of the binary table (agu, bin_table), recomputes the
// damaged word one TCAM word per cycle (ecv_unit) and writes it back through the
// write port while lookups continue through the read port.
// Lookups return their result with an error flag, so a result read from a damaged
// word can be discarded or retried.
//
// Interface (names of the lookup port follow the design's simulation trace):
//   din/en        lookup key and request, accepted when ready is high
//   match_valid   two cycles after an accepted lookup; with match, match_addr,
//                 match_vec, err (the lookup read a damaged word) and err_vec
//                 (which blocks were damaged)
//   we, wr_addr, wr_mask, wr_valid: write TCAM word wr_addr with value din, mask
//                 wr_mask (1 = don't care) and wr_valid (0 deletes the word);
//                 accepted when ready is high, takes about 2^C + 3 cycles
//   corr_busy     a correction is running; corr_done pulses when it writes
//   inj_*         invert one stored bit of one block (upset model for testing)
// A correction takes D + 3 cycles from the lookup result that found the error to the
// write of the repaired word.
module ertcam_top #(
  parameter int KEY_W = 16,  // search key bits
  parameter int N_BLK = 2,   // memory blocks
  parameter int D     = 16,  // TCAM words
  localparam int C    = KEY_W / N_BLK,
  localparam int IW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int DA   = (D > 1) ? $clog2(D) : 1,
  localparam int BW   = $clog2(D + 1)
) (
  input  logic             clk,
  input  logic             reset,
  output logic             ready,
  // lookup
  input  logic             en,
  input  logic [KEY_W-1:0] din,
  output logic             match_valid,
  output logic             match,
  output logic [DA-1:0]    match_addr,
  output logic [D-1:0]     match_vec,
  output logic             err,
  output logic [N_BLK-1:0] err_vec,
  // update
  input  logic             we,
  input  logic [DA-1:0]    wr_addr,
  input  logic [KEY_W-1:0] wr_mask,
  input  logic             wr_valid,
  // correction status
  output logic             corr_busy,
  output logic             corr_done,
  // upset injection
  input  logic             inj_en,
  input  logic [IW-1:0]    inj_blk,
  input  logic [C-1:0]     inj_addr,
  input  logic [BW-1:0]    inj_bit
);

  // Memory block ports.
  logic             mem_re;
  logic [C-1:0]     mem_raddr [N_BLK];
  logic [D:0]       mem_rdata [N_BLK];
  logic [N_BLK-1:0] mem_we;
  logic [C-1:0]     mem_waddr;
  logic [D:0]       mem_wdata [N_BLK];

  for (genvar i = 0; i < N_BLK; i++) begin : g_mem
    lfsr_mem #(.AW(C), .DW(D + 1)) u_mem (
      .clk     (clk),
      .re      (mem_re),
      .raddr   (mem_raddr[i]),
      .rdata   (mem_rdata[i]),
      .we      (mem_we[i]),
      .waddr   (mem_waddr),
      .wdata   (mem_wdata[i]),
      .inj_en  (inj_en && (inj_blk == IW'(i))),
      .inj_addr(inj_addr),
      .inj_bit (inj_bit)
    );
  end

  // Lookup and error detection.
  logic          srch_go, corr_allow, cap;
  logic [IW-1:0] base_addr;
  logic [C-1:0]  bit_pattern;
  logic          s1_busy;

  err_detect #(.N_BLK(N_BLK), .C(C), .D(D)) u_detect (
    .clk        (clk),
    .rst        (reset),
    .srch       (srch_go),
    .key        (din),
    .rdata      (mem_rdata),
    .cap_en     (corr_allow && !corr_busy && !cap),
    .res_valid  (match_valid),
    .match_vec  (match_vec),
    .match      (match),
    .match_addr (match_addr),
    .err        (err),
    .err_vec    (err_vec),
    .cap        (cap),
    .base_addr  (base_addr),
    .bit_pattern(bit_pattern)
  );

  always_ff @(posedge clk) begin
    if (reset) s1_busy <= 1'b0;
    else       s1_busy <= srch_go;
  end

  // Background correction.
  logic             rd_valid, rd_last, ecv_done;
  logic [IW+DA-1:0] bt_raddr;
  logic [2*C:0]     bt_rdata;
  logic [N_BLK-1:0] corr_we;
  logic [D:0]       ecv;

  agu #(.N_BLK(N_BLK), .D(D)) u_agu (
    .clk      (clk),
    .rst      (reset),
    .start    (cap),
    .base_addr(base_addr),
    .ecv_done (ecv_done),
    .busy     (corr_busy),
    .rd_valid (rd_valid),
    .rd_last  (rd_last),
    .bt_raddr (bt_raddr),
    .mem_we   (corr_we)
  );

  logic             bt_we;
  logic [IW+DA-1:0] bt_waddr;
  logic [2*C:0]     bt_wdata;

  bin_table #(.N_BLK(N_BLK), .C(C), .D(D)) u_table (
    .clk  (clk),
    .re   (rd_valid),
    .raddr(bt_raddr),
    .rdata(bt_rdata),
    .we   (bt_we),
    .waddr(bt_waddr),
    .wdata(bt_wdata)
  );

  ecv_unit #(.C(C), .D(D)) u_ecv (
    .clk      (clk),
    .rst      (reset),
    .start    (cap),
    .req_valid(rd_valid),
    .req_last (rd_last),
    .entry    (bt_rdata),
    .pattern  (bit_pattern),
    .done     (ecv_done),
    .ecv      (ecv)
  );

  assign corr_done = ecv_done;

  // Read/write controller.
  rw_ctrl #(.N_BLK(N_BLK), .C(C), .D(D)) u_rw (
    .clk       (clk),
    .rst       (reset),
    .srch_en   (en),
    .srch_key  (din),
    .srch_go   (srch_go),
    .upd_en    (we),
    .upd_addr  (wr_addr),
    .upd_value (din),
    .upd_mask  (wr_mask),
    .upd_valid (wr_valid),
    .pipe_busy (s1_busy || match_valid),
    .corr_busy (corr_busy || cap),
    .corr_allow(corr_allow),
    .corr_we   (corr_we),
    .corr_addr (bit_pattern),
    .corr_data (ecv),
    .mem_re    (mem_re),
    .mem_raddr (mem_raddr),
    .mem_rdata (mem_rdata),
    .mem_we    (mem_we),
    .mem_waddr (mem_waddr),
    .mem_wdata (mem_wdata),
    .bt_we     (bt_we),
    .bt_waddr  (bt_waddr),
    .bt_wdata  (bt_wdata),
    .ready     (ready)
  );

  initial assert (KEY_W % N_BLK == 0) else $error("ertcam_top: KEY_W must divide into N_BLK slices");

endmodule
