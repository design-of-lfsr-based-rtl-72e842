// rw_ctrl: read/write controller of the error-resilient TCAM.
//
// Owns the read and write ports of the N_BLK memory blocks and the write port of the
// binary table.
//   Lookups: in RW_IDLE a lookup (srch_en) reads block i at key slice [i*C +: C].
//   Correction: the write port carries the correction vector (corr_we one-hot,
//     corr_addr, corr_data) whenever it is asserted. Corrections only run in RW_IDLE
//     and RW_WAIT, so they never compete with the update sweep.
//   Update of TCAM word upd_addr with {upd_valid, upd_mask, upd_value}: accepted in
//     RW_IDLE (ready). The controller waits in RW_WAIT until no lookup is in the
//     pipeline and no correction runs, then sweeps rows 0..2^C-1 of every block: it
//     reads row r and, one cycle later, writes it back with the word's match bit
//     replaced by the ternary match of r against the word's slice and the parity bit
//     adjusted by the change (so an upset already present in the row stays
//     detectable). In the first N_BLK cycles of the sweep it also writes the word's
//     slices into the binary table at {block, upd_addr}. Lookups are refused during
//     RW_WAIT and RW_SWEEP because the sweep uses the read port.
//   Reset: RW_INIT writes zero to every memory row and table entry (no valid TCAM
//     words, parity even) before lookups are accepted.
// The document says the binary table is kept for updates but not how updates run;
// the sweep, the refusal of lookups during it and the power-up clear are this
// design's choices.
//
// Timing: an update occupies 1 (accept) + wait + 2^C + 1 cycles; the power-up clear
// max(2^C, N_BLK*D) cycles. ready = RW_IDLE.
module rw_ctrl
  import ertcam_pkg::*;
#(
  parameter int N_BLK = 2,
  parameter int C     = 8,
  parameter int D     = 16,
  localparam int IW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int DA   = (D > 1) ? $clog2(D) : 1,
  localparam int W    = N_BLK * C
) (
  input  logic              clk,
  input  logic              rst,
  // lookup request
  input  logic              srch_en,
  input  logic [W-1:0]      srch_key,
  output logic              srch_go,        // lookup issued this cycle
  // update request
  input  logic              upd_en,
  input  logic [DA-1:0]     upd_addr,
  input  logic [W-1:0]      upd_value,
  input  logic [W-1:0]      upd_mask,
  input  logic              upd_valid,
  // pipeline and correction status
  input  logic              pipe_busy,      // lookups in flight
  input  logic              corr_busy,
  output logic              corr_allow,     // a correction may start
  // correction write
  input  logic [N_BLK-1:0]  corr_we,
  input  logic [C-1:0]      corr_addr,
  input  logic [D:0]        corr_data,
  // memory block ports
  output logic              mem_re,
  output logic [C-1:0]      mem_raddr [N_BLK],
  input  logic [D:0]        mem_rdata [N_BLK],
  output logic [N_BLK-1:0]  mem_we,
  output logic [C-1:0]      mem_waddr,
  output logic [D:0]        mem_wdata [N_BLK],
  // binary table write port
  output logic              bt_we,
  output logic [IW+DA-1:0]  bt_waddr,
  output logic [2*C:0]      bt_wdata,
  output logic              ready
);

  localparam int ROWS  = 2 ** C;
  localparam int INITN = (ROWS > N_BLK * D) ? ROWS : N_BLK * D;
  localparam int KW    = $clog2(INITN + 1);
  localparam int BW    = $clog2(D + 1);

  logic [KW-1:0]  k;           // sweep counter
  logic [DA-1:0]  u_addr;
  logic [W-1:0]   u_value, u_mask;
  logic           u_valid;
  rw_state_e      state;
  logic           rd_pend;     // a sweep row was read last cycle
  logic [C-1:0]   rd_row;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= RW_INIT;
      k       <= '0;
      rd_pend <= 1'b0;
      rd_row  <= '0;
      u_addr  <= '0;
      u_value <= '0;
      u_mask  <= '0;
      u_valid <= 1'b0;
    end else begin
      rd_pend <= 1'b0;
      unique case (state)
        RW_INIT: begin
          k <= k + 1'b1;
          if (k == KW'(INITN - 1)) begin
            state <= RW_IDLE;
            k     <= '0;
          end
        end
        RW_IDLE: begin
          if (upd_en) begin
            state   <= RW_WAIT;
            u_addr  <= upd_addr;
            u_value <= upd_value;
            u_mask  <= upd_mask;
            u_valid <= upd_valid;
          end
        end
        RW_WAIT: begin
          if (!pipe_busy && !corr_busy) begin
            state <= RW_SWEEP;
            k     <= '0;
          end
        end
        RW_SWEEP: begin
          k <= k + 1'b1;
          if (k < KW'(ROWS)) begin
            rd_pend <= 1'b1;
            rd_row  <= C'(k);
          end
          if (k == KW'(ROWS)) begin
            state <= RW_IDLE;
            k     <= '0;
          end
        end
        default: state <= RW_INIT;
      endcase
    end
  end

  // Match bit of the updated word for the row being written back.
  logic [N_BLK-1:0] new_bit;

  for (genvar i = 0; i < N_BLK; i++) begin : g_blk
    matching_module #(.C(C)) u_match (
      .entry  ({u_valid, u_mask[i*C +: C], u_value[i*C +: C]}),
      .pattern(rd_row),
      .match  (new_bit[i])
    );
  end

  always_comb begin
    ready      = (state == RW_IDLE);
    srch_go    = ready && srch_en;
    corr_allow = (state == RW_IDLE) || (state == RW_WAIT);

    // read port
    mem_re = 1'b0;
    for (int i = 0; i < N_BLK; i++) mem_raddr[i] = srch_key[i*C +: C];
    if (srch_go) begin
      mem_re = 1'b1;
    end else if (state == RW_SWEEP && k < KW'(ROWS)) begin
      mem_re = 1'b1;
      for (int i = 0; i < N_BLK; i++) mem_raddr[i] = C'(k);
    end

    // write port
    mem_we    = '0;
    mem_waddr = corr_addr;
    for (int i = 0; i < N_BLK; i++) mem_wdata[i] = corr_data;
    bt_we    = 1'b0;
    bt_waddr = '0;
    bt_wdata = '0;
    if (state == RW_INIT) begin
      mem_we    = (k < KW'(ROWS)) ? '1 : '0;
      mem_waddr = C'(k);
      for (int i = 0; i < N_BLK; i++) mem_wdata[i] = '0;
      bt_we    = (k < KW'(N_BLK * D));
      bt_waddr = (IW+DA)'(k);
    end else if (state == RW_SWEEP) begin
      if (rd_pend) begin
        mem_we    = '1;
        mem_waddr = rd_row;
        for (int i = 0; i < N_BLK; i++) begin
          mem_wdata[i]           = mem_rdata[i];
          mem_wdata[i][BW'(u_addr)] = new_bit[i];
          mem_wdata[i][D]      = mem_rdata[i][D] ^ mem_rdata[i][BW'(u_addr)] ^ new_bit[i];
        end
      end
      if (k < KW'(N_BLK)) begin
        bt_we    = 1'b1;
        bt_waddr = {IW'(k), u_addr};
        for (int i = 0; i < N_BLK; i++)
          if (k == KW'(i)) bt_wdata = {u_valid, u_mask[i*C +: C], u_value[i*C +: C]};
      end
    end else begin
      mem_we = corr_we;
    end
  end

  // The update sweep writes the table entries within its 2^C + 1 cycles.
  initial assert (N_BLK <= 2 ** C) else $error("rw_ctrl: N_BLK must not exceed 2^C");

endmodule
