// err_detect: lookup result and soft-error detection of the error-resilient TCAM.
//
// A lookup reads one word from each of the N_BLK memory blocks, block i addressed by
// key slice [i*C +: C]. This unit
//   - ANDs the D match bits of all blocks bit by bit: a TCAM word matches only if
//     every one of its slices matches (Match info register),
//   - XORs all bits of each block's word (D match bits and the parity bit): a 1 means
//     that word holds an odd number of flipped bits (per-block error signal),
//   - encodes the error signals into the ID of the damaged block (N to log2N encoder,
//     lowest ID first if several blocks are damaged),
//   - selects that block's key slice with a multiplexer; that slice is the address of
//     the damaged word,
//   - loads the ID into the Base Address register and the slice into the Bit Pattern
//     register, which start the background correction.
// The structure follows the document's error-detection figure; the priority among
// several damaged blocks and the match-address priority are this design's choices.
//
// Timing: srch/key are given in the cycle the memories are read (cycle t); the block
// words arrive in rdata at t+1; results are registered and valid at t+2
// (res_valid). cap pulses at t+2 when an error was found and cap_en was high at t+1;
// base_addr and bit_pattern then hold until the next capture. cap_en must stay low
// while a correction runs so that the registers stay stable for it.
module err_detect #(
  parameter int N_BLK = 2,
  parameter int C     = 8,
  parameter int D     = 16,
  localparam int IW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int DA   = (D > 1) ? $clog2(D) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 srch,                 // lookup issued to the memories
  input  logic [N_BLK*C-1:0]   key,                  // its search key
  input  logic [D:0]           rdata [N_BLK],        // block words, one cycle later
  input  logic                 cap_en,               // correction unit can take an error
  output logic                 res_valid,
  output logic [D-1:0]         match_vec,            // Match info register
  output logic                 match,
  output logic [DA-1:0]        match_addr,
  output logic                 err,                  // this lookup read a damaged word
  output logic [N_BLK-1:0]     err_vec,
  output logic                 cap,                  // error captured: start correction
  output logic [IW-1:0]        base_addr,            // Base Address register (block ID)
  output logic [C-1:0]         bit_pattern           // Bit Pattern register (word address)
);

  // Stage 1: align the key with the synchronous memory read.
  logic                 s1_valid;
  logic [N_BLK*C-1:0]   s1_key;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= srch;
    if (srch) s1_key <= key;
  end

  // Bitwise AND and bitwise XOR.
  logic [D-1:0]     and_vec;
  logic [N_BLK-1:0] par_err;

  always_comb begin
    and_vec = '1;
    for (int i = 0; i < N_BLK; i++) begin
      and_vec    &= rdata[i][D-1:0];
      par_err[i]  = ^rdata[i];
    end
  end

  // N to log2N encoder and key-slice multiplexer.
  logic          err_any;
  logic [IW-1:0] err_id;
  logic [C-1:0]  err_slice;

  prio_encoder #(.N(N_BLK)) u_err_enc (.req(par_err), .any(err_any), .idx(err_id));

  always_comb err_slice = s1_key[err_id*C +: C];

  // Stage 2 registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      res_valid   <= 1'b0;
      match_vec   <= '0;
      err_vec     <= '0;
      cap         <= 1'b0;
      base_addr   <= '0;
      bit_pattern <= '0;
    end else begin
      res_valid <= s1_valid;
      cap       <= s1_valid && err_any && cap_en;
      if (s1_valid) begin
        match_vec <= and_vec;
        err_vec   <= par_err;
      end
      if (s1_valid && err_any && cap_en) begin
        base_addr   <= err_id;
        bit_pattern <= err_slice;
      end
    end
  end

  // Match address from the match info register.
  prio_encoder #(.N(D)) u_match_enc (.req(match_vec), .any(match), .idx(match_addr));

  assign err = |err_vec;

endmodule
