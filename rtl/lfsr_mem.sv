// lfsr_mem: one TCAM memory block ("LFSR" block) of the error-resilient TCAM.
//
// A simple dual-port RAM of 2**AW words by DW bits. In the TCAM, the address is a
// C-bit slice of the search key and the word holds one match bit per TCAM word
// (bits DW-2..0) and an even-parity bit (bit DW-1), so a lookup reads, in one cycle,
// which TCAM words agree with that key slice. The document sets these blocks up as
// dual-port RAM with a read and a write port that work in parallel, which is what
// lets the background correction write while lookups keep reading.
//
// Interface and timing:
//   re/raddr -> rdata : synchronous read, data valid the cycle after re. rdata
//                       holds its value when re is low.
//   we/waddr/wdata    : synchronous write. A read of the address being written in
//                       the same cycle returns the old word (read-first).
//   inj_en/inj_addr/inj_bit : inverts one stored bit at the clock edge. This models a
//                       single-event upset for testing; it is not part of the
//                       document's design and is tied low in normal use. A write to
//                       the same word in the same cycle takes precedence.
// The array is not reset, like an FPGA block RAM; rw_ctrl clears it after reset.
module lfsr_mem #(
  parameter int AW = 8,   // address bits (C, key bits per block)
  parameter int DW = 17   // word bits (D match bits + 1 parity bit)
) (
  input  logic                  clk,
  input  logic                  re,
  input  logic [AW-1:0]         raddr,
  output logic [DW-1:0]         rdata,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [DW-1:0]         wdata,
  input  logic                  inj_en,
  input  logic [AW-1:0]         inj_addr,
  input  logic [$clog2(DW)-1:0] inj_bit
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (inj_en) mem[inj_addr][inj_bit] <= ~mem[inj_addr][inj_bit];
    if (we)     mem[waddr] <= wdata;
  end

endmodule
