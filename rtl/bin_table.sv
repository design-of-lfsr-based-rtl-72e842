// bin_table: the binary-encoded TCAM table kept beside the TCAM memory blocks.
//
// For every TCAM word and every memory block it holds the C-bit slice of that word:
// {valid, mask[C-1:0], value[C-1:0]}, where a mask bit of 1 marks a "don't care"
// position and valid=0 marks an empty TCAM word. Following the document, the address
// is {block ID, word index}: the log2(N) ID bits are the most significant and point to
// the start of the block's sub-block, the log2(D) low bits pick the word. The table
// is written when a TCAM word is updated and read, one word per cycle, when the
// correction rebuilds a damaged memory word.
//
// Timing: synchronous write; synchronous read, data valid the cycle after re,
// held while re is low. The array is not reset; rw_ctrl clears it after reset.
module bin_table #(
  parameter int N_BLK = 2,   // memory blocks
  parameter int C     = 8,   // key bits per block
  parameter int D     = 16,  // TCAM words
  localparam int IW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int CW   = (D > 1) ? $clog2(D) : 1,
  localparam int AW   = IW + CW,
  localparam int EW   = 2*C + 1
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [EW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [EW-1:0] wdata
);

  logic [EW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
