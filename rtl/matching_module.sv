// matching_module: ternary comparison of one binary-table entry with a C-bit pattern.
//
// The entry is {valid, mask, value}. The result is 1 when the entry is valid and every
// bit of the pattern equals the stored value wherever the mask bit is 0 (mask bit 1 is
// "don't care"). This is the match bit that a TCAM memory block stores at address
// "pattern" for this TCAM word. Purely combinational. The document names the block
// (Matching Module, in the correction unit); the encoding is this design's choice.
module matching_module #(
  parameter int C = 8
) (
  input  logic [2*C:0] entry,    // {valid, mask[C-1:0], value[C-1:0]}
  input  logic [C-1:0] pattern,
  output logic         match
);

  logic         valid;
  logic [C-1:0] mask, value;

  always_comb begin
    {valid, mask, value} = entry;
    match = valid && (((pattern ^ value) & ~mask) == '0);
  end

endmodule
