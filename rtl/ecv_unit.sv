// ecv_unit: error correction vector (ECV) computation.
//
// Rebuilds the memory word that a damaged block should hold at address "pattern" (the
// Bit Pattern register). The binary table delivers one TCAM word's entry for that block
// per cycle, in word order 0..D-1. The matching module compares it with the pattern;
// the match bit is shifted into the match-bit register and XORed into the parity
// bit P. After D entries the register holds ecv = {P, match bits}: the word with
// even parity that the write port then stores over the damaged word. This is the
// document's ECV computation unit; the shift order is this design's choice.
//
// Timing: req_valid/req_last mark the cycles in which the table read is issued (from
// the AGU); the entry arrives one cycle later, so the unit delays them by one cycle.
// start clears P. done pulses one cycle after the last entry, with ecv valid; ecv
// holds until the next start.
module ecv_unit #(
  parameter int C = 8,
  parameter int D = 16   // TCAM words, at least 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         req_valid,
  input  logic         req_last,
  input  logic [2*C:0] entry,
  input  logic [C-1:0] pattern,
  output logic         done,
  output logic [D:0]   ecv
);

  logic         in_valid, in_last, m;
  logic [D-1:0] bits;
  logic         p;

  matching_module #(.C(C)) u_match (.entry(entry), .pattern(pattern), .match(m));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_valid <= 1'b0;
      in_last  <= 1'b0;
      done     <= 1'b0;
      bits     <= '0;
      p        <= 1'b0;
    end else begin
      in_valid <= req_valid;
      in_last  <= req_valid && req_last;
      done     <= in_valid && in_last;
      if (start) begin
        p <= 1'b0;
      end else if (in_valid) begin
        bits <= {m, bits[D-1:1]};
        p <= p ^ m;
      end
    end
  end

  assign ecv = {p, bits};

endmodule
