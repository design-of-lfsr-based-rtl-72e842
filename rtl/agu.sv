// agu: address generation unit and write control of the background correction.
//
// Started with the ID of the damaged memory block (Base Address register), it runs a
// Mod-D counter through 0..D-1 and reads the binary table at {ID, count}: the ID bits
// are the most significant and select the block's sub-block, the counter bits select
// one TCAM word per cycle, as the document describes. A comparator flags the last
// count. When the correction vector is ready (ecv_done) the unit raises the write
// enable of the damaged block only: the ID is decoded to one-hot and used to steer the
// write enable (the document's multi-bit multiplexer).
//
// Timing: start in cycle s; table reads are issued in cycles s+1..s+D (rd_valid,
// rd_last on the last); busy is high from s+1 until and including the ecv_done cycle,
// in which mem_we is driven. start is ignored while busy.
module agu #(
  parameter int N_BLK = 2,
  parameter int D     = 16,
  localparam int IW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int DA   = (D > 1) ? $clog2(D) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [IW-1:0]     base_addr,
  input  logic              ecv_done,
  output logic              busy,
  output logic              rd_valid,
  output logic              rd_last,
  output logic [IW+DA-1:0]  bt_raddr,
  output logic [N_BLK-1:0]  mem_we
);

  logic          running;
  logic [DA-1:0] cnt;        // Mod-D counter
  logic [IW-1:0] id;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      running <= 1'b0;
      cnt     <= '0;
      id      <= '0;
    end else begin
      if (start && !busy) begin
        busy    <= 1'b1;
        running <= 1'b1;
        cnt     <= '0;
        id      <= base_addr;
      end else begin
        if (running) begin
          cnt <= (cnt == DA'(D - 1)) ? '0 : cnt + 1'b1;
          if (rd_last) running <= 1'b0;
        end
        if (ecv_done) busy <= 1'b0;
      end
    end
  end

  // Comparator and table address.
  always_comb begin
    rd_valid = running;
    rd_last  = running && (cnt == DA'(D - 1));
    bt_raddr = {id, cnt};
  end

  // Write-enable steering to the damaged block.
  always_comb begin
    mem_we = '0;
    if (busy && ecv_done) mem_we[id] = 1'b1;
  end

endmodule
