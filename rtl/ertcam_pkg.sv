// ertcam_pkg: types shared by the error-resilient TCAM blocks.
//
// The TCAM is split column-wise into N_BLK memory blocks. Block i is addressed by
// key bits [i*C +: C] and each of its words holds one match bit per TCAM word plus
// one even-parity bit. The read/write controller state type lives here so that
// testbenches can name the states.
package ertcam_pkg;

  // States of the read/write controller (rw_ctrl).
  typedef enum logic [1:0] {
    RW_INIT  = 2'd0,  // power-up clear of every memory row and table entry
    RW_IDLE  = 2'd1,  // lookups accepted, corrections may run
    RW_WAIT  = 2'd2,  // update requested, waiting for lookups and correction to drain
    RW_SWEEP = 2'd3   // update: table write and read-modify-write of all 2^C rows
  } rw_state_e;

endpackage
