// Shared constants of the grouped-crosspoint-queued (GCQ) switch.
//
// The defaults are the configuration built on the larger device: 16 ports,
// an internal speedup of 4 (so a 4x4 array of memory based switches), 32-byte
// flits carried on a 256-bit datapath, and a shared buffer of 18 KB, i.e.
// 576 flits, per memory based switch. The input- and output-FIFO depths and
// the credit return delay are this design's own choices.
package gcq_pkg;

  localparam int unsigned GCQ_N          = 16;   // switch radix
  localparam int unsigned GCQ_S          = 4;    // internal speedup = MBS size
  localparam int unsigned GCQ_FLIT_W     = 256;  // 32-byte flit
  localparam int unsigned GCQ_BUF_FLITS  = 576;  // 18 KB / 32 B per shared buffer
  localparam int unsigned GCQ_IQ_DEPTH   = 16;   // entries per VOQ (own choice)
  localparam int unsigned GCQ_OQ_DEPTH   = 8;    // output CDC FIFO entries (own choice)
  localparam int unsigned GCQ_CREDIT_DLY = 2;    // core cycles for a credit to return
  localparam int unsigned GCQ_LANE_W     = 1;    // bits per destination in the recycle bin

endpackage
