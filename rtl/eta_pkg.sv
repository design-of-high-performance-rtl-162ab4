// eta_pkg: sizes shared by the error-tolerant adder (ETA) blocks.
//
// The ETA splits an ETA_WIDTH-bit addition at a joining point: the upper
// ETA_WIDTH-ETA_INACC_W bits are added exactly, the lower ETA_INACC_W bits
// without any carry. The 32-bit design is divided 12 (upper) / 20 (lower),
// and the control block of the lower part is laid out as groups of
// ETA_GROUP cells (five groups of four). Nothing here is clocked.
package eta_pkg;
  localparam int unsigned ETA_WIDTH   = 32;
  localparam int unsigned ETA_INACC_W = 20;
  localparam int unsigned ETA_GROUP   = 4;
endpackage
