// Shared constants and types of the standard-basis CDMA network-on-chip.
//
// The default network has four nodes, each sending and receiving four-bit
// flits; these are the sizes of the block diagram of the design. The
// standard-basis code length equals the number of nodes, so one spreading
// code exists per receiver. The scheduler state type is shared by the
// scheduler and its testbench.
package cdma_noc_pkg;

  // Default number of nodes (senders = receivers).
  localparam int unsigned DEF_N_NODES = 4;
  // Default flit width in bits, sent one bit per code period.
  localparam int unsigned DEF_FLIT_W  = 4;

  // Phase of the bit-synchronous frame run by the network scheduler.
  typedef enum logic [0:0] {
    PH_SCHED    = 1'b0,  // one cycle: sample requests, arbitrate, assign codes
    PH_TRANSFER = 1'b1   // FLIT_W * N_NODES chip cycles on the binary-sum wire
  } phase_e;

endpackage
