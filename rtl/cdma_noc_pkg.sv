// cdma_noc_pkg: sizes and types shared by the CDMA network-on-chip.
//
// The network joins NODES network nodes through one shared CDMA channel. Each
// node spreads its data with its own orthogonal code of CODE_LEN chips, and all
// data chips are added into one multi-level sum per data-path lane. A node
// sends DP_W bits per symbol (the "data path width"); a FLIT_W-bit word takes
// FLIT_W/DP_W symbols. A packet is one header word followed by PKT_LEN payload
// words. The six-node network, the 8-chip codes and the 1/8/16/32-bit data-path
// family follow the source design; the word width, packet length and header
// layout are this implementation's own choices.
package cdma_noc_pkg;

  parameter int unsigned NODES    = 6;   // network nodes
  parameter int unsigned CODE_LEN = 8;   // chips per spreading code
  parameter int unsigned FLIT_W   = 32;  // host word (flit) width
  parameter int unsigned DP_W     = 32;  // bits encoded per symbol (data path width)
  parameter int unsigned PKT_LEN  = 4;   // payload words per packet
  parameter int unsigned FIFO_DEPTH = 16; // words per packet buffer

  parameter int unsigned ADDR_W = $clog2(NODES);
  parameter int unsigned SUM_W  = $clog2(NODES + 1);  // width of one channel sum
  parameter int unsigned CODE_W = $clog2(CODE_LEN);   // code index width

  // Header word. Only dest is needed to set up a transfer; the rest travels
  // in-band so the receiving Node IF can rebuild the message.
  typedef struct packed {
    logic [FLIT_W-24:0] rsvd;   // zero
    logic [7:0]         seq;    // packet number within the message
    logic               last;   // last packet of the message
    logic [3:0]         len;    // valid payload words, 1..PKT_LEN
    logic [3:0]         src;    // sending node
    logic [5:0]         dest;   // destination node
  } hdr_t;

  // Spreading code of a node: Walsh (Hadamard) row node+1. Row 0 (all zeros)
  // is unbalanced and is never used.
  function automatic logic [CODE_W-1:0] node_code(input logic [ADDR_W-1:0] node);
    return CODE_W'(node) + CODE_W'(1);
  endfunction

endpackage
