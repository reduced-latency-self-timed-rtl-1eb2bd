// fifo_pkg: constants and helpers shared by the self-timed FIFO family.
//
// All FIFOs in this library move words over two-phase (transition) bundled-data
// channels: a request wire that toggles once per word, an acknowledge wire that
// toggles back once the word is taken, and a data bus that is stable while the
// request and acknowledge differ. A channel is idle when req == ack.
//
// The defaults follow the comparison the designs were made for: 16-word FIFOs
// with 8-bit words (a 32-bit version is the other size studied).
//
// Origin: The 16-word depth and the 8- and 32-bit widths are the sizes the
// original FIFOs were compared at; 8 bits as the default is this design's
// choice.
package fifo_pkg;

  localparam int unsigned FIFO_WIDTH = 8;
  localparam int unsigned FIFO_DEPTH = 16;

endpackage
