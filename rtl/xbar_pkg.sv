// xbar_pkg: constants shared by the 16x16 bit-slice crossbar chip and the
// 33-chip crossbar system built from it.
//
// The chip connects 16 processing elements (PEs) to each other. Every PE
// names its destination with a 4-bit PE number, so the chip is 16x16 by
// construction. The system stacks one chip per bit of a 32-bit word plus
// one chip for a control bit, WORD_W + CTRL_W = 33 chips in all. These numbers are the
// design's own; nothing here is configurable per instance.
package xbar_pkg;
  localparam int unsigned N_PE      = 16;  // PEs served by one chip
  localparam int unsigned PE_ADDR_W = 4;   // width of a destination PE number
  localparam int unsigned WORD_W    = 32;  // address/data bits per word
  localparam int unsigned CTRL_W    = 1;   // control bits per word (one extra chip)

  typedef logic [PE_ADDR_W-1:0] pe_addr_t;
endpackage
