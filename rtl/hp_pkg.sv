// hp_pkg: shared constants and types of the HyperPlane optical backplane.
//
// The default sizes are the "conservative" smart pixel array: 32 optical
// channels of 32 bits per array, split into two slices of 16 channels, each
// slice with 2 electrical injector and 2 extractor channels; electrical
// channels are 64 bits wide at half the optical clock. A PCB holds two such
// arrays per stream, and a backplane has 16 PCBs.
//
// Every channel word travels with two framing bits, packed as
// {vld, sop, data}: vld marks a word of a packet, sop marks its first word
// (the header). The framing bits are this design's choice; the source
// architecture only says packets are of any length and arrive at any time.
//
// The 8-bit channel control word follows the "typically 8 bits of control"
// per channel: a 2-bit expander select (0 = pass the optical input through,
// k = drive injector k-1), a 3-bit one-hot concentrator enable, a filter bit
// that puts the channel in intelligent (address-filtered) mode, and a 2-bit
// programmable delay (1 to 4 pipeline stages).
package hp_pkg;

  localparam int unsigned W_OPT  = 32;  // optical channel width (bits)
  localparam int unsigned W_ELE  = 64;  // electrical channel width (bits)
  localparam int unsigned C_SLC  = 16;  // optical channels per slice
  localparam int unsigned I_SLC  = 2;   // injector channels per slice
  localparam int unsigned E_SLC  = 2;   // extractor channels per slice
  localparam int unsigned S_SPA  = 2;   // slices per smart pixel array
  localparam int unsigned A_BITS = 16;  // PCB address bits (one-hot, 16 PCBs)
  localparam int unsigned N_PCB  = 16;  // PCBs (nodes) on the backplane
  localparam int unsigned SPAS_PCB = 2;  // smart pixel arrays per PCB per stream

  localparam int unsigned DLY_DEPTH  = 4;  // deepest programmable delay
  localparam int unsigned MAX_INJ    = 3;  // injectors the 2-bit select can name
  localparam int unsigned MAX_EXT    = 3;  // extractors the 3-bit enable can name

  // Channel control word (8 bits).
  typedef struct packed {
    logic [1:0] dly;       // extra pipeline stages beyond the first (0..3)
    logic       filter;    // 1: intelligent mode, extract by header address
    logic [2:0] conc_en;   // one-hot static extractor enable (reconfigurable mode)
    logic [1:0] exp_sel;   // 0: pass-through, k: injector k-1
  } ccu_cfg_t;


  // Position of the framing bits in a channel word of width W+2.
  function automatic int unsigned vld_bit(int unsigned w);
    return w + 1;
  endfunction
  function automatic int unsigned sop_bit(int unsigned w);
    return w;
  endfunction

endpackage
