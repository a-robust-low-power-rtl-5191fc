// tsram_pkg: constants and helper functions shared by the T-SRAM modules.
//
// T-SRAM emulates a ternary CAM (TCAM) with plain SRAM blocks. The TCAM
// table is cut into L layers of K entries each (horizontal partitions), and
// every W_WORD-bit entry is cut into N sub-words of W bits (vertical
// partitions). The defaults describe the 512 x 8 configuration: 512 entries of
// 8 bits. The 512 x 8 size is the design's headline number; the sub-word width
// W = 4 is the worked example for sub-words; the split into N = 2 sub-words,
// K = 64 entries per layer and L = 8 layers is this design's own choice
// (N * W = 8 and L * K = 512).
package tsram_pkg;

  localparam int unsigned W_DEF = 4;   // bits per sub-word
  localparam int unsigned N_DEF = 2;   // sub-words (vertical partitions) per entry
  localparam int unsigned K_DEF = 64;  // entries (original addresses) per layer
  localparam int unsigned L_DEF = 8;   // layers

  // True when binary sub-word s is covered by the ternary sub-word
  // (value, dc); a 1 in dc marks a don't-care bit.
  function automatic logic subword_match(input logic [31:0] s,
                                         input logic [31:0] value,
                                         input logic [31:0] dc,
                                         input int unsigned w);
    logic [31:0] m;
    m = (w >= 32) ? '1 : ((32'd1 << w) - 32'd1);
    return (((s ^ value) & ~dc & m) == 32'd0);
  endfunction

endpackage
