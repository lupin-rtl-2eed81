// lupin_pkg: types and constants shared by the Lupin mixed-precision accelerator.
//
// Outlier-First Encoding packs two neighbouring activations into one byte, the
// "pair". Which of the three pair formats a byte holds is not stored in the byte:
// it follows from the two High-Precision Enable (HP_EN) bits of the pair, which
// are decoded from the block's outlier indices.
//
//   HP_EN = 2'b00  normal-normal   byte[7:4] = INT4 element 0, byte[3:0] = INT4 element 1
//   HP_EN = 2'b01  outlier-normal  element 0 is an INT8 outlier = byte[7:0], element 1 pruned
//   HP_EN = 2'b10  normal-outlier  element 1 is an INT8 outlier = byte[7:0], element 0 pruned
//   HP_EN = 2'b11  outlier-outlier byte[7:4] = 4 MSBs of element 0, byte[3:0] = 4 MSBs of element 1
//
// HP_EN bit 0 belongs to element 0 (the left PE of the pair), bit 1 to element 1.
// The formats, the INT4/INT8 precisions and the MSB-only outlier-outlier case follow
// the published scheme; the bit order inside the byte is this design's choice.
package lupin_pkg;

  localparam int unsigned ACT_NIB_W = 4;   // low-precision activation width (INT4)
  localparam int unsigned WGT_W     = 4;   // weight width (INT4)
  localparam int unsigned PAIR_W    = 8;   // one encoded pair is one byte
  localparam int unsigned MSB_SHIFT = 4;   // shift that restores an outlier's 4 MSBs

  // Product of one INT4 weight with a full INT8 outlier, after the shift-and-add:
  // |-128 * -8| = 1024, so 12 signed bits suffice.
  localparam int unsigned PROD_W = 12;

  typedef logic [PAIR_W-1:0]       pair_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic [1:0]              hp_en_t;

  typedef enum logic [1:0] {
    PAIR_NN  = 2'b00,
    PAIR_ON0 = 2'b01,   // outlier in element 0, element 1 pruned
    PAIR_ON1 = 2'b10,   // outlier in element 1, element 0 pruned
    PAIR_OO  = 2'b11
  } pair_mode_e;

  function automatic pair_mode_e pair_mode(input hp_en_t hp);
    return pair_mode_e'(hp);
  endfunction

endpackage
