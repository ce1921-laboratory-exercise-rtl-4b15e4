// ext_pkg: shared encodings for the ARMv4 immediate-extension path.
//
// The extension select (EXTS) is a 2-bit code chosen by the instruction
// class: the four codes and their meaning follow the extender's truth table
// (0 arithmetic imm8, 1 load/store imm12, 2 branch imm24, 3 unused). The
// enum names are this design's own. Immediate field widths and the 32-bit
// ALU operand width are the ARMv4 sizes used throughout. Linted on its own,
// the package reports these constants as unused; the extender and the top
// module that import it use all of them.
package ext_pkg;

  localparam int unsigned WORD_W  = 32;  // ALU operand width
  localparam int unsigned IMM8_W  = 8;   // data-processing immediate
  localparam int unsigned IMM12_W = 12;  // load/store offset immediate
  localparam int unsigned IMM24_W = 24;  // branch offset immediate

  typedef enum logic [1:0] {
    EXT_IMM8   = 2'd0,  // zero-extend imm8
    EXT_IMM12  = 2'd1,  // zero-extend imm12
    EXT_BRANCH = 2'd2,  // sign-extend imm24, shifted left by two
    EXT_NONE   = 2'd3   // unused code: output zero
  } ext_sel_e;

endpackage
