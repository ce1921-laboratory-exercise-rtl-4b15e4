// arm_src2_path: immediate/register second-operand path of an ARMv4
// single-cycle arithmetic circuit.
//
// The immediate field of the current instruction enters the extender, which
// widens it to 32 bits according to `exts`; src2_mux then chooses between
// that constant and the register file's second read value. The result,
// `src2_unrotated`, is what the rotator receives before it hands SRC2 to the
// ALU. The register file, the rotator and the ALU are outside this block:
// their connections are brought out as ports (`rf_rd2` in, `src2_unrotated`
// out). The extended constant is also brought out as `imm32` for
// observation. The block layout follows the arithmetic-circuit diagram; the
// port names and the mux select polarity are this design's own.
// Timing: entirely combinational.
module arm_src2_path
  import ext_pkg::*;
(
  input  logic [IMM8_W-1:0]  imm8,
  input  logic [IMM12_W-1:0] imm12,
  input  logic [IMM24_W-1:0] imm24,
  input  ext_sel_e           exts,
  input  logic [WORD_W-1:0]  rf_rd2,         // register file second read data
  input  logic               src2_sel_imm,   // 1: immediate, 0: register
  output logic [WORD_W-1:0]  imm32,          // extended constant
  output logic [WORD_W-1:0]  src2_unrotated  // to the rotator
);

  extender u_extender (
    .imm8  (imm8),
    .imm12 (imm12),
    .imm24 (imm24),
    .exts  (exts),
    .imm32 (imm32)
  );

  src2_mux #(.WIDTH(WORD_W)) u_src2_mux (
    .reg_data (rf_rd2),
    .imm_data (imm32),
    .sel_imm  (src2_sel_imm),
    .src2     (src2_unrotated)
  );

endmodule
