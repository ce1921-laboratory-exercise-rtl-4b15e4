// extender: ARMv4 immediate extender.
//
// An ARMv4 instruction carries its constant in a short immediate field; the
// ALU wants 32 bits. This purely combinational block widens one of three
// fields to a 32-bit operand, chosen by the 2-bit select `exts`:
//   EXT_IMM8   (0): 24 zero bits & imm8           (data-processing constant)
//   EXT_IMM12  (1): 20 zero bits & imm12          (load/store offset)
//   EXT_BRANCH (2): 6 copies of imm24[23] & imm24 & 2'b00
//                   (branch offset: sign-extended word offset in bytes)
//   EXT_NONE   (3): all zeros (code not used)
// This table is the documented behaviour of the component; it is a 4-way
// multiplexer of pre-formed 32-bit words. All three fields are separate
// inputs, as in the documented interface; slicing them out of the
// instruction word is left to the surrounding datapath.
// Timing: no clock; imm32 settles one multiplexer delay after any input.
module extender
  import ext_pkg::*;
(
  input  logic [IMM8_W-1:0]  imm8,
  input  logic [IMM12_W-1:0] imm12,
  input  logic [IMM24_W-1:0] imm24,
  input  ext_sel_e           exts,
  output logic [WORD_W-1:0]  imm32
);

  always_comb begin
    unique case (exts)
      EXT_IMM8:   imm32 = {{(WORD_W - IMM8_W){1'b0}}, imm8};
      EXT_IMM12:  imm32 = {{(WORD_W - IMM12_W){1'b0}}, imm12};
      EXT_BRANCH: imm32 = {{(WORD_W - IMM24_W - 2){imm24[IMM24_W-1]}}, imm24, 2'b00};
      default:    imm32 = '0;
    endcase
  end

endmodule
