// src2_mux: second-operand source multiplexer of the ARMv4 arithmetic path.
//
// Picks what travels toward the rotator and on to the ALU as its second
// source: the register file's second read value, or the extended immediate
// coming from the extender. Its place between the register file, the
// extender and the rotator follows the arithmetic-circuit diagram; the
// select name and polarity (sel_imm = 1 takes the immediate) are this
// design's own choice.
// Interface: two WIDTH-bit data inputs, one select, one WIDTH-bit output.
// Timing: combinational, no clock.
module src2_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] reg_data,
  input  logic [WIDTH-1:0] imm_data,
  input  logic             sel_imm,
  output logic [WIDTH-1:0] src2
);

  always_comb begin
    if (sel_imm) src2 = imm_data;
    else         src2 = reg_data;
  end

endmodule
