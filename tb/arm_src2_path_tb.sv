// arm_src2_path_tb: end-to-end testbench of the immediate/register
// second-operand path, at its default sizes.
//
// Plays the documented simulation sequence (select counting 0..3 with a fixed
// set of immediate fields) through the path with the immediate selected,
// then a stream of random operations that mix register and immediate
// operands. Each mechanism is counted: the four extension modes, a positive
// and a negative branch offset, and both multiplexer settings; one that
// never happens counts as a failure. Expected values come from an
// arithmetic model of the path. Watchdog included.
`timescale 1ns/1ps
module arm_src2_path_tb;
  import ext_pkg::*;

  logic [7:0]  imm8;
  logic [11:0] imm12;
  logic [23:0] imm24;
  ext_sel_e    exts;
  logic [31:0] rf_rd2, imm32, src2_unrotated;
  logic        src2_sel_imm;

  int checks = 0;
  int failures = 0;
  int n_imm8 = 0, n_imm12 = 0, n_br_pos = 0, n_br_neg = 0, n_none = 0;
  int n_reg = 0, n_imm = 0;
  logic clk;
  always begin
    clk = 1'b0; #5;
    clk = 1'b1; #5;
  end

  arm_src2_path dut (.imm8, .imm12, .imm24, .exts, .rf_rd2, .src2_sel_imm,
                     .imm32, .src2_unrotated);

  function automatic logic [31:0] ext_model();
    case (exts)
      EXT_IMM8:   return 32'(int'(imm8));
      EXT_IMM12:  return 32'(int'(imm12));
      EXT_BRANCH: return 32'(int'($signed(imm24)) * 4);
      default:    return 32'd0;
    endcase
  endfunction

  task automatic step();
    logic [31:0] e;
    @(posedge clk); #1;
    e = ext_model();
    checks++;
    if (imm32 !== e) begin
      failures++;
      $display("FAIL imm32: exts=%0d got %h expected %h", exts, imm32, e);
    end
    checks++;
    if (src2_unrotated !== (src2_sel_imm ? e : rf_rd2)) begin
      failures++;
      $display("FAIL src2: sel=%0b got %h", src2_sel_imm, src2_unrotated);
    end
    case (exts)
      EXT_IMM8:   n_imm8++;
      EXT_IMM12:  n_imm12++;
      EXT_BRANCH: if (imm24[23]) n_br_neg++; else n_br_pos++;
      default:    n_none++;
    endcase
    if (src2_sel_imm) n_imm++; else n_reg++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Documented sequence: fields fixed, select counting 0..3.
    imm8  = 8'b01101011;
    imm12 = 12'b010110111111;
    imm24 = 24'b000000001111010111111111;
    rf_rd2 = 32'hDEAD_BEEF;
    src2_sel_imm = 1'b1;
    for (int s = 0; s < 4; s++) begin
      exts = ext_sel_e'(s);
      step();
    end
    // Same with a negative branch offset.
    imm24 = 24'b111111110000101000000001;
    exts = EXT_BRANCH;
    step();
    checks++;
    if (src2_unrotated !== 32'hFFFC_2804) begin
      failures++;
      $display("FAIL negative branch: got %h", src2_unrotated);
    end

    // Random mix of register and immediate operands.
    for (int i = 0; i < 3000; i++) begin
      imm8 = 8'($urandom); imm12 = 12'($urandom); imm24 = 24'($urandom);
      exts = ext_sel_e'(2'($urandom));
      rf_rd2 = $urandom;
      src2_sel_imm = 1'($urandom);
      step();
    end

    need("imm8 extensions", n_imm8);
    need("imm12 extensions", n_imm12);
    need("positive branch extensions", n_br_pos);
    need("negative branch extensions", n_br_neg);
    need("unused-code extensions", n_none);
    need("register operands", n_reg);
    need("immediate operands", n_imm);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
