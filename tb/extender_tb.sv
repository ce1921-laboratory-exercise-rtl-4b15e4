// extender_tb: self-checking testbench for the ARMv4 immediate extender.
//
// Steps the select through 0,1,2,3 with the reference vector of the
// documented simulation (imm8 = 01101011, imm12 = 010110111111,
// imm24 = 000000001111010111111111) and compares against the printed
// results, then checks a negative branch offset, every imm8 and imm12 value,
// and random imm24 values. Expected values are formed arithmetically
// (unsigned value for imm8/imm12, signed value times four for imm24), not by
// bit concatenation. A watchdog ends the run with a failure if it hangs.
`timescale 1ns/1ps
module extender_tb;
  import ext_pkg::*;

  logic [7:0]  imm8;
  logic [11:0] imm12;
  logic [23:0] imm24;
  ext_sel_e    exts;
  logic [31:0] imm32;

  int checks = 0;
  int failures = 0;
  logic clk;
  always begin
    clk = 1'b0; #5;
    clk = 1'b1; #5;
  end

  extender dut (.imm8, .imm12, .imm24, .exts, .imm32);

  function automatic logic [31:0] model(ext_sel_e s, logic [7:0] a,
                                        logic [11:0] b, logic [23:0] c);
    int signed off;
    case (s)
      EXT_IMM8:   return 32'(int'(a));
      EXT_IMM12:  return 32'(int'(b));
      EXT_BRANCH: begin
        off = int'($signed(c)) * 4;
        return 32'(off);
      end
      default:    return 32'd0;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] exp);
    #1;
    checks++;
    if (imm32 !== exp) begin
      failures++;
      $display("FAIL %s: exts=%0d imm8=%h imm12=%h imm24=%h got %h expected %h",
               what, exts, imm8, imm12, imm24, imm32, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reference vector and its printed results.
    imm8  = 8'b01101011;
    imm12 = 12'b010110111111;
    imm24 = 24'b000000001111010111111111;
    exts = EXT_IMM8;   check("ref imm8",   32'b00000000000000000000000001101011);
    exts = EXT_IMM12;  check("ref imm12",  32'b00000000000000000000010110111111);
    exts = EXT_BRANCH; check("ref branch", 32'b00000000000000111101011111111100);
    exts = EXT_NONE;   check("ref unused", 32'b0);

    // Negative branch offsets.
    exts = EXT_BRANCH;
    imm24 = 24'hFFFFFF; check("branch -1", 32'hFFFF_FFFC);
    imm24 = 24'h800000; check("branch min", 32'hFE00_0000);
    imm24 = 24'h7FFFFF; check("branch max", 32'h01FF_FFFC);
    imm24 = 24'hA5C3E1; check("branch neg", model(EXT_BRANCH, imm8, imm12, imm24));

    // Every imm8 and imm12 value, with the other fields random.
    for (int i = 0; i < 256; i++) begin
      imm8 = 8'(i); imm12 = 12'($urandom); imm24 = 24'($urandom);
      exts = EXT_IMM8; check("imm8 sweep", model(exts, imm8, imm12, imm24));
    end
    for (int i = 0; i < 4096; i++) begin
      imm12 = 12'(i); imm8 = 8'($urandom); imm24 = 24'($urandom);
      exts = EXT_IMM12; check("imm12 sweep", model(exts, imm8, imm12, imm24));
    end

    // Random fields and selects.
    for (int i = 0; i < 4000; i++) begin
      imm8 = 8'($urandom); imm12 = 12'($urandom); imm24 = 24'($urandom);
      exts = ext_sel_e'(2'($urandom));
      check("random", model(exts, imm8, imm12, imm24));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
