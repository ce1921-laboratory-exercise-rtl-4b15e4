// src2_mux_tb: self-checking testbench for the second-operand multiplexer.
//
// Drives random register and immediate words and both select values, and
// checks that the output equals the selected input and never the other
// (inputs that differ are forced for that purpose). Watchdog included.
`timescale 1ns/1ps
module src2_mux_tb;
  logic [31:0] reg_data, imm_data, src2;
  logic        sel_imm;

  int checks = 0;
  int failures = 0;
  logic clk;
  always begin
    clk = 1'b0; #5;
    clk = 1'b1; #5;
  end

  src2_mux #(.WIDTH(32)) dut (.reg_data, .imm_data, .sel_imm, .src2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      reg_data = $urandom;
      imm_data = $urandom;
      if (imm_data == reg_data) imm_data = ~reg_data;
      sel_imm  = 1'(i);
      #1;
      checks++;
      if (src2 !== (sel_imm ? imm_data : reg_data)) begin
        failures++;
        $display("FAIL sel_imm=%0b reg=%h imm=%h got %h", sel_imm, reg_data, imm_data, src2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
