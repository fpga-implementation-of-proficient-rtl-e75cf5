// tb_decision_tree_gen: exhaustive check of the decision-tree decoder.
// For all 16 table codes, rebuilds the multiple from the instruction
// ((2*odd_sel+1) << shamt, then 16 - that if complement) and compares it with
// the coefficient table written out below, and checks that every entry and
// shift stays inside the 4-entry memory and the 0..4 shift range.
module tb_decision_tree_gen;
  import dtg_pkg::*;

  logic [3:0] code;
  dt_instr_t  instr;
  int checks = 0, failures = 0;

  // Coefficient table: multiple of A held at each code.
  localparam int EXP_K [16] = '{1, 2, 3, 4, 5, 6, 7, 8, 15, 14, 13, 12, 11, 10, 9, 16};

  decision_tree_gen dut (.code(code), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int k;
      code = 4'(c);
      #1;
      k = (2 * int'(instr.odd_sel) + 1) << instr.shamt;
      if (instr.complement) k = 16 - k;
      checks++;
      if (k != EXP_K[c]) begin
        failures++;
        $display("FAIL code=%b rebuilt %0dA expected %0dA", code, k, EXP_K[c]);
      end
      checks++;
      if (instr.shamt > 3'd4 || instr.complement != (c >= 8 && c != 15)) begin
        failures++;
        $display("FAIL code=%b shamt=%0d complement=%b", code, instr.shamt, instr.complement);
      end
    end
    // Spot checks of the shift tree: 6A = 3A<<1 and 16A = A<<4.
    code = 4'b0101; #1; checks++;
    if (instr.odd_sel != 2'd1 || instr.shamt != 3'd1) begin failures++; $display("FAIL 6A"); end
    code = 4'b1111; #1; checks++;
    if (instr.odd_sel != 2'd0 || instr.shamt != 3'd4) begin failures++; $display("FAIL 16A"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
