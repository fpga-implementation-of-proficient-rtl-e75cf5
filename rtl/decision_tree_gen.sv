// decision_tree_gen: decodes a 4-bit coefficient-table code into the
// operations that rebuild that multiple of A from the 4-entry odd-multiple
// memory.
//
// Codes 0000..0111 stand for 1A..8A, codes 1000..1110 for 15A..9A and 1111
// for 16A. The tree first splits on the complement relation: a code
// 1xxx other than 1111 is the mirror of 0xxx and is produced as
// 16A - (xxx+1)A. The remaining multiple m = 1..8 or 16 is then split into
// an odd part (1, 3, 5 or 7: the memory entry) and a power of two (the shift):
//   2A,4A,8A,16A = A<<1..4   6A,12A = 3A<<1,2   10A = 5A<<1   14A = 7A<<1.
// Purely combinational. Codes, shifts and complement rule follow the
// design's coefficient and decision tables.
module decision_tree_gen
  import dtg_pkg::*;
(
  input  logic [3:0] code,
  output dt_instr_t  instr
);

  logic [4:0] m;   // multiple still to build after the complement split

  always_comb begin
    instr.complement = code[3] && (code != 4'hF);
    if (code == 4'hF)   m = 5'd16;
    else                m = {2'b00, code[2:0]} + 5'd1;

    // odd part and power of two of m
    unique case (m)
      5'd1:    begin instr.odd_sel = 2'd0; instr.shamt = 3'd0; end
      5'd2:    begin instr.odd_sel = 2'd0; instr.shamt = 3'd1; end
      5'd3:    begin instr.odd_sel = 2'd1; instr.shamt = 3'd0; end
      5'd4:    begin instr.odd_sel = 2'd0; instr.shamt = 3'd2; end
      5'd5:    begin instr.odd_sel = 2'd2; instr.shamt = 3'd0; end
      5'd6:    begin instr.odd_sel = 2'd1; instr.shamt = 3'd1; end
      5'd7:    begin instr.odd_sel = 2'd3; instr.shamt = 3'd0; end
      5'd8:    begin instr.odd_sel = 2'd0; instr.shamt = 3'd3; end
      default: begin instr.odd_sel = 2'd0; instr.shamt = 3'd4; end  // 16
    endcase
  end

endmodule
