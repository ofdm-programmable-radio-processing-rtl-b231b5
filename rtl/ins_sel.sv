// ins_sel: instruction select between the 32-bit memory word and the decoder.
//
// Instruction memory is 32 bits wide and addressed in 16-bit halfwords: the
// halfword at even PC sits in bits [31:16], the one at odd PC in bits [15:0].
// In real mode (mode = 1) the whole 32-bit word is one instruction. In complex
// mode (mode = 0) pc_s, the lowest PC bit, picks the upper (pc_s = 0) or lower
// (pc_s = 1) half, returned zero-extended in bits [15:0]. This follows the
// architecture description's memory map. Purely combinational.
module ins_sel (
  input  logic [31:0] word,
  input  logic        mode,
  input  logic        pc_s,
  output logic [31:0] ins
);
  always_comb begin
    if (mode)       ins = word;
    else if (pc_s)  ins = {16'h0, word[15:0]};
    else            ins = {16'h0, word[31:16]};
  end
endmodule
