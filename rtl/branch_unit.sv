// branch_unit: resolves branches and jumps in the ID stage.
//
// beq/bne compare the two (forwarded) register operands; j/jal take the
// 26-bit target index; jr takes rs. On `redirect` the fetch stage continues
// at `target` and the instruction already fetched behind the branch is
// squashed, so a taken branch or jump costs one cycle (there is no delay
// slot). PC values are word addresses: a branch target is PC+1 plus the
// sign-extended offset, a jump target keeps the upper 6 bits of PC+1.
// Purely combinational. Placing the unit in ID follows the document; the
// target arithmetic and the squash instead of a delay slot are this
// design's choices.
module branch_unit
  import mips_pkg::*;
(
  input  logic        branch,
  input  logic        branch_ne,
  input  logic        jump,
  input  logic        jr,
  input  word_t       rs_val,
  input  word_t       rt_val,
  input  pc_t         pc_plus1,
  input  word_t       imm,       // sign-extended offset
  input  logic [25:0] jindex,
  output logic        redirect,
  output pc_t         target
);

  logic equal;
  assign equal = (rs_val == rt_val);

  always_comb begin
    redirect = 1'b0;
    target   = pc_plus1 + pc_t'(imm);
    if (jump) begin
      redirect = 1'b1;
      target   = {pc_plus1[PC_W-1:26], jindex};
    end else if (jr) begin
      redirect = 1'b1;
      target   = pc_t'(rs_val);
    end else if (branch) begin
      redirect = branch_ne ? !equal : equal;
    end
  end

endmodule
