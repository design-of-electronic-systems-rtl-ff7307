// pc_operand_isolation: the program-counter incrementers of an 8051 control
// unit with operand isolation. The three adders compute pc+1, pc+2 and pc+3
// (next address for 1-, 2- and 3-byte instructions). Their result is only
// needed in some cycles, yet without isolation every change of pc ripples
// through all three carry chains. Here the pc operand of each adder is ANDed
// with that adder's data-valid (use_inc[k]); while it is low the adder sees a
// constant zero operand and does not switch. Interface: pc and use_inc are
// combinational inputs, inc[k] = pc + (k+1) is valid in the same cycle when
// use_inc[k] is high and equals k+1 (the isolated constant) otherwise.
// The AND-gating of the operands and the choice of the PC adders follow the
// described optimization; the 3-adder packaging and the port names are this
// design's.
module pc_operand_isolation #(
  parameter int unsigned AW = 16
) (
  input  logic [AW-1:0] pc,
  input  logic [2:0]    use_inc,
  output logic [AW-1:0] inc [3],
  output logic [AW-1:0] iso_operand [3]   // operand actually seen by each adder
);
  always_comb
    for (int k = 0; k < 3; k++) begin
      iso_operand[k] = pc & {AW{use_inc[k]}};
      inc[k]         = iso_operand[k] + AW'(k + 1);
    end
endmodule
