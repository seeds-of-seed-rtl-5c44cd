// int_alu: single-cycle integer ALU.
//
// The representative single-cycle (fully pipelined) functional unit. Because
// it accepts a new instruction every cycle, a younger instruction can never
// hold it against an older one, so instructions for it need no ordering
// beyond the normal age-based select. The operation set (add, subtract,
// and, or, xor, logical shifts, signed set-less-than) is this design's own
// choice; only the existence of such single-cycle units is given.
//
// Interface: operands a and b and op; result is combinational. The
// surrounding cluster registers the result, so an ALU instruction issued in
// cycle t writes back in cycle t+1.
module int_alu
  import seed_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_t      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int unsigned SHW = $clog2(W);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLL: y = a << b[SHW-1:0];
      ALU_SRL: y = a >> b[SHW-1:0];
      ALU_SLT: y = W'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end

endmodule
