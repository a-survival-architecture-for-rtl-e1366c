// function_module: the logic block of a cell.
//
// Applies one elementary function to the 2-bit primary input and gives a 1-bit
// primary output. The function is chosen by the ten function flags R0100..R1101
// of the gene word (func_flags[0] is R0100). The document names AND, OR, NAND
// and NOR, and lists ADD, SUB and INV as possible members; with one output bit
// this design takes ADD as the carry of in[1]+in[0] and SUB as the borrow of
// in[1]-in[0], and fills the other three flags with XOR (the sum and
// difference bit), XNOR and BUF. INV and BUF use in[0] only.
//
// The flags are meant to be one-hot. If several are set, the lowest-numbered
// flag wins; if none is set the output is 0 (a cell with no function). Purely
// combinational.
//
// fault_inj inverts the output. It is a test input that models a defect in the
// logic block, so that the on-line self-check can be exercised; tie it to 0 in
// a real build.
module function_module
  import survival_pkg::*;
(
  input  logic [1:0]          in,
  input  logic [NUM_FUNC-1:0] func_flags,
  input  logic                fault_inj,
  output logic                out
);

  logic a, b, f;
  assign a = in[1];
  assign b = in[0];

  always_comb begin
    f = 1'b0;
    for (int k = NUM_FUNC - 1; k >= 0; k--) begin
      if (func_flags[k]) begin
        case (k)
          F_AND:   f = a & b;
          F_OR:    f = a | b;
          F_NAND:  f = ~(a & b);
          F_NOR:   f = ~(a | b);
          F_XOR:   f = a ^ b;
          F_XNOR:  f = ~(a ^ b);
          F_ADD:   f = a & b;
          F_SUB:   f = ~a & b;
          F_INV:   f = ~b;
          default: f = b;
        endcase
      end
    end
  end

  assign out = f ^ fault_inj;

endmodule
