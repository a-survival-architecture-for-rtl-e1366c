// scm: self-checking module of a working or spare cell.
//
// Checks every result of the function module while the cell works, so no test
// mode is needed. The 2-bit primary input selects one of the four good-result
// flags R0000..R0011 through a 4:1 multiplexer; a two-input XNOR compares it
// with the function module's output. The encoder turns the comparison into
// four 2-bit survival codes, one per direction: 11 north, 00 south, 10 east,
// 01 west when the result is right. On a wrong result, or when the life flag
// R1110 is 0, it sends the complement of every code, so each neighbour sees a
// wrong code whichever side it is on.
//
// The mux, comparator, encoder and healthy codes follow the document. Sending
// the complements on a fault is this design's choice: the document says only
// that a faulty cell cannot produce the proper codes. Combinational: the codes
// follow the input in the same cycle.
module scm
  import survival_pkg::*;
(
  input  logic [1:0] in,          // primary input, the mux select
  input  logic [3:0] good,        // R0011..R0000
  input  logic       life,        // R1110
  input  logic       func_out,    // output of the function module
  output logic       ok,          // comparator output gated by life
  output logic [7:0] tx_code      // codes to N, S, E, W
);

  logic expected;
  logic match;

  always_comb begin
    case (in)
      2'b00:   expected = good[0];
      2'b01:   expected = good[1];
      2'b10:   expected = good[2];
      default: expected = good[3];
    endcase
  end

  assign match   = ~(expected ^ func_out);
  assign ok      = match & life;
  assign tx_code = ok ? CODE_SEND : ~CODE_SEND;

endmodule
