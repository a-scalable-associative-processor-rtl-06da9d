// asc_alu: the 8-bit ALU used by the control unit (scalar arithmetic) and by
// every processing element.
//
// Purely combinational: y = a <fn> b in the same cycle. The description only
// says that each unit has an 8-bit ALU; the operation set here (add, subtract,
// and, or, xor, multiply keeping the low byte, not, pass-b) is this design's
// choice. Multiply is included because the edge-detection programs multiply
// pixels by weights; with two's complement weights the low byte of the product
// is the correct signed product modulo 256. There is no carry output: wider
// fields are added byte by byte, and a program finds the carry by comparing
// the low-byte sum with an addend.
module asc_alu
  import asc_pkg::*;
(
  input  byte_t      a,
  input  byte_t      b,
  input  logic [2:0] fn,
  output byte_t      y
);
  byte_t prod;
  assign prod = byte_t'(a * b);

  always_comb begin
    case (alu_fn_t'(fn))
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_MUL:  y = prod;
      ALU_NOT:  y = ~a;
      default:  y = b;
    endcase
  end
endmodule
