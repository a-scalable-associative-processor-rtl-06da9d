// maxmin_unit: the per-PE shift register for Falkoff's maximum / minimum
// search.
//
// `load` copies the chosen field into the dedicated shift register. On each
// `step` the register shifts left by one and `cand` is the current most
// significant bit (inverted for MIN, i.e. the data complemented) ANDed with
// the PE's mask-stack top. The PE array sends `cand` to the responder
// resolution unit; if any PE's `cand` is '1', every PE replaces its responder
// bit and mask top with its `cand`, otherwise nothing changes. After eight
// steps only the PEs holding the extreme value keep a mask top of '1'.
// That procedure is the one described; the one-bit-per-cycle schedule is this
// design's choice. `cand` is combinational from the register contents, the
// shift happens on the clock edge that ends the step.
module maxmin_unit
  import asc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  step,
  input  logic  is_min,
  input  byte_t din,
  input  logic  top,
  output logic  cand
);
  byte_t sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= din;
    else if (step)   sr <= {sr[W-2:0], 1'b0};
  end

  assign cand = (sr[W-1] ^ is_min) & top;
endmodule
