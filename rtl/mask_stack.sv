// mask_stack: the per-PE stack of 1-bit mask values.
//
// The top of the stack decides whether a PE executes masked instructions; an
// associative search pushes its result so that searches can be nested.
// Depth 16 follows the description ("a Mask Stack holding at most 16 1-bit
// values"). It is built as a shift register: push shifts every entry down and
// writes the new top, pop shifts up and fills the bottom with '1', wr_top
// replaces the top in place. Pushing onto a full stack drops the bottom entry
// and pulses `overflow`; popping an empty one pulses `underflow`. These two
// policies, and the reset value (every entry '1', so that a freshly reset PE
// takes part in masked instructions), are this design's choices.
// One operation per cycle; push has priority over pop over wr_top. All
// updates take effect on the next rising clock edge.
module mask_stack #(
  parameter int DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic pop,
  input  logic wr_top,
  input  logic din,
  output logic top,
  output logic overflow,
  output logic underflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int LW = $clog2(DEPTH+1);
  logic [DEPTH-1:0] stk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stk       <= '1;
      level     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= 1'b0;
      underflow <= 1'b0;
      if (push) begin
        stk <= {stk[DEPTH-2:0], din};
        if (level == LW'(DEPTH)) overflow <= 1'b1;
        else level <= level + 1'b1;
      end else if (pop) begin
        stk <= {1'b1, stk[DEPTH-1:1]};
        if (level == 0) underflow <= 1'b1;
        else level <= level - 1'b1;
      end else if (wr_top) begin
        stk[0] <= din;
      end
    end
  end

  assign top = stk[0];
endmodule
