// pe_network: the 1-D / 2-D PE interconnection network.
//
// It consists of an 8*N-bit NWIN register, an 8*N-bit NWOUT register and the
// routing between them, as described: PE j's byte occupies bits 8j..8j+7 of
// each register. A move takes two clock edges: `load` captures every PE's
// outgoing byte into NWIN, then `route` writes the routed NWIN into NWOUT,
// from where each PE reads its slot (the PE writes it into a register on the
// following edge).
//
// 1-D mode: DOWN moves data from PE j to PE j+1, UP from PE j to PE j-1.
// 2-D mode: the N PEs form ROWS x COLS, row-major (PE j at row j/COLS,
// column j%COLS); DOWN/UP move by one row, RIGHT/LEFT by one column.
// With `wrap` set, data leaving one edge enters at the opposite edge of the
// same row or column (1-D: of the whole array); without it, PEs on the
// receiving edge get 0. The PE numbering, the zero fill and the direction
// names' meaning are this design's choices; one-PE moves in each direction
// and switchable wrap-around are from the description.
module pe_network
  import asc_pkg::*;
#(
  parameter int N    = 36,
  parameter int COLS = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         route,
  input  net_dir_t     dir,
  input  logic         wrap,
  input  logic         mode2d,
  input  logic [W*N-1:0] nw_in,
  output logic [W*N-1:0] nw_out
);
  localparam int ROWS = N / COLS;

  logic [W*N-1:0] nwin_q, routed;

  initial assert (ROWS * COLS == N) else $error("pe_network: N must equal ROWS*COLS");

  always_comb begin
    routed = '0;
    for (int j = 0; j < N; j++) begin
      int  src;
      int  r, c;
      logic valid;
      r = j / COLS;
      c = j % COLS;
      valid = 1'b1;
      src = j;
      if (!mode2d) begin
        if (dir == DIR_DOWN || dir == DIR_RIGHT) begin
          if (j == 0) begin src = N - 1; valid = wrap; end
          else src = j - 1;
        end else begin
          if (j == N - 1) begin src = 0; valid = wrap; end
          else src = j + 1;
        end
      end else begin
        case (dir)
          DIR_DOWN: if (r == 0) begin src = (ROWS - 1) * COLS + c; valid = wrap; end
                    else src = j - COLS;
          DIR_UP:   if (r == ROWS - 1) begin src = c; valid = wrap; end
                    else src = j + COLS;
          DIR_RIGHT: if (c == 0) begin src = r * COLS + COLS - 1; valid = wrap; end
                     else src = j - 1;
          default:  if (c == COLS - 1) begin src = r * COLS; valid = wrap; end
                    else src = j + 1;
        endcase
      end
      if (valid) routed[W*j +: W] = nwin_q[W*src +: W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nwin_q <= '0;
      nw_out <= '0;
    end else begin
      if (load)  nwin_q <= nw_in;
      if (route) nw_out <= routed;
    end
  end
endmodule
