// tb_pe_network: for each direction, 1-D and 2-D mode and wrap on/off, sends
// a random byte from every PE through NWIN/NWOUT and checks where each byte
// lands. The expected NWOUT is built by scattering each source PE's byte to
// its destination (the reverse of the design's gather), on a 6 x 6 grid.
module tb_pe_network;
  import asc_pkg::*;
  localparam int N = 36, COLS = 6, ROWS = N / COLS;
  logic clk = 0, rst_n = 0;
  logic load, route, wrap, mode2d;
  net_dir_t dir;
  logic [W*N-1:0] nw_in, nw_out, exp_out;
  int checks = 0, failures = 0;

  pe_network #(.N(N), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  function automatic int dest(int s, int d, bit w, bit m2, output bit ok);
    int r = s / COLS, c = s % COLS, dd;
    ok = 1;
    if (!m2) begin
      dd = (d == 0 || d == 2) ? s + 1 : s - 1;
      if (dd < 0 || dd >= N) begin ok = w; dd = (dd + N) % N; end
      return dd;
    end
    case (d)
      0: begin r = r + 1; end
      1: begin r = r - 1; end
      2: begin c = c + 1; end
      default: begin c = c - 1; end
    endcase
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) begin
      ok = w; r = (r + ROWS) % ROWS; c = (c + COLS) % COLS;
    end
    return r * COLS + c;
  endfunction

  initial begin
    load = 0; route = 0; wrap = 0; mode2d = 0; dir = DIR_DOWN; nw_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      for (int j = 0; j < N; j++) nw_in[W*j +: W] = byte_t'($urandom);
      dir = net_dir_t'(t % 4); wrap = t[2]; mode2d = t[3];
      exp_out = '0;
      for (int s = 0; s < N; s++) begin
        bit ok; int dd;
        dd = dest(s, t % 4, wrap, mode2d, ok);
        if (ok) exp_out[W*dd +: W] = nw_in[W*s +: W];
      end
      @(negedge clk); load = 1;
      @(negedge clk); load = 0; route = 1;
      nw_in = '1;                // NWIN must hold the captured value
      @(negedge clk); route = 0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (nw_out[W*j +: W] !== exp_out[W*j +: W]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pe=%0d got=%h exp=%h", t, j, nw_out[W*j +: W], exp_out[W*j +: W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
