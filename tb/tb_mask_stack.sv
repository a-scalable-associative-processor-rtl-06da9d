// tb_mask_stack: drives random push/pop/write-top sequences and compares the
// top of stack, overflow and underflow pulses and the fill level with a
// reference model (an array of DEPTH bits, '1'-filled, plus an entry count).
module tb_mask_stack;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push, pop, wr_top, din, top, overflow, underflow;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;
  bit m [DEPTH];
  int cnt;
  bit exp_ovf, exp_unf;

  mask_stack #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; wr_top = 0; din = 0;
    foreach (m[i]) m[i] = 1'b1;
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (top !== 1'b1) failures++;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      // alternate phases bias the stack towards full, then towards empty
      if ((i / 300) % 2 == 0) begin push = (r < 6); pop = (r >= 6 && r < 8); end
      else begin push = (r < 2); pop = (r >= 2 && r < 7); end
      wr_top = (r >= 8);
      din = 1'($urandom);
      exp_ovf = 0; exp_unf = 0;
      if (push) begin
        for (int k = DEPTH - 1; k > 0; k--) m[k] = m[k-1];
        m[0] = din;
        if (cnt == DEPTH) exp_ovf = 1; else cnt++;
      end else if (pop) begin
        for (int k = 0; k < DEPTH - 1; k++) m[k] = m[k+1];
        m[DEPTH-1] = 1'b1;
        if (cnt == 0) exp_unf = 1; else cnt--;
      end else if (wr_top) begin
        m[0] = din;
      end
      @(negedge clk);
      checks++;
      if (top !== m[0] || overflow !== exp_ovf || underflow !== exp_unf || int'(level) != cnt) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d top=%b exp=%b ovf=%b/%b unf=%b/%b", i, top, m[0], overflow, exp_ovf, underflow, exp_unf);
      end
      n_ovf += int'(exp_ovf); n_unf += int'(exp_unf);
    end
    push = 0; pop = 0; wr_top = 0;
    checks++; if (n_ovf == 0 || n_unf == 0) failures++;
    $display("overflows=%0d underflows=%0d", n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
