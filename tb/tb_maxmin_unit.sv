// tb_maxmin_unit: loads random bytes into the Falkoff shift register and
// checks, for MAX and MIN and both mask-top values, that each of the eight
// steps presents the expected bit (MSB first, complemented for MIN, ANDed
// with the mask top).
module tb_maxmin_unit;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, step, is_min, top, cand;
  byte_t din;
  int checks = 0, failures = 0;

  maxmin_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    load = 0; step = 0; is_min = 0; top = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      byte_t v;
      v = byte_t'($urandom);
      @(negedge clk);
      load = 1; din = v; is_min = t[0]; top = t[1] | t[2];
      @(negedge clk);
      load = 0; din = byte_t'($urandom);
      for (int k = 7; k >= 0; k--) begin
        step = 1;
        #1;
        checks++;
        if (cand !== ((v[k] ^ is_min) & top)) begin
          failures++;
          $display("FAIL v=%h bit=%0d min=%b top=%b cand=%b", v, k, is_min, top, cand);
        end
        @(negedge clk);
      end
      step = 0;
    end
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
