// tb_common_regs: random writes and reads on both read ports, compared with
// a shadow array; also checks that reset clears every register.
module tb_common_regs;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [3:0] waddr, raddr_cu, raddr_pe;
  byte_t wdata, rdata_cu, rdata_pe;
  byte_t shadow [16];
  int checks = 0, failures = 0;

  common_regs #(.N(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_cu = 0; raddr_pe = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      raddr_cu = 4'(i); #1; checks++; if (rdata_cu !== 0) failures++;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = byte_t'($urandom);
      raddr_cu = 4'($urandom); raddr_pe = 4'($urandom);
      #1;
      checks += 2;
      if (rdata_cu !== shadow[raddr_cu]) failures++;
      if (rdata_pe !== shadow[raddr_pe]) failures++;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
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
