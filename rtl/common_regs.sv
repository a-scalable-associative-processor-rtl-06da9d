// common_regs: the 16 8-bit common registers shared by the control unit and
// the PE array.
//
// The control unit writes them (from its own registers, or from the PE array
// through the data bus) and reads them through one port; a second read port
// broadcasts one register to every PE, e.g. an associative search key. One
// write per cycle, registered; reads are combinational. Reset clears all
// registers. The register count and width follow the description; the port
// arrangement is this design's choice.
module common_regs
  import asc_pkg::*;
#(
  parameter int N = NCR
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  byte_t                wdata,
  input  logic [$clog2(N)-1:0] raddr_cu,
  output byte_t                rdata_cu,
  input  logic [$clog2(N)-1:0] raddr_pe,
  output byte_t                rdata_pe
);
  byte_t cr [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cr[i] <= '0;
    end else if (we) begin
      cr[waddr] <= wdata;
    end
  end

  assign rdata_cu = cr[raddr_cu];
  assign rdata_pe = cr[raddr_pe];
endmodule
