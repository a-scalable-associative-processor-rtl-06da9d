// asc_top: the ASC associative SIMD co-processor.
//
// A single instruction-stream control unit drives an array of N 8-bit
// processing elements. The control unit and the PEs exchange data through 16
// common registers (e.g. a search key broadcast to every PE) and through the
// data bus (a value read back from the selected PE). The responder resolution
// unit supports STEP/FIND/RESOLVE_FIRST and the Falkoff MAX/MIN search; the
// network moves one byte per PE by one position in 1-D (up/down) or 2-D
// (up/down/left/right, COLS PEs per row) with optional wrap-around.
// The defaults follow the described prototype: 36 PEs, which also form the
// 6 x 6 grid used for 2-D image processing. Memory sizes are this design's
// choices.
//
// Host interface: write the program (imem_*), scalar data (dmem_*) and PE
// records (pe_mem_*) while idle, pulse `start`, wait for `done`, then read
// results back through the same ports. `rsp_vec` / `top_vec` show every PE's
// responder bit and mask-stack top; `stack_ovf` pulses when a PE pushes onto
// a full mask stack. All ports are synchronous to `clk`; reset is active low
// and asynchronous.
module asc_top
  import asc_pkg::*;
#(
  parameter int N_PE        = 36,
  parameter int COLS        = 6,
  parameter int LM_DEPTH    = 256,
  parameter int STACK_DEPTH = 16,
  parameter int IMEM_DEPTH  = 1 << PC_W,
  parameter int DMEM_DEPTH  = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  input  logic                          imem_we,
  input  logic [PC_W-1:0]               imem_addr,
  input  logic [IW-1:0]                 imem_wdata,
  input  logic                          dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  input  byte_t                         dmem_wdata,
  output byte_t                         dmem_rdata,
  input  logic                          pe_mem_we,
  input  logic [$clog2(N_PE)-1:0]       pe_mem_pe,
  input  logic [$clog2(LM_DEPTH)-1:0]   pe_mem_addr,
  input  byte_t                         pe_mem_wdata,
  output byte_t                         pe_mem_rdata,
  output logic [N_PE-1:0]               rsp_vec,
  output logic [N_PE-1:0]               top_vec,
  output logic                          any_rsp,
  output logic                          stack_ovf
);
  pe_ctrl_t         pe_ctrl;
  byte_t            bus_data, first_id;
  logic             net_load, net_route, net_wrap, net_mode2d;
  net_dir_t         net_dir;
  logic [W*N_PE-1:0] nw_in, nw_out;
  logic             cr_we;
  logic [3:0]       cr_waddr, cr_raddr_cu, cr_raddr_pe;
  byte_t            cr_wdata, cr_rdata_cu, cr_rdata_pe;

  control_unit #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_cu (
    .clk, .rst_n, .start, .running, .done,
    .imem_we, .imem_addr, .imem_wdata,
    .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .pe_ctrl, .any_rsp, .first_id, .bus_data,
    .net_load, .net_route, .net_dir, .net_wrap, .net_mode2d,
    .cr_we, .cr_waddr, .cr_wdata, .cr_raddr_cu, .cr_rdata_cu, .cr_raddr_pe, .cr_rdata_pe
  );

  common_regs #(.N(NCR)) u_cr (
    .clk, .rst_n, .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata),
    .raddr_cu(cr_raddr_cu), .rdata_cu(cr_rdata_cu),
    .raddr_pe(cr_raddr_pe), .rdata_pe(cr_rdata_pe)
  );

  pe_array #(.N(N_PE), .LM_DEPTH(LM_DEPTH), .STACK_DEPTH(STACK_DEPTH)) u_array (
    .clk, .rst_n, .ctrl(pe_ctrl), .nw_out, .nw_in, .bus_data, .any_rsp, .first_id,
    .rsp_vec, .top_vec, .stack_ovf,
    .host_we(pe_mem_we), .host_pe(pe_mem_pe), .host_addr(pe_mem_addr),
    .host_wdata(pe_mem_wdata), .host_rdata(pe_mem_rdata)
  );

  pe_network #(.N(N_PE), .COLS(COLS)) u_net (
    .clk, .rst_n, .load(net_load), .route(net_route), .dir(net_dir),
    .wrap(net_wrap), .mode2d(net_mode2d), .nw_in, .nw_out
  );
endmodule
