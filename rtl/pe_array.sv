// pe_array: the array of N processing elements with their shared support
// circuitry.
//
// All PEs receive the same broadcast action (`ctrl`) every cycle, SIMD
// fashion. The responder resolution unit looks at every PE's request bit
// (its responder bit, or its Falkoff candidate bit during a MAX/MIN step) and
// returns to each PE whether a lower-ID PE is requesting and to all PEs and
// the control unit whether any PE is (`any_rsp`). The data bus (`bus_data`)
// returns to the control unit the OR of register P[a] over all PEs whose
// mask top is '1'; after a STEP, FIND or RESOLVE_FIRST exactly one PE
// qualifies, so this reads that PE's value. Using an OR for the bus is this
// design's choice. PE j gets ID j and owns bits 8j..8j+7 of the network
// vectors. A host port reaches any PE's local memory, for loading records
// and reading results. `first_id` is the ID of the lowest-numbered
// requesting PE (0 when none), encoded from the same resolution chain; the
// control unit stores it in its register R15 on STEP, FIND and RESOLVE_FIRST.
module pe_array
  import asc_pkg::*;
#(
  parameter int N           = 36,
  parameter int LM_DEPTH    = 256,
  parameter int STACK_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  pe_ctrl_t                    ctrl,
  input  logic [W*N-1:0]              nw_out,
  output logic [W*N-1:0]              nw_in,
  output byte_t                       bus_data,
  output logic                        any_rsp,
  output byte_t                       first_id,
  output logic [N-1:0]                rsp_vec,
  output logic [N-1:0]                top_vec,
  output logic                        stack_ovf,
  input  logic                        host_we,
  input  logic [$clog2(N)-1:0]        host_pe,
  input  logic [$clog2(LM_DEPTH)-1:0] host_addr,
  input  byte_t                       host_wdata,
  output byte_t                       host_rdata
);
  logic [N-1:0] req, lower, ovf;
  byte_t        bus  [N];
  byte_t        hrd  [N];

  responder_resolution #(.N(N)) u_rru (.req, .lower, .any(any_rsp));

  for (genvar j = 0; j < N; j++) begin : g_pe
    pe #(.LM_DEPTH(LM_DEPTH), .STACK_DEPTH(STACK_DEPTH)) u_pe (
      .clk, .rst_n,
      .pe_id     (byte_t'(j)),
      .ctrl,
      .lower     (lower[j]),
      .any_req   (any_rsp),
      .nw_out    (nw_out[W*j +: W]),
      .nw_in     (nw_in[W*j +: W]),
      .bus_out   (bus[j]),
      .rsp       (rsp_vec[j]),
      .top       (top_vec[j]),
      .rr_req    (req[j]),
      .stack_ovf (ovf[j]),
      .host_we   (host_we && host_pe == $clog2(N)'(j)),
      .host_addr,
      .host_wdata,
      .host_rdata(hrd[j])
    );
  end

  always_comb begin
    bus_data = '0;
    for (int j = 0; j < N; j++) bus_data |= bus[j];
  end

  // Only one PE has req & ~lower, so an OR of the gated IDs encodes it.
  always_comb begin
    first_id = '0;
    for (int j = 0; j < N; j++) if (req[j] && !lower[j]) first_id |= byte_t'(j);
  end

  assign stack_ovf  = |ovf;
  assign host_rdata = hrd[host_pe];
endmodule
