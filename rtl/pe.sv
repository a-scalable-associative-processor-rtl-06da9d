// pe: one processing element of the ASC array, with its local memory.
//
// Each PE holds 16 8-bit general-purpose registers, an 8-bit ALU, 16 1-bit
// logical registers, a responder bit, a 16-entry mask stack, an SFR
// (STEP/FIND/RESOLVE_FIRST) unit, the Falkoff shift register for MAX/MIN and
// a local memory that typically holds one data record. Those parts are the
// ones described; how they are wired and the operations below are this
// design's own.
//
// Every cycle the control unit broadcasts one action (`ctrl`). A masked action
// (ctrl.masked = 1) changes state only when the mask top is '1'; an unmasked
// one acts in every PE. All state updates happen on the rising clock edge;
// register and local-memory reads are combinational. Register 15 reads as
// the PE's own ID (writes to it are ignored), so programs can derive
// per-PE numbers from it.
//
// Associative search (PE_SRCH / PE_SRCHL) writes the result r to the
// responder bit and pushes r on the mask stack. A masked search ANDs r with
// the current mask top so that searches nest; every PE pushes, so all
// stacks stay the same depth. `rr_req` is what the PE presents to the
// responder resolution unit: its Falkoff candidate bit during a MAX/MIN step,
// its responder bit otherwise. `bus_out` is register P[a] when the mask top
// is '1' and 0 otherwise; the array ORs these onto the data bus.
module pe
  import asc_pkg::*;
#(
  parameter int LM_DEPTH    = 256,
  parameter int STACK_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  byte_t    pe_id,
  input  pe_ctrl_t ctrl,
  input  logic     lower,      // a lower-ID PE presents '1' to the RRU
  input  logic     any_req,    // some PE presents '1' to the RRU
  input  byte_t    nw_out,     // this PE's slot of NWOUT
  output byte_t    nw_in,      // this PE's slot of NWIN (P[a])
  output byte_t    bus_out,
  output logic     rsp,
  output logic     top,
  output logic     rr_req,
  output logic     stack_ovf,
  // host access to the local memory
  input  logic                        host_we,
  input  logic [$clog2(LM_DEPTH)-1:0] host_addr,
  input  byte_t                       host_wdata,
  output byte_t                       host_rdata
);
  localparam int AW = $clog2(LM_DEPTH);

  byte_t             gpr [NREG];
  logic [NLREG-1:0]  lreg;
  byte_t             lm  [LM_DEPTH];

  byte_t ra_v, rb_v, src_b, alu_y, lm_rd;
  logic  en, cmp_r, srch_r;
  logic  [AW-1:0] lm_addr;

  assign ra_v = (ctrl.a == 4'(PEID_REG)) ? pe_id : gpr[ctrl.a];
  assign rb_v = (ctrl.b == 4'(PEID_REG)) ? pe_id : gpr[ctrl.b];

  always_comb begin
    case (ctrl.x)
      SRC_REG: src_b = rb_v;
      SRC_CR:  src_b = ctrl.cr;
      default: src_b = ctrl.imm;
    endcase
  end

  asc_alu u_alu (.a(ra_v), .b(src_b), .fn(ctrl.f), .y(alu_y));

  assign en      = ~ctrl.masked | top;
  assign cmp_r   = cmp(ctrl.f, ra_v, src_b);
  assign lm_addr = AW'(ra_v + ctrl.imm);
  assign lm_rd   = lm[lm_addr];

  // ---------------- mask stack, SFR unit, Falkoff shift register
  logic    ms_push, ms_pop, ms_wr, ms_din, ms_unf;
  logic    [$clog2(STACK_DEPTH+1)-1:0] ms_level;
  logic    sfr_rsp, sfr_top, cand;
  sfr_op_t sfr_op;

  mask_stack #(.DEPTH(STACK_DEPTH)) u_ms (
    .clk, .rst_n, .push(ms_push), .pop(ms_pop), .wr_top(ms_wr), .din(ms_din),
    .top, .overflow(stack_ovf), .underflow(ms_unf), .level(ms_level)
  );

  assign sfr_op = (ctrl.op == PE_SFR) ? sfr_op_t'(ctrl.f[1:0]) : SFR_NONE;
  sfr_unit u_sfr (.op(sfr_op), .rsp, .top, .lower, .rsp_n(sfr_rsp), .top_n(sfr_top));

  maxmin_unit u_mm (
    .clk, .rst_n, .load(ctrl.op == PE_MAX_LOAD), .step(ctrl.op == PE_MAX_STEP),
    .is_min(ctrl.f[0]), .din(ra_v), .top, .cand
  );

  assign srch_r = ((ctrl.op == PE_SRCH) ? cmp_r : lreg[ctrl.a]) & en;

  always_comb begin
    ms_push = 1'b0;
    ms_pop  = 1'b0;
    ms_wr   = 1'b0;
    ms_din  = 1'b0;
    case (ctrl.op)
      PE_SRCH, PE_SRCHL: begin ms_push = 1'b1; ms_din = srch_r; end
      PE_PUSH:     begin ms_push = 1'b1; ms_din = (ctrl.x[0] | lreg[ctrl.a]) & en; end
      PE_POP:      ms_pop = 1'b1;
      PE_MSET:     begin ms_wr = en; ms_din = lreg[ctrl.a]; end
      PE_SFR:      begin ms_wr = 1'b1; ms_din = sfr_top; end
      PE_MAX_STEP: begin ms_wr = any_req; ms_din = cand; end
      default: ;
    endcase
  end

  // ---------------- registers, responder bit, local memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) gpr[i] <= '0;
      lreg <= '0;
      rsp  <= 1'b0;
    end else begin
      case (ctrl.op)
        PE_LDI:      if (en) gpr[ctrl.d] <= ctrl.imm;
        PE_ALU:      if (en) gpr[ctrl.d] <= alu_y;
        PE_LD:       if (en) gpr[ctrl.d] <= lm_rd;
        PE_NET_WB:   if (en) gpr[ctrl.d] <= nw_out;
        PE_CMP:      if (en) lreg[ctrl.d] <= cmp_r;
        PE_LOP:      if (en) lreg[ctrl.d] <= lop(ctrl.f, lreg[ctrl.a], lreg[ctrl.b]);
        PE_LGET:     if (en) lreg[ctrl.d] <= ctrl.x[0] ? rsp : top;
        PE_SRCH, PE_SRCHL: rsp <= srch_r;
        PE_SFR:      rsp <= sfr_rsp;
        PE_MAX_LOAD: rsp <= top;
        PE_MAX_STEP: if (any_req) rsp <= cand;
        default: ;
      endcase
    end
  end

  // Local memory: no reset (a RAM); the host port has priority over PE_ST.
  always_ff @(posedge clk) begin
    if (host_we)                          lm[host_addr] <= host_wdata;
    else if (ctrl.op == PE_ST && en)      lm[lm_addr]   <= rb_v;
  end
  assign host_rdata = lm[host_addr];

  assign nw_in   = ra_v;
  assign bus_out = top ? ra_v : '0;
  assign rr_req  = (ctrl.op == PE_MAX_STEP) ? cand : rsp;
endmodule
