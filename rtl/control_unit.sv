// control_unit: the instruction stream control unit of the ASC processor.
//
// It fetches instructions from its instruction memory, executes scalar
// instructions with its 8-bit ALU, 16 8-bit registers and data memory, and
// broadcasts parallel instructions to the PE array as one `pe_ctrl` action
// per cycle. Those parts are the ones described; the instruction set, the
// memory sizes and the timing are this design's choices.
//
// Timing: no pipeline. A host writes a program into the instruction memory,
// then pulses `start`; execution begins at address 0 on the next edge and
// stops at HALT, which raises `done`. Most instructions take one cycle.
// MAX/MIN takes 1+W cycles (copy the field into every PE's shift register,
// then one cycle per bit from the most significant down). MOVE takes three:
// load NWIN, route into NWOUT, write the received byte into the destination
// register. Branches on `any_rsp` (the responder resolution unit's "some
// responder exists") let programs loop over responders with STEP.
// Assertions check that the host writes the program and pulses `start` only
// while idle. Register R15 holds a PE ID: every STEP, FIND or RESOLVE_FIRST
// that finds a responder loads it with the ID of the PE it selects
// (`first_id`, from the responder resolution unit), so the program knows
// which PE it is working on. Software may also write R15; a search that
// finds no responder leaves it unchanged (both choices of this design).
module control_unit
  import asc_pkg::*;
#(
  parameter int IMEM_DEPTH = 1 << PC_W,
  parameter int DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  // host port: program and data memory
  input  logic                          imem_we,
  input  logic [PC_W-1:0]               imem_addr,
  input  logic [IW-1:0]                 imem_wdata,
  input  logic                          dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  input  byte_t                         dmem_wdata,
  output byte_t                         dmem_rdata,
  // PE array
  output pe_ctrl_t                      pe_ctrl,
  input  logic                          any_rsp,
  input  byte_t                         first_id,
  input  byte_t                         bus_data,
  // network
  output logic                          net_load,
  output logic                          net_route,
  output net_dir_t                      net_dir,
  output logic                          net_wrap,
  output logic                          net_mode2d,
  // common registers
  output logic                          cr_we,
  output logic [3:0]                    cr_waddr,
  output byte_t                         cr_wdata,
  output logic [3:0]                    cr_raddr_cu,
  input  byte_t                         cr_rdata_cu,
  output logic [3:0]                    cr_raddr_pe,
  input  byte_t                         cr_rdata_pe
);
  localparam int DAW = $clog2(DMEM_DEPTH);

  logic [IW-1:0] imem [IMEM_DEPTH];
  byte_t         dmem [DMEM_DEPTH];
  byte_t         gpr  [NREG];

  logic [PC_W-1:0] pc;
  logic [3:0]      seq;

  // ---------------- decode
  logic [IW-1:0] inst;
  opcode_t       op;
  logic          m;
  logic [3:0]    fd, fa, fb;
  logic [2:0]    ff;
  logic [1:0]    fx;
  byte_t         imm;
  logic [PC_W-1:0] tgt;

  assign inst = imem[pc];
  assign op   = opcode_t'(inst[31:26]);
  assign m    = inst[25];
  assign fd   = inst[24:21];
  assign fa   = inst[20:17];
  assign fb   = inst[16:13];
  assign ff   = inst[12:10];
  assign fx   = inst[9:8];
  assign imm  = inst[7:0];
  assign tgt  = inst[PC_W-1:0];

  byte_t ra_v, rb_v, src_b, alu_y;
  logic  [DAW-1:0] dm_addr;
  logic  last, taken;

  assign ra_v = gpr[fa];
  assign rb_v = gpr[fb];
  always_comb begin
    case (fx)
      SRC_REG: src_b = rb_v;
      SRC_CR:  src_b = cr_rdata_pe;
      default: src_b = imm;
    endcase
  end
  asc_alu u_alu (.a(ra_v), .b(src_b), .fn(ff), .y(alu_y));
  assign dm_addr = DAW'(ra_v + imm);

  always_comb begin
    case (br_fn_t'(ff))
      BR_JMP:  taken = 1'b1;
      BR_EQ:   taken = ra_v == rb_v;
      BR_NE:   taken = ra_v != rb_v;
      BR_RSP:  taken = any_rsp;
      BR_NRSP: taken = ~any_rsp;
      BR_LTU:  taken = ra_v < rb_v;
      default: taken = 1'b0;
    endcase
  end

  // ---------------- broadcast action and multi-cycle sequencing
  always_comb begin
    pe_ctrl        = '0;
    pe_ctrl.op     = PE_NONE;
    pe_ctrl.masked = m;
    pe_ctrl.d      = fd;
    pe_ctrl.a      = fa;
    pe_ctrl.b      = fb;
    pe_ctrl.f      = ff;
    pe_ctrl.x      = fx;
    pe_ctrl.imm    = imm;
    pe_ctrl.cr     = cr_rdata_pe;
    net_load       = 1'b0;
    net_route      = 1'b0;
    last           = 1'b1;
    if (running) begin
      case (op)
        OP_PLDI:  pe_ctrl.op = PE_LDI;
        OP_PALU:  pe_ctrl.op = PE_ALU;
        OP_PLD:   pe_ctrl.op = PE_LD;
        OP_PST:   pe_ctrl.op = PE_ST;
        OP_PCMP:  pe_ctrl.op = PE_CMP;
        OP_LOP:   pe_ctrl.op = PE_LOP;
        OP_LGET:  pe_ctrl.op = PE_LGET;
        OP_SRCH:  pe_ctrl.op = PE_SRCH;
        OP_SRCHL: pe_ctrl.op = PE_SRCHL;
        OP_PUSH:  pe_ctrl.op = PE_PUSH;
        OP_POP:   pe_ctrl.op = PE_POP;
        OP_MSET:  pe_ctrl.op = PE_MSET;
        OP_SFR:   pe_ctrl.op = PE_SFR;
        OP_MAXMN: begin
          pe_ctrl.op = (seq == 0) ? PE_MAX_LOAD : PE_MAX_STEP;
          last       = (seq == 4'(W));
        end
        OP_MOVE: begin
          net_load   = (seq == 0);
          net_route  = (seq == 1);
          pe_ctrl.op = (seq == 2) ? PE_NET_WB : PE_NONE;
          last       = (seq == 2);
        end
        default: ;
      endcase
    end
  end

  assign net_dir    = net_dir_t'(ff[1:0]);
  assign net_wrap   = fx[0];
  assign net_mode2d = fx[1];

  // ---------------- common register access
  assign cr_raddr_cu = fa;
  assign cr_raddr_pe = fb;
  assign cr_we       = running && (op == OP_WCR || op == OP_GETCR);
  assign cr_waddr    = fd;
  assign cr_wdata    = (op == OP_GETCR) ? bus_data : ra_v;

  // ---------------- sequencing and scalar state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      seq     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < NREG; i++) gpr[i] <= '0;
    end else if (start) begin
      pc      <= '0;
      seq     <= '0;
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running) begin
      if (!last) begin
        seq <= seq + 1'b1;
      end else begin
        seq <= '0;
        pc  <= pc + 1'b1;
        case (op)
          OP_HALT: begin running <= 1'b0; done <= 1'b1; pc <= pc; end
          OP_LDI:  gpr[fd] <= imm;
          OP_ALU:  gpr[fd] <= alu_y;
          OP_LD:   gpr[fd] <= dmem[dm_addr];
          OP_RCR:  gpr[fd] <= cr_rdata_cu;
          OP_BR:   if (taken) pc <= tgt;
          OP_SFR:  if (any_rsp && ff[1:0] != SFR_NONE) gpr[PEID_REG] <= first_id;
          default: ;
        endcase
      end
    end
  end

  // Instruction and data memories (no reset). The host port has priority.
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  always_ff @(posedge clk) begin
    if (dmem_we)                           dmem[dmem_addr] <= dmem_wdata;
    else if (running && op == OP_ST)       dmem[dm_addr]   <= rb_v;
  end
  assign dmem_rdata = dmem[dmem_addr];

  // Host rules: the program may only be written, and `start` only pulsed,
  // while the machine is idle.
  a_imem_idle: assert property (@(posedge clk) imem_we |-> !running)
    else $error("control_unit: instruction memory written while running");
  a_start_idle: assert property (@(posedge clk) start |-> !running)
    else $error("control_unit: start pulsed while running");
endmodule
