// tb_control_unit: runs a short program on the control unit alone. The
// common registers are a plain array here and the PE array is replaced by
// fixed data-bus and responder inputs. Checks scalar arithmetic, a counted
// loop, data-memory loads and stores, common-register traffic, branches on
// "any responder", loading of R15 with the selected PE's ID by STEP, the broadcast action stream of MAX (1 + 8 cycles) and
// MOVE (3 cycles), and the total cycle count of the program.
module tb_control_unit;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, running, done, imem_we, dmem_we, any_rsp;
  logic [PC_W-1:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic [7:0] dmem_addr;
  byte_t dmem_wdata, dmem_rdata, bus_data, first_id;
  pe_ctrl_t pe_ctrl;
  logic net_load, net_route, net_wrap, net_mode2d, cr_we;
  net_dir_t net_dir;
  logic [3:0] cr_waddr, cr_raddr_cu, cr_raddr_pe;
  byte_t cr_wdata, cr_rdata_cu, cr_rdata_pe;
  byte_t crs [16];
  int checks = 0, failures = 0, cycles = 0;
  int n_maxload = 0, n_maxstep = 0, n_load = 0, n_route = 0, n_wb = 0, n_srch = 0;
  logic [IW-1:0] prog [$];

  control_unit #(.IMEM_DEPTH(1024), .DMEM_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  assign cr_rdata_cu = crs[cr_raddr_cu];
  assign cr_rdata_pe = crs[cr_raddr_pe];
  always @(posedge clk) if (cr_we) crs[cr_waddr] <= cr_wdata;

  always @(posedge clk) if (rst_n && running) begin
    cycles++;
    if (pe_ctrl.op == PE_MAX_LOAD) n_maxload++;
    if (pe_ctrl.op == PE_MAX_STEP) n_maxstep++;
    if (pe_ctrl.op == PE_NET_WB) begin
      n_wb++;
      if (pe_ctrl.d != 3 || net_dir != DIR_UP || !net_wrap || !net_mode2d) failures++;
    end
    if (pe_ctrl.op == PE_SRCH) begin
      n_srch++;
      if (!pe_ctrl.masked || pe_ctrl.cr != 8'd77 || pe_ctrl.f != 3'(CMP_EQ)) failures++;
    end
    n_load  += int'(net_load);
    n_route += int'(net_route);
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic rd_dm(int a, output byte_t v);
    @(negedge clk); dmem_addr = 8'(a); #1 v = dmem_rdata;
  endtask

  initial begin
    byte_t v;
    start = 0; imem_we = 0; dmem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; any_rsp = 1; bus_data = 8'h3C; first_id = 8'd23;
    foreach (crs[i]) crs[i] = 0;
    prog = '{
      enc(OP_LDI, 0, 1, 0, 0, 0, 0, 5),                    // 0  R1 = 5
      enc(OP_LDI, 0, 2, 0, 0, 0, 0, 0),                    // 1  R2 = 0
      enc(OP_ALU, 0, 2, 2, 1, ALU_ADD, SRC_REG, 0),        // 2  R2 += R1
      enc(OP_ALU, 0, 1, 1, 0, ALU_SUB, SRC_IMM, 1),        // 3  R1 -= 1
      enc_br(BR_NE, 1, 0, 10'd2),                          // 4  loop while R1 != R0
      enc(OP_ST, 0, 0, 0, 2, 0, 0, 10),                    // 5  DM[10] = R2
      enc(OP_LD, 0, 3, 0, 0, 0, 0, 20),                    // 6  R3 = DM[20]
      enc(OP_WCR, 0, 4, 3, 0, 0, 0, 0),                    // 7  CR4 = R3
      enc(OP_RCR, 0, 4, 4, 0, 0, 0, 0),                    // 8  R4 = CR4
      enc(OP_ALU, 0, 5, 4, 0, ALU_MUL, SRC_IMM, 2),        // 9  R5 = R4 * 2
      enc(OP_ST, 0, 0, 0, 5, 0, 0, 11),                    // 10 DM[11] = R5
      enc(OP_MAXMN, 0, 0, 1, 0, 0, 0, 0),                  // 11 MAX P1
      enc(OP_MOVE, 0, 3, 4, 0, DIR_UP, 2'b11, 0),          // 12 P3 = move(P4) up, 2-D, wrap
      enc(OP_GETCR, 0, 5, 4, 0, 0, 0, 0),                  // 13 CR5 = bus
      enc(OP_RCR, 0, 6, 5, 0, 0, 0, 0),                    // 14 R6 = CR5
      enc(OP_ST, 0, 0, 0, 6, 0, 0, 12),                    // 15 DM[12] = R6
      enc_br(BR_RSP, 0, 0, 10'd18),                        // 16 taken
      enc(OP_LDI, 0, 7, 0, 0, 0, 0, 1),                    // 17 skipped
      enc_br(BR_NRSP, 0, 0, 10'd20),                       // 18 not taken
      enc(OP_LDI, 0, 8, 0, 0, 0, 0, 9),                    // 19 R8 = 9
      enc(OP_ST, 0, 0, 0, 7, 0, 0, 13),                    // 20 DM[13] = R7
      enc(OP_ST, 0, 0, 0, 8, 0, 0, 14),                    // 21 DM[14] = R8
      enc(OP_SRCH, 1, 0, 2, 4, CMP_EQ, SRC_CR, 0),         // 22 masked search, key CR4
      enc(OP_SFR, 0, 0, 0, 0, SFR_STEP, 0, 0),             // 23 STEP: R15 = selected PE ID
      enc(OP_ST, 0, 0, 0, 15, 0, 0, 15),                   // 24 DM[15] = R15
      enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0)                    // 25
    };
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; dmem_we = 1; dmem_addr = 20; dmem_wdata = 77;
    @(negedge clk); dmem_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    rd_dm(10, v); chk("loop sum", v, 15);
    rd_dm(11, v); chk("CR round trip * 2", v, 154);
    rd_dm(12, v); chk("GETCR from bus", v, 8'h3C);
    rd_dm(13, v); chk("BR RSP taken", v, 0);
    rd_dm(14, v); chk("BR NRSP not taken", v, 9);
    rd_dm(15, v); chk("R15 = selected PE ID", v, 23);
    chk("MAX load cycles", n_maxload, 1);
    chk("MAX step cycles", n_maxstep, W);
    chk("MOVE load/route/wb", n_load * 100 + n_route * 10 + n_wb, 111);
    chk("SRCH", n_srch, 1);
    // 37 instruction executions (address 17 is skipped), plus 8 extra MAX cycles and 2 extra MOVE cycles
    chk("cycle count", cycles, 37 + 8 + 2);
    chk("running low", running, 0);
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
