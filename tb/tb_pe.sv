// tb_pe: drives one processing element (ID 5) with broadcast actions and
// checks its registers, logical registers, responder bit, mask stack and
// local memory after each one, against values worked out here. Covers the
// three operand sources, masked suppression, PE-ID register, searches and
// nested masks, STEP/FIND/RESOLVE_FIRST with and without a lower responder,
// a full MAX sequence and a network write-back.
module tb_pe;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl;
  logic lower, any_req, rsp, top, rr_req, stack_ovf, host_we;
  byte_t nw_out, nw_in, bus_out, host_wdata, host_rdata;
  logic [7:0] host_addr;
  int checks = 0, failures = 0;

  pe #(.LM_DEPTH(256), .STACK_DEPTH(16)) dut (
    .clk, .rst_n, .pe_id(8'd5), .ctrl, .lower, .any_req, .nw_out, .nw_in,
    .bus_out, .rsp, .top, .rr_req, .stack_ovf, .host_we, .host_addr,
    .host_wdata, .host_rdata
  );
  always #5 clk = ~clk;

  task automatic act(pe_op_t op, logic m = 0, int d = 0, int a = 0, int b = 0,
                     int f = 0, int x = 0, int imm = 0, int cr = 0);
    @(negedge clk);
    ctrl = '0;
    ctrl.op = op; ctrl.masked = m; ctrl.d = 4'(d); ctrl.a = 4'(a); ctrl.b = 4'(b);
    ctrl.f = 3'(f); ctrl.x = 2'(x); ctrl.imm = byte_t'(imm); ctrl.cr = byte_t'(cr);
    @(posedge clk);
    #1;
    ctrl.op = PE_NONE;
  endtask

  // read P[r] through the network output port (nw_in shows P[a])
  function automatic byte_t reg_of(int r);
    return dut.gpr[r];
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic peek_reg(int r, output byte_t v);
    @(negedge clk);
    ctrl = '0; ctrl.op = PE_NONE; ctrl.a = 4'(r);
    #1 v = nw_in;
  endtask

  initial begin
    byte_t v;
    ctrl = '0; lower = 0; any_req = 0; nw_out = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("reset top", top, 1); chk("reset rsp", rsp, 0);

    // host loads a record, PE loads it
    @(negedge clk); host_we = 1; host_addr = 8'd10; host_wdata = 8'd95;
    @(negedge clk); host_addr = 8'd11; host_wdata = 8'd7;
    @(negedge clk); host_we = 0;
    act(PE_LD, 0, 1, 0, 0, 0, 0, 10);                 // P1 = LM[P0+10] = 95
    peek_reg(1, v); chk("LD", v, 95);
    act(PE_LDI, 0, 2, 0, 0, 0, 0, 1);                 // P2 = 1
    act(PE_LD, 0, 3, 2, 0, 0, 0, 10);                 // P3 = LM[P2+10] = 7
    peek_reg(3, v); chk("LD indexed", v, 7);
    act(PE_ALU, 0, 4, 1, 3, ALU_ADD, SRC_REG);        // P4 = 95+7
    peek_reg(4, v); chk("ALU reg", v, 102);
    act(PE_ALU, 0, 4, 4, 0, ALU_SUB, SRC_CR, 0, 2);   // P4 = 102-2
    peek_reg(4, v); chk("ALU CR", v, 100);
    act(PE_ALU, 0, 5, 4, 0, ALU_MUL, SRC_IMM, 255);   // P5 = 100 * -1
    peek_reg(5, v); chk("ALU MUL imm", v, 156);
    act(PE_ALU, 0, 6, 15, 0, ALU_ADD, SRC_IMM, 0);    // P6 = PE ID
    peek_reg(6, v); chk("PE ID", v, 5);
    act(PE_ST, 0, 0, 2, 4, 0, 0, 20);                 // LM[1+20] = P4
    @(negedge clk); host_addr = 8'd21; #1 chk("ST", host_rdata, 100);

    // compare into logical registers and logic ops
    act(PE_CMP, 0, 0, 1, 0, CMP_GTU, SRC_IMM, 90);    // L0 = 95 > 90
    act(PE_CMP, 0, 1, 3, 0, CMP_EQ, SRC_CR, 0, 8);    // L1 = 7 == 8
    act(PE_LOP, 0, 2, 0, 1, LOP_ANDN);                // L2 = L0 & ~L1
    chk("CMP/LOP", int'(dut.lreg[2:0]), 3'b101);

    // search: unmasked, grade > 90 -> responder
    act(PE_SRCH, 0, 0, 1, 0, CMP_GTU, SRC_CR, 0, 90);
    chk("SRCH rsp", rsp, 1); chk("SRCH top", top, 1);
    // nested masked search that fails: P3 == 9
    act(PE_SRCH, 1, 0, 3, 0, CMP_EQ, SRC_IMM, 9);
    chk("nested rsp", rsp, 0); chk("nested top", top, 0);
    // masked instruction is suppressed while top = 0
    act(PE_LDI, 1, 7, 0, 0, 0, 0, 33);
    peek_reg(7, v); chk("masked suppressed", v, 0);
    chk("bus gated", bus_out, 0);
    act(PE_POP);
    chk("pop top", top, 1);
    act(PE_LDI, 1, 7, 0, 0, 0, 0, 33);
    peek_reg(7, v); chk("masked executes", v, 33);
    @(negedge clk); ctrl.a = 4'd7; #1 chk("bus", bus_out, 33);

    // LGET / MSET
    act(PE_LGET, 0, 3, 0, 0, 0, 1);                   // L3 = rsp (0)
    act(PE_LGET, 0, 4, 0, 0, 0, 0);                   // L4 = top (1)
    chk("LGET", int'(dut.lreg[4:3]), 2'b10);
    act(PE_MSET, 0, 0, 3);                            // top = L3 = 0
    chk("MSET", top, 0);
    act(PE_MSET, 0, 0, 4);                            // top = 1
    chk("MSET 1", top, 1);

    // SRCHL from L0 (1): responder again
    act(PE_SRCHL, 0, 0, 0);
    chk("SRCHL", rsp, 1);
    // FIND with a lower responder present: top 0, rsp kept
    lower = 1; act(PE_SFR, 0, 0, 0, 0, SFR_FIND); chk("FIND low top", top, 0); chk("FIND low rsp", rsp, 1);
    // STEP with a lower responder: top 0, rsp kept
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP); chk("STEP low top", top, 0); chk("STEP low rsp", rsp, 1);
    // FIND selected: top 1, rsp kept
    lower = 0; act(PE_SFR, 0, 0, 0, 0, SFR_FIND); chk("FIND top", top, 1); chk("FIND rsp", rsp, 1);
    // STEP selected: top 1, rsp cleared
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP); chk("STEP top", top, 1); chk("STEP rsp", rsp, 0);
    // STEP as non-responder: top cleared
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP); chk("STEP nonrsp top", top, 0);
    // RESOLVE_FIRST with a lower responder: rsp cleared, top 0
    act(PE_SRCHL, 0, 0, 0); lower = 1;
    act(PE_SFR, 0, 0, 0, 0, SFR_RESOLVE); chk("RESF top", top, 0); chk("RESF rsp", rsp, 0);
    lower = 0;

    // MAX over P1 = 95 = 8'b0101_1111; pretend other PEs decide any_req:
    // bit7: nobody has a 1 (any=0) -> unchanged; bit6: this PE 1, any=1 -> 1;
    // bit5: this PE 0 but another PE 1 (any=1) -> drop out.
    act(PE_PUSH, 0, 0, 0, 0, 0, 1);
    chk("PUSH 1", top, 1);
    act(PE_MAX_LOAD, 0, 0, 1);
    chk("MAX load rsp", rsp, 1);
    for (int k = 7; k >= 0; k--) begin
      @(negedge clk);
      ctrl = '0; ctrl.op = PE_MAX_STEP; ctrl.a = 4'd1;
      #1;
      chk($sformatf("cand bit %0d", k), rr_req, (k == 7 || k == 5) ? 0 : (k == 6) ? 1 : 0);
      any_req = (k == 6 || k == 5);
      @(posedge clk); #1;
      if (k == 6) begin chk("after b6 top", top, 1); chk("after b6 rsp", rsp, 1); end
      if (k == 7) chk("after b7 top", top, 1);
      ctrl.op = PE_NONE;
    end
    any_req = 0;
    chk("MAX lost top", top, 0); chk("MAX lost rsp", rsp, 0);

    // network write-back (masked: top is 0 now, so suppressed), then unmasked
    nw_out = 8'hA5;
    act(PE_NET_WB, 1, 8); peek_reg(8, v); chk("NET masked", v, 0);
    act(PE_NET_WB, 0, 8); peek_reg(8, v); chk("NET wb", v, 8'hA5);

    // overflow: push 17 times
    for (int i = 0; i < 17; i++) begin
      act(PE_PUSH, 0, 0, 0, 0, 0, 1);
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ovf = 0;
  always @(posedge clk) if (stack_ovf) n_ovf++;
  final if (n_ovf == 0) $display("note: no overflow observed");

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
