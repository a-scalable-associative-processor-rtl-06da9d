// tb_asc_scale: the complete ASC processor scaled to 256 PEs on a 16 x 16
// grid (the largest array an 8-bit PE ID can number), with 16 bytes of local
// memory per PE to keep the simulation small.
//
// One pseudo-random byte per PE (from a linear congruential generator in
// this file) is searched with the same program a 36-PE machine would run:
// MAX and MIN with FIND, each reporting the winner's PE ID through the
// control unit's R15; a search for values above a key followed by a STEP
// loop that counts the responders and folds their IDs (XOR of R15); and two
// 2-D moves, down with wrap-around and left without. Everything is checked
// against values computed here. It also checks that MAX and MIN still take
// 1 + 8 cycles each at this size, and that the whole program takes the cycle
// count its instruction trace predicts.
module tb_asc_scale;
  import asc_pkg::*;
  localparam int N = 256, COLS = 16, ROWS = N / COLS, LMD = 16;
  localparam byte_t KEY = 8'd200;
  logic clk = 0, rst_n = 0;
  logic start, running, done, imem_we, dmem_we, pe_mem_we, any_rsp, stack_ovf;
  logic [PC_W-1:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic [7:0] dmem_addr, pe_mem_pe;
  logic [3:0] pe_mem_addr;
  byte_t dmem_wdata, dmem_rdata, pe_mem_wdata, pe_mem_rdata;
  logic [N-1:0] rsp_vec, top_vec;
  int checks = 0, failures = 0, cycles = 0, maxmin_cycles = 0;
  logic [IW-1:0] prog [$];
  byte_t val [N];

  asc_top #(.N_PE(N), .COLS(COLS), .LM_DEPTH(LMD)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && running) begin
    cycles++;
    if (dut.pe_ctrl.op inside {PE_MAX_LOAD, PE_MAX_STEP}) maxmin_cycles++;
  end

  function automatic void emit(logic [IW-1:0] w); prog.push_back(w); endfunction
  function automatic int here(); return prog.size(); endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic pe_wr(int pe, int a, int v);
    @(negedge clk); pe_mem_we = 1; pe_mem_pe = 8'(pe); pe_mem_addr = 4'(a); pe_mem_wdata = byte_t'(v);
    @(negedge clk); pe_mem_we = 0;
  endtask
  task automatic pe_rd(int pe, int a, output byte_t v);
    @(negedge clk); pe_mem_pe = 8'(pe); pe_mem_addr = 4'(a); #1 v = pe_mem_rdata;
  endtask
  task automatic dm_rd(int a, output byte_t v);
    @(negedge clk); dmem_addr = 8'(a); #1 v = dmem_rdata;
  endtask

  initial begin
    int loop_top, br_exit, n_loop, exp_cnt, exp_xor, imax, imin, nbr, exp_cycles;
    logic [31:0] lcg;
    byte_t v;
    start = 0; imem_we = 0; dmem_we = 0; pe_mem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; pe_mem_pe = 0; pe_mem_addr = 0; pe_mem_wdata = 0;
    lcg = 32'd12345;
    for (int j = 0; j < N; j++) begin
      lcg = lcg * 32'd1103515245 + 32'd12345;
      val[j] = lcg[23:16];
    end

    // ---- program
    emit(enc(OP_PLD, 0, 1, 0, 0, 0, 0, 0));              // P1 = LM[0]
    emit(enc(OP_PUSH, 0, 0, 0, 0, 0, 1, 0));             // all PEs are candidates
    emit(enc(OP_MAXMN, 0, 0, 1, 0, 0, 0, 0));            // MAX P1
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_FIND, 0, 0));       // R15 = first PE with the maximum
    emit(enc(OP_ST, 0, 0, 0, 15, 0, 0, 0));              // DM[0] = its ID
    emit(enc(OP_GETCR, 0, 1, 1, 0, 0, 0, 0));
    emit(enc(OP_RCR, 0, 1, 1, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 1, 0, 0, 1));               // DM[1] = maximum
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PUSH, 0, 0, 0, 0, 0, 1, 0));
    emit(enc(OP_MAXMN, 0, 0, 1, 0, 1, 0, 0));            // MIN P1
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_FIND, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 15, 0, 0, 2));              // DM[2] = ID of the first minimum
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_LDI, 0, 2, 0, 0, 0, 0, KEY));
    emit(enc(OP_WCR, 0, 2, 2, 0, 0, 0, 0));              // CR2 = key
    emit(enc(OP_SRCH, 0, 0, 1, 2, CMP_GTU, SRC_CR, 0));  // responders: P1 > key
    emit(enc(OP_LDI, 0, 3, 0, 0, 0, 0, 0));              // R3 = count
    emit(enc(OP_LDI, 0, 4, 0, 0, 0, 0, 0));              // R4 = XOR of IDs
    loop_top = here();
    br_exit = here(); emit('0);
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_STEP, 0, 0));
    emit(enc(OP_ALU, 0, 3, 3, 0, ALU_ADD, SRC_IMM, 1));
    emit(enc(OP_ALU, 0, 4, 4, 15, ALU_XOR, SRC_REG, 0));
    emit(enc_br(BR_JMP, 0, 0, PC_W'(loop_top)));
    n_loop = here() - loop_top;
    prog[br_exit] = enc_br(BR_NRSP, 0, 0, PC_W'(here()));
    emit(enc(OP_ST, 0, 0, 0, 3, 0, 0, 3));               // DM[3] = count
    emit(enc(OP_ST, 0, 0, 0, 4, 0, 0, 4));               // DM[4] = XOR of IDs
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_MOVE, 0, 2, 1, 0, DIR_DOWN, 2'b11, 0));  // P2 = P1 from the row above, wrap
    emit(enc(OP_MOVE, 0, 3, 1, 0, DIR_LEFT, 2'b10, 0));  // P3 = P1 from the right, no wrap
    emit(enc(OP_PST, 0, 0, 0, 2, 0, 0, 1));              // LM[1] = P2
    emit(enc(OP_PST, 0, 0, 0, 3, 0, 0, 2));              // LM[2] = P3
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) pe_wr(j, 0, val[j]);
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);

    // ---- expected values
    imax = 0; imin = 0; exp_cnt = 0; exp_xor = 0;
    for (int j = 0; j < N; j++) begin
      if (val[j] > val[imax]) imax = j;
      if (val[j] < val[imin]) imin = j;
      if (val[j] > KEY) begin exp_cnt++; exp_xor ^= j; end
    end
    dm_rd(0, v); chk("MAX: first PE ID", v, imax);
    dm_rd(1, v); chk("MAX: value", v, val[imax]);
    dm_rd(2, v); chk("MIN: first PE ID", v, imin);
    dm_rd(3, v); chk("responder count", v, exp_cnt);
    dm_rd(4, v); chk("XOR of responder IDs", v, exp_xor);
    chk("some responders", int'(exp_cnt > 0 && exp_cnt < N), 1);
    for (int j = 0; j < N; j++) begin
      int r, c;
      r = j / COLS; c = j % COLS;
      pe_rd(j, 1, v); chk($sformatf("down-wrap PE%0d", j), v, val[((r + ROWS - 1) % ROWS) * COLS + c]);
      pe_rd(j, 2, v); chk($sformatf("left PE%0d", j), v, (c == COLS - 1) ? 0 : val[j + 1]);
    end
    chk("MAX + MIN cycles", maxmin_cycles, 2 * (1 + W));
    // one cycle per instruction, the loop body once per responder plus the
    // final exit branch, and the extra cycles of MAX/MIN (8 each) and MOVE (2 each)
    nbr = prog.size() - n_loop;
    exp_cycles = nbr + exp_cnt * n_loop + 1 + 2 * W + 2 * 2;
    chk("program cycle count", cycles, exp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
