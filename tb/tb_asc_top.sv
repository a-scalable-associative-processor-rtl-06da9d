// tb_asc_top: end-to-end test of the complete ASC processor at its default
// size (36 PEs on a 6 x 6 grid). A host loads programs into the control
// unit and records into the PEs, starts the machine and reads the results
// back through the host ports.
//
// Program 1, student table (12 records, relation ID 1, in PEs 0..11; the
// other PEs are idle with relation ID 0): nested search for grades over 90,
// a STEP loop that copies each responder's student ID, and its PE ID from
// the control unit's R15, to the control unit's data memory, counts them and
// sums their grades, MAX and MIN of the grade with FIND to read the winner, RESOLVE_FIRST on a multi-responder search, a 1-D move with
// wrap-around, and a mask-stack overflow.
// Program 2, edge detection on the 6 x 6 image of one pixel per PE: both
// Prewitt masks applied with 2-D moves, absolute values by masked negation,
// thresholding by search, border PEs found by 2-D moves without wrap. The
// output is compared with the expected edge image and with a convolution
// computed here.
// Program 3, a byte-serial 16-bit add in every PE, with the carry between
// the bytes found by compare and applied by a masked increment.
// Each mechanism (search, nested search, STEP, FIND, RESOLVE_FIRST, MAX,
// MIN, masked suppression, data-bus read, 1-D and 2-D moves with and without
// wrap, stack overflow, branches on responders) is counted; one that never
// happens counts as a failure.
module tb_asc_top;
  import asc_pkg::*;
  localparam int N = 36, COLS = 6;
  logic clk = 0, rst_n = 0;
  logic start, running, done, imem_we, dmem_we, pe_mem_we, any_rsp, stack_ovf;
  logic [PC_W-1:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic [7:0] dmem_addr, pe_mem_addr;
  logic [5:0] pe_mem_pe;
  byte_t dmem_wdata, dmem_rdata, pe_mem_wdata, pe_mem_rdata;
  logic [N-1:0] rsp_vec, top_vec;
  int checks = 0, failures = 0;
  logic [IW-1:0] prog [$];

  asc_top dut (.*);
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- data
  int grade [12] = '{66, 95, 87, 78, 100, 84, 64, 88, 75, 83, 83, 26};
  int sid   [12] = '{7, 5, 11, 4, 2, 1, 6, 13, 9, 10, 3, 8};
  // 6 x 6 input image and the expected edge image
  int img   [6][6] = '{'{0,0,0,0,0,0}, '{0,1,1,1,1,0}, '{0,1,1,1,1,0},
                       '{0,1,1,1,1,0}, '{0,1,1,1,1,0}, '{0,0,0,0,0,0}};
  int edge_img [6][6] = '{'{0,0,0,0,0,0}, '{0,1,1,1,1,0}, '{0,1,0,0,1,0},
                       '{0,1,0,0,1,0}, '{0,1,1,1,1,0}, '{0,0,0,0,0,0}};
  int wv [3][3] = '{'{-1,0,1}, '{-1,0,1}, '{-1,0,1}};     // Prewitt vertical
  int wh [3][3] = '{'{1,1,1}, '{0,0,0}, '{-1,-1,-1}};     // Prewitt horizontal

  // ---------------------------------------------------------------- mechanism counters
  int n_srch, n_nested, n_step, n_find, n_resolve, n_max, n_min, n_suppressed,
      n_getcr, n_move1d, n_move2d, n_wrap, n_nowrap, n_ovf, n_br_rsp;
  pe_ctrl_t c;
  assign c = dut.pe_ctrl;
  always @(posedge clk) if (rst_n && running) begin
    if (c.op == PE_SRCH || c.op == PE_SRCHL) begin
      n_srch++;
      if (c.masked && top_vec != '0) n_nested++;
    end
    if (c.op == PE_SFR && c.f == 3'(SFR_STEP))    n_step++;
    if (c.op == PE_SFR && c.f == 3'(SFR_FIND))    n_find++;
    if (c.op == PE_SFR && c.f == 3'(SFR_RESOLVE)) n_resolve++;
    if (c.op == PE_MAX_LOAD) begin if (c.f[0]) n_min++; else n_max++; end
    if (c.masked && c.op inside {PE_LDI, PE_ALU, PE_ST, PE_NET_WB} && top_vec != '1 && top_vec != '0)
      n_suppressed++;
    if (dut.u_cu.op == OP_GETCR) n_getcr++;
    if (dut.net_route) begin
      if (dut.net_mode2d) n_move2d++; else n_move1d++;
      if (dut.net_wrap) n_wrap++; else n_nowrap++;
    end
    if (stack_ovf) n_ovf++;
    if (dut.u_cu.op == OP_BR && dut.u_cu.ff inside {3'(BR_RSP), 3'(BR_NRSP)} && dut.u_cu.taken) n_br_rsp++;
  end

  // ---------------------------------------------------------------- helpers
  function automatic void emit(logic [IW-1:0] w); prog.push_back(w); endfunction
  function automatic int here(); return prog.size(); endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic pe_wr(int pe, int a, int v);
    @(negedge clk); pe_mem_we = 1; pe_mem_pe = 6'(pe); pe_mem_addr = 8'(a); pe_mem_wdata = byte_t'(v);
    @(negedge clk); pe_mem_we = 0;
  endtask
  task automatic pe_rd(int pe, int a, output byte_t v);
    @(negedge clk); pe_mem_pe = 6'(pe); pe_mem_addr = 8'(a); #1 v = pe_mem_rdata;
  endtask
  task automatic dm_wr(int a, int v);
    @(negedge clk); dmem_we = 1; dmem_addr = 8'(a); dmem_wdata = byte_t'(v);
    @(negedge clk); dmem_we = 0;
  endtask
  task automatic dm_rd(int a, output byte_t v);
    @(negedge clk); dmem_addr = 8'(a); #1 v = dmem_rdata;
  endtask
  task automatic run_prog();
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- program 1
  task automatic build_db();
    int loop_top, br_exit;
    prog.delete();
    emit(enc(OP_PLD, 0, 1, 0, 0, 0, 0, 0));              // P1 = relation ID
    emit(enc(OP_PLD, 0, 2, 0, 0, 0, 0, 1));              // P2 = student ID
    emit(enc(OP_PLD, 0, 3, 0, 0, 0, 0, 2));              // P3 = grade
    emit(enc(OP_LDI, 0, 1, 0, 0, 0, 0, 1));
    emit(enc(OP_WCR, 0, 1, 1, 0, 0, 0, 0));              // CR1 = 1 (relation)
    emit(enc(OP_LDI, 0, 1, 0, 0, 0, 0, 90));
    emit(enc(OP_WCR, 0, 2, 1, 0, 0, 0, 0));              // CR2 = 90 (key)
    emit(enc(OP_SRCH, 0, 0, 1, 1, CMP_EQ, SRC_CR, 0));   // members of relation 1
    emit(enc(OP_SRCH, 1, 0, 3, 2, CMP_GTU, SRC_CR, 0));  // nested: grade > 90
    emit(enc(OP_LDI, 0, 9, 0, 0, 0, 0, 0));              // R9 = count
    loop_top = here();
    br_exit = here(); emit('0);                          // patched: BR NRSP exit
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_STEP, 0, 0));
    emit(enc(OP_GETCR, 0, 3, 2, 0, 0, 0, 0));            // CR3 = selected P2
    emit(enc(OP_RCR, 0, 2, 3, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 9, 2, 0, 0, 100));             // DM[100+R9] = student ID
    emit(enc(OP_ST, 0, 0, 9, 15, 0, 0, 120));            // DM[120+R9] = R15, the selected PE's ID
    emit(enc(OP_GETCR, 0, 4, 3, 0, 0, 0, 0));            // CR4 = selected grade
    emit(enc(OP_RCR, 0, 3, 4, 0, 0, 0, 0));
    emit(enc(OP_ALU, 0, 10, 10, 3, ALU_ADD, SRC_REG, 0)); // R10 = sum of grades
    emit(enc(OP_ALU, 0, 9, 9, 0, ALU_ADD, SRC_IMM, 1));
    emit(enc_br(BR_JMP, 0, 0, PC_W'(loop_top)));
    prog[br_exit] = enc_br(BR_NRSP, 0, 0, PC_W'(here()));
    emit(enc(OP_ST, 0, 0, 0, 9, 0, 0, 99));              // DM[99] = count
    emit(enc(OP_ST, 0, 0, 0, 10, 0, 0, 98));             // DM[98] = sum
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    // MAX grade within the relation, read the winner with FIND
    emit(enc(OP_SRCH, 0, 0, 1, 1, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_MAXMN, 0, 0, 3, 0, 0, 0, 0));
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_FIND, 0, 0));
    emit(enc(OP_GETCR, 0, 3, 2, 0, 0, 0, 0));
    emit(enc(OP_RCR, 0, 2, 3, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 2, 0, 0, 90));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    // MIN grade
    emit(enc(OP_SRCH, 0, 0, 1, 1, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_MAXMN, 0, 0, 3, 0, 1, 0, 0));
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_FIND, 0, 0));
    emit(enc(OP_GETCR, 0, 3, 2, 0, 0, 0, 0));
    emit(enc(OP_RCR, 0, 2, 3, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 2, 0, 0, 91));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    // RESOLVE_FIRST among grades over 80, then check no responders remain
    emit(enc(OP_SRCH, 0, 0, 1, 1, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_SRCH, 1, 0, 3, 0, CMP_GTU, SRC_IMM, 80));
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_RESOLVE, 0, 0));
    emit(enc(OP_GETCR, 0, 3, 2, 0, 0, 0, 0));
    emit(enc(OP_RCR, 0, 2, 3, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 2, 0, 0, 92));
    emit(enc(OP_LDI, 0, 4, 0, 0, 0, 0, 0));
    emit(enc_br(BR_RSP, 0, 0, PC_W'(here() + 2)));       // not taken
    emit(enc(OP_LDI, 0, 4, 0, 0, 0, 0, 1));
    emit(enc(OP_ST, 0, 0, 0, 4, 0, 0, 93));
    // masked store: only the resolved PE writes LM[3]
    emit(enc(OP_PLDI, 0, 5, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 0, 5, 0, 0, 3));
    emit(enc(OP_PLDI, 1, 5, 0, 0, 0, 0, 8'hEE));
    emit(enc(OP_PST, 0, 0, 0, 5, 0, 0, 3));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    // 1-D move with wrap: every PE receives its lower neighbour's ID
    emit(enc(OP_MOVE, 0, 6, 15, 0, DIR_DOWN, 2'b01, 0));
    emit(enc(OP_PST, 0, 0, 0, 6, 0, 0, 40));
    // 1-D move without wrap, upwards
    emit(enc(OP_MOVE, 0, 6, 15, 0, DIR_UP, 2'b00, 0));
    emit(enc(OP_PST, 0, 0, 0, 6, 0, 0, 41));
    // mask-stack overflow: 17 pushes onto an empty 16-entry stack, then pops
    for (int i = 0; i < 17; i++) emit(enc(OP_PUSH, 0, 0, 0, 0, 0, 1, 0));
    for (int i = 0; i < 17; i++) emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  // ---------------------------------------------------------------- program 2
  task automatic emit_move(int d, int a, net_dir_t dir, logic wrap);
    emit(enc(OP_MOVE, 0, 4'(d), 4'(a), 0, dir, {1'b1, wrap}, 0));
  endtask

  // ---------------------------------------------------------------- program 3
  // Byte-serial 16-bit add, LM[64..65] = LM[60..61] + LM[62..63] (low byte
  // first). The 8-bit PEs have no carry flag: the carry out of the low byte
  // is (sum < addend), kept in a logical register, and a masked increment
  // adds it to the high byte.
  task automatic build_add16();
    prog.delete();
    emit(enc(OP_PLDI, 0, 0, 0, 0, 0, 0, 0));              // P0 = 0 (address base)
    emit(enc(OP_PLD, 0, 1, 0, 0, 0, 0, 60));              // P1 = a low
    emit(enc(OP_PLD, 0, 2, 0, 0, 0, 0, 61));              // P2 = a high
    emit(enc(OP_PLD, 0, 3, 0, 0, 0, 0, 62));              // P3 = b low
    emit(enc(OP_PLD, 0, 4, 0, 0, 0, 0, 63));              // P4 = b high
    emit(enc(OP_PALU, 0, 5, 1, 3, ALU_ADD, SRC_REG, 0));  // P5 = low sum
    emit(enc(OP_PCMP, 0, 1, 5, 1, CMP_LTU, SRC_REG, 0));  // L1 = carry = P5 < P1
    emit(enc(OP_PALU, 0, 6, 2, 4, ALU_ADD, SRC_REG, 0));  // P6 = high sum
    emit(enc(OP_SRCHL, 0, 0, 1, 0, 0, 0, 0));             // responders: PEs with a carry
    emit(enc(OP_PALU, 1, 6, 6, 0, ALU_ADD, SRC_IMM, 1));  // masked: P6 += 1
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 0, 5, 0, 0, 64));
    emit(enc(OP_PST, 0, 0, 0, 6, 0, 0, 65));
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  task automatic build_edge2d();
    prog.delete();
    emit(enc(OP_PLD, 0, 4, 0, 0, 0, 0, 8));               // P4 = pixel
    emit(enc(OP_PLDI, 0, 5, 0, 0, 0, 0, 0));              // P5 = vertical sum
    emit(enc(OP_PLDI, 0, 6, 0, 0, 0, 0, 0));              // P6 = horizontal sum
    // interior PEs: every neighbour exists (2-D moves without wrap)
    emit(enc(OP_PLDI, 0, 9, 0, 0, 0, 0, 1));
    for (int k = 0; k < 4; k++) begin
      emit_move(8, 9, net_dir_t'(k), 1'b0);
      emit(enc(OP_PCMP, 0, 4'(1 + k), 8, 0, CMP_EQ, SRC_IMM, 1));
    end
    emit(enc(OP_LOP, 0, 5, 1, 2, LOP_AND, 0, 0));
    emit(enc(OP_LOP, 0, 6, 3, 4, LOP_AND, 0, 0));
    emit(enc(OP_LOP, 0, 7, 5, 6, LOP_AND, 0, 0));        // L7 = interior
    // the nine weight cells of both masks; weights come from data memory
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          emit(enc(OP_LD, 0, 1, 0, 0, 0, 0, 8'(200 + m * 9 + i * 3 + j)));
          emit(enc(OP_WCR, 0, 1, 1, 0, 0, 0, 0));
          emit(enc(OP_PALU, 0, 7, 4, 1, ALU_MUL, SRC_CR, 0));
          if (i == 0) emit_move(7, 7, DIR_DOWN, 1'b0);
          if (i == 2) emit_move(7, 7, DIR_UP, 1'b0);
          if (j == 0) emit_move(7, 7, DIR_RIGHT, 1'b0);
          if (j == 2) emit_move(7, 7, DIR_LEFT, 1'b0);
          emit(enc(OP_PALU, 0, 4'(5 + m), 4'(5 + m), 7, ALU_ADD, SRC_REG, 0));
        end
    // absolute values: negate where negative (masked)
    for (int m = 0; m < 2; m++) begin
      emit(enc(OP_PCMP, 0, 8, 4'(5 + m), 0, CMP_LTS, SRC_IMM, 0));
      emit(enc(OP_SRCHL, 0, 0, 8, 0, 0, 0, 0));
      emit(enc(OP_PALU, 1, 4'(5 + m), 0, 4'(5 + m), ALU_SUB, SRC_REG, 0));
      emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    end
    emit(enc(OP_PALU, 0, 5, 5, 6, ALU_ADD, SRC_REG, 0));
    // threshold at 0, then clear the border
    emit(enc(OP_PLDI, 0, 10, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 5, 0, CMP_NE, SRC_IMM, 0));
    emit(enc(OP_PLDI, 1, 10, 0, 0, 0, 0, 1));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_LOP, 0, 9, 7, 0, LOP_NOTA, 0, 0));
    emit(enc(OP_SRCHL, 0, 0, 9, 0, 0, 0, 0));
    emit(enc(OP_PLDI, 1, 10, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 0, 10, 0, 0, 48));
    emit(enc(OP_PST, 0, 0, 0, 5, 0, 0, 49));            // |V|+|H| for inspection
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    byte_t v;
    int exp_cnt, best, exp_sid, conv_ref;
    start = 0; imem_we = 0; dmem_we = 0; pe_mem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; pe_mem_pe = 0; pe_mem_addr = 0; pe_mem_wdata = 0;
    {n_srch, n_nested, n_step, n_find, n_resolve, n_max, n_min, n_suppressed,
     n_getcr, n_move1d, n_move2d, n_wrap, n_nowrap, n_ovf, n_br_rsp} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- program 1
    for (int j = 0; j < N; j++) begin
      pe_wr(j, 0, j < 12 ? 1 : 0);
      pe_wr(j, 1, j < 12 ? sid[j] : 0);
      pe_wr(j, 2, j < 12 ? grade[j] : 200);   // idle PEs hold a large value
    end
    build_db();
    run_prog();
    exp_cnt = 0;
    for (int j = 0; j < 12; j++) if (grade[j] > 90) begin
      dm_rd(100 + exp_cnt, v); chk($sformatf("STEP output %0d", exp_cnt), v, sid[j]);
      dm_rd(120 + exp_cnt, v); chk($sformatf("STEP PE ID in R15 %0d", exp_cnt), v, j);
      exp_cnt++;
    end
    dm_rd(99, v); chk("STEP count", v, exp_cnt);
    best = 0;
    for (int j = 0; j < 12; j++) if (grade[j] > 90) best += grade[j];
    dm_rd(98, v); chk("STEP sum", v, best % 256);
    best = 0; exp_sid = 0;
    for (int j = 0; j < 12; j++) if (grade[j] > best) begin best = grade[j]; exp_sid = sid[j]; end
    dm_rd(90, v); chk("MAX student", v, exp_sid);
    best = 999;
    for (int j = 0; j < 12; j++) if (grade[j] < best) begin best = grade[j]; exp_sid = sid[j]; end
    dm_rd(91, v); chk("MIN student", v, exp_sid);
    exp_sid = -1;
    for (int j = 11; j >= 0; j--) if (grade[j] > 80) exp_sid = j;
    dm_rd(92, v); chk("RESOLVE_FIRST student", v, sid[exp_sid]);
    dm_rd(93, v); chk("no responders after RESOLVE_FIRST", v, 1);
    for (int j = 0; j < N; j++) begin
      pe_rd(j, 3, v); chk($sformatf("masked store PE%0d", j), v, j == exp_sid ? 8'hEE : 0);
      pe_rd(j, 40, v); chk($sformatf("1-D wrap PE%0d", j), v, (j + N - 1) % N);
      pe_rd(j, 41, v); chk($sformatf("1-D no wrap PE%0d", j), v, j == N - 1 ? 0 : j + 1);
    end

    // ---- program 2
    for (int r = 0; r < 6; r++)
      for (int cc = 0; cc < 6; cc++) pe_wr(r * COLS + cc, 8, img[r][cc]);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        dm_wr(200 + i * 3 + j, wv[i][j]);
        dm_wr(209 + i * 3 + j, wh[i][j]);
      end
    build_edge2d();
    run_prog();
    for (int r = 0; r < 6; r++)
      for (int cc = 0; cc < 6; cc++) begin
        int sv, sh;
        sv = 0; sh = 0;
        if (r > 0 && r < 5 && cc > 0 && cc < 5)
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              sv += wv[i][j] * img[r + i - 1][cc + j - 1];
              sh += wh[i][j] * img[r + i - 1][cc + j - 1];
            end
        conv_ref = ((sv < 0 ? -sv : sv) + (sh < 0 ? -sh : sh)) != 0;
        pe_rd(r * COLS + cc, 48, v);
        chk($sformatf("edge (%0d,%0d) vs image", r, cc), v, edge_img[r][cc]);
        chk($sformatf("edge (%0d,%0d) vs convolution", r, cc), v, conv_ref);
        if (r > 0 && r < 5 && cc > 0 && cc < 5) begin
          pe_rd(r * COLS + cc, 49, v);
          chk($sformatf("|V|+|H| (%0d,%0d)", r, cc), v, (sv < 0 ? -sv : sv) + (sh < 0 ? -sh : sh));
        end
      end

    // ---- program 3: operands from a linear congruential generator, with
    // carry corner cases in the first PEs
    begin
      int a16 [N], b16 [N], ncarry;
      logic [31:0] lcg;
      lcg = 32'd777; ncarry = 0;
      for (int j = 0; j < N; j++) begin
        lcg = lcg * 32'd1103515245 + 32'd12345; a16[j] = int'(lcg[31:16]);
        lcg = lcg * 32'd1103515245 + 32'd12345; b16[j] = int'(lcg[31:16]);
      end
      a16[0] = 16'h00FF; b16[0] = 16'h0001;   // carry into the high byte
      a16[1] = 16'hFFFF; b16[1] = 16'h0001;   // carry and 16-bit wrap
      a16[2] = 16'h12FF; b16[2] = 16'h3400;   // no carry, low byte 0xFF
      for (int j = 0; j < N; j++) begin
        pe_wr(j, 60, a16[j] & 255); pe_wr(j, 61, a16[j] >> 8);
        pe_wr(j, 62, b16[j] & 255); pe_wr(j, 63, b16[j] >> 8);
        if ((a16[j] & 255) + (b16[j] & 255) > 255) ncarry++;
      end
      build_add16();
      run_prog();
      for (int j = 0; j < N; j++) begin
        int s;
        byte_t lo, hi;
        s = (a16[j] + b16[j]) & 16'hFFFF;
        pe_rd(j, 64, lo); pe_rd(j, 65, hi);
        chk($sformatf("16-bit add PE%0d", j), {hi, lo}, s);
      end
      chk("16-bit add: some carries and some none", int'(ncarry > 0 && ncarry < N), 1);
    end

    // ---- mechanisms
    $display("search=%0d nested=%0d step=%0d find=%0d resolve=%0d max=%0d min=%0d suppressed=%0d",
             n_srch, n_nested, n_step, n_find, n_resolve, n_max, n_min, n_suppressed);
    $display("getcr=%0d move1d=%0d move2d=%0d wrap=%0d nowrap=%0d overflow=%0d br_rsp=%0d",
             n_getcr, n_move1d, n_move2d, n_wrap, n_nowrap, n_ovf, n_br_rsp);
    chk("mechanism search",     n_srch > 0, 1);
    chk("mechanism nested",     n_nested > 0, 1);
    chk("mechanism STEP",       n_step > 0, 1);
    chk("mechanism FIND",       n_find > 0, 1);
    chk("mechanism RESOLVE",    n_resolve > 0, 1);
    chk("mechanism MAX",        n_max > 0, 1);
    chk("mechanism MIN",        n_min > 0, 1);
    chk("mechanism suppressed", n_suppressed > 0, 1);
    chk("mechanism data bus",   n_getcr > 0, 1);
    chk("mechanism 1-D move",   n_move1d > 0, 1);
    chk("mechanism 2-D move",   n_move2d > 0, 1);
    chk("mechanism wrap",       n_wrap > 0, 1);
    chk("mechanism no wrap",    n_nowrap > 0, 1);
    chk("mechanism overflow",   n_ovf > 0, 1);
    chk("mechanism branch rsp", n_br_rsp > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
