// tb_asc_database: relational-database workloads on the full 36-PE ASC
// processor, one tuple per PE, relation ID in PE register 1.
//
// Part 1, Intersection, Difference and Union of two (Student ID, Class) relations A
// (PEs 7..12) and B (PEs 13..16): the program STEPs through one relation,
// broadcasts each tuple's two fields through common registers and compares
// them in parallel with every tuple of the other relation (the two
// comparisons ANDed in logical registers). Intersection flags the tuples of A
// found in B; Difference flags the tuples of A not found in B; Union flags
// all of A and the tuples of B not found in A.
// Part 2, Cartesian Product and EquiJoin of A2 = (Class ID, Credit) in PEs
// 0..2 and B2 = (Student ID, Class) in PEs 3..5: the program counts B2 by
// STEPping, STEPs through A2 writing |B2| copies of each tuple into idle PEs
// 20.. with a copy number = own PE ID - first PE ID of the group, then STEPs
// through B2 writing each tuple into the result PEs whose copy number
// matches. EquiJoin is then one parallel compare of Class ID with Class, and
// a STEP loop counts the joined tuples.
// Part 3, Insert and Delete on the unsorted table: RESOLVE_FIRST over the
// idle PEs picks one to receive a new tuple; a search and a masked write of
// relation ID 0 deletes one. All expected results are computed here from the
// relations.
module tb_asc_database;
  import asc_pkg::*;
  localparam int N = 36;
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

  int a_sid [6] = '{4, 11, 7, 7, 5, 4};
  int a_cls [6] = '{239, 111, 239, 124, 124, 111};
  int b_sid [4] = '{5, 4, 7, 11};
  int b_cls [4] = '{111, 111, 124, 124};
  int a2_cid [3] = '{111, 124, 239};
  int a2_cr  [3] = '{3, 2, 3};
  int b2_sid [3] = '{1, 2, 2};
  int b2_cls [3] = '{239, 239, 111};
  localparam int RBASE = 20;   // first PE of the product

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

  // STEP loop skeleton over the PEs flagged in logical register L1.
  // Body runs with the selected PE's mask top = 1; L1 keeps the rest.
  // Returns the index of the exit-branch placeholder.
  task automatic loop_head(output int top_pc, output int br_exit);
    top_pc = here();
    emit(enc(OP_SRCHL, 0, 0, 1, 0, 0, 0, 0));           // RSP = L1, push
    br_exit = here(); emit('0);
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_STEP, 0, 0));
    emit(enc(OP_LGET, 0, 1, 0, 0, 0, 1, 0));            // L1 = remaining responders
    emit(enc(OP_GETCR, 0, 1, 2, 0, 0, 0, 0));           // CR1 = field 1
    emit(enc(OP_GETCR, 0, 2, 3, 0, 0, 0, 0));           // CR2 = field 2
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
  endtask
  task automatic loop_tail(int top_pc, int br_exit);
    emit(enc_br(BR_JMP, 0, 0, PC_W'(top_pc)));
    prog[br_exit] = enc_br(BR_NRSP, 0, 0, PC_W'(here()));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
  endtask
  // L5 = (relation == rel) & (P2 == CR1) & (P3 == CR2)
  task automatic match(int rel);
    emit(enc(OP_PCMP, 0, 2, 1, 0, CMP_EQ, SRC_IMM, 8'(rel)));
    emit(enc(OP_PCMP, 0, 3, 2, 1, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_PCMP, 0, 4, 3, 2, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_LOP, 0, 5, 2, 3, LOP_AND, 0, 0));
    emit(enc(OP_LOP, 0, 5, 5, 4, LOP_AND, 0, 0));
  endtask

  task automatic build_setops();
    int tp, bx;
    prog.delete();
    emit(enc(OP_PLD, 0, 1, 0, 0, 0, 0, 0));             // P1 relation, P2 sid, P3 class
    emit(enc(OP_PLD, 0, 2, 0, 0, 0, 0, 1));
    emit(enc(OP_PLD, 0, 3, 0, 0, 0, 0, 2));
    emit(enc(OP_PLDI, 0, 4, 0, 0, 0, 0, 0));            // P4 intersection flag
    // Intersection: step through B, flag matching tuples of A
    emit(enc(OP_PCMP, 0, 1, 1, 0, CMP_EQ, SRC_IMM, 2));
    loop_head(tp, bx);
    match(1);
    emit(enc(OP_SRCHL, 0, 0, 5, 0, 0, 0, 0));
    emit(enc(OP_PLDI, 1, 4, 0, 0, 0, 0, 1));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    loop_tail(tp, bx);
    emit(enc(OP_PST, 0, 0, 0, 4, 0, 0, 3));
    // Difference A - B: tuples of A that the intersection did not flag
    emit(enc(OP_PCMP, 0, 6, 1, 0, CMP_EQ, SRC_IMM, 1));  // L6 = in A
    emit(enc(OP_PCMP, 0, 7, 4, 0, CMP_EQ, SRC_IMM, 1));  // L7 = in A and B
    emit(enc(OP_LOP, 0, 6, 6, 7, LOP_ANDN, 0, 0));
    emit(enc(OP_PLDI, 0, 6, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCHL, 0, 0, 6, 0, 0, 0, 0));
    emit(enc(OP_PLDI, 1, 6, 0, 0, 0, 0, 1));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 0, 6, 0, 0, 5));
    // Union: flag all of A and B, step through A, unflag matches in B
    emit(enc(OP_PLDI, 0, 5, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 1, 0, CMP_GEU, SRC_IMM, 1));
    emit(enc(OP_SRCH, 1, 0, 1, 0, CMP_LEU, SRC_IMM, 2));
    emit(enc(OP_PLDI, 1, 5, 0, 0, 0, 0, 1));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PCMP, 0, 1, 1, 0, CMP_EQ, SRC_IMM, 1));
    loop_head(tp, bx);
    match(2);
    emit(enc(OP_SRCHL, 0, 0, 5, 0, 0, 0, 0));
    emit(enc(OP_PLDI, 1, 5, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    loop_tail(tp, bx);
    emit(enc(OP_PST, 0, 0, 0, 5, 0, 0, 4));
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  task automatic build_product();
    int tp, bx;
    prog.delete();
    emit(enc(OP_PLD, 0, 1, 0, 0, 0, 0, 0));
    emit(enc(OP_PLD, 0, 2, 0, 0, 0, 0, 1));
    emit(enc(OP_PLD, 0, 3, 0, 0, 0, 0, 2));
    // R7 = |B2| (count by stepping)
    emit(enc(OP_LDI, 0, 7, 0, 0, 0, 0, 0));
    emit(enc(OP_PCMP, 0, 1, 1, 0, CMP_EQ, SRC_IMM, 4));
    loop_head(tp, bx);
    emit(enc(OP_ALU, 0, 7, 7, 0, ALU_ADD, SRC_IMM, 1));
    loop_tail(tp, bx);
    emit(enc(OP_ST, 0, 0, 0, 7, 0, 0, 50));
    // step through A2, writing |B2| copies of each tuple at R5 .. R5+|B2|-1
    emit(enc(OP_LDI, 0, 5, 0, 0, 0, 0, RBASE));
    emit(enc(OP_PCMP, 0, 1, 1, 0, CMP_EQ, SRC_IMM, 3));
    loop_head(tp, bx);
    emit(enc(OP_ALU, 0, 6, 5, 7, ALU_ADD, SRC_REG, 0));
    emit(enc(OP_WCR, 0, 3, 5, 0, 0, 0, 0));             // CR3 = first PE of the group
    emit(enc(OP_WCR, 0, 4, 6, 0, 0, 0, 0));             // CR4 = one past the last
    emit(enc(OP_SRCH, 0, 0, 15, 3, CMP_GEU, SRC_CR, 0));
    emit(enc(OP_SRCH, 1, 0, 15, 4, CMP_LTU, SRC_CR, 0));
    emit(enc(OP_PALU, 1, 8, 0, 1, ALU_PASSB, SRC_CR, 0));   // Class ID
    emit(enc(OP_PALU, 1, 9, 0, 2, ALU_PASSB, SRC_CR, 0));   // Credit
    emit(enc(OP_PALU, 1, 12, 15, 3, ALU_SUB, SRC_CR, 0));   // copy number
    emit(enc(OP_PLDI, 1, 1, 0, 0, 0, 0, 5));                // insert into relation 5
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_ALU, 0, 5, 0, 6, ALU_PASSB, SRC_REG, 0)); // R5 = R6
    loop_tail(tp, bx);
    // step through B2, writing tuple t into the copies numbered t
    emit(enc(OP_LDI, 0, 8, 0, 0, 0, 0, 0));
    emit(enc(OP_PCMP, 0, 1, 1, 0, CMP_EQ, SRC_IMM, 4));
    loop_head(tp, bx);
    emit(enc(OP_WCR, 0, 5, 8, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 1, 0, CMP_EQ, SRC_IMM, 5));
    emit(enc(OP_SRCH, 1, 0, 12, 5, CMP_EQ, SRC_CR, 0));
    emit(enc(OP_PALU, 1, 10, 0, 1, ALU_PASSB, SRC_CR, 0)); // Student ID
    emit(enc(OP_PALU, 1, 11, 0, 2, ALU_PASSB, SRC_CR, 0)); // Class
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_ALU, 0, 8, 8, 0, ALU_ADD, SRC_IMM, 1));
    loop_tail(tp, bx);
    // store the product
    emit(enc(OP_PST, 0, 0, 0, 1, 0, 0, 10));
    for (int k = 0; k < 5; k++) emit(enc(OP_PST, 0, 0, 0, 4'(8 + k), 0, 0, 8'(11 + k)));
    // EquiJoin on Class ID == Class, flag and count
    emit(enc(OP_PLDI, 0, 13, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 1, 0, CMP_EQ, SRC_IMM, 5));
    emit(enc(OP_SRCH, 1, 0, 8, 11, CMP_EQ, SRC_REG, 0));
    emit(enc(OP_PLDI, 1, 13, 0, 0, 0, 0, 1));
    emit(enc(OP_LGET, 0, 1, 0, 0, 0, 1, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 0, 13, 0, 0, 16));
    emit(enc(OP_LDI, 0, 9, 0, 0, 0, 0, 0));
    loop_head(tp, bx);
    emit(enc(OP_ALU, 0, 9, 9, 0, ALU_ADD, SRC_IMM, 1));
    loop_tail(tp, bx);
    emit(enc(OP_ST, 0, 0, 0, 9, 0, 0, 51));
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  // Insert: pick any idle PE (relation ID 0) with RESOLVE_FIRST and write the
  // tuple in CR1/CR2 with relation ID 4 into it. Delete: search relation 4 for
  // Student ID 2 and Class 239 and set the relation ID of the match to 0.
  task automatic build_insdel();
    prog.delete();
    emit(enc(OP_LDI, 0, 1, 0, 0, 0, 0, 9));
    emit(enc(OP_WCR, 0, 1, 1, 0, 0, 0, 0));             // CR1 = 9
    emit(enc(OP_LDI, 0, 1, 0, 0, 0, 0, 124));
    emit(enc(OP_WCR, 0, 2, 1, 0, 0, 0, 0));             // CR2 = 124
    emit(enc(OP_SRCH, 0, 0, 1, 0, CMP_EQ, SRC_IMM, 0));
    emit(enc(OP_SFR, 0, 0, 0, 0, SFR_RESOLVE, 0, 0));
    emit(enc(OP_PALU, 1, 2, 0, 1, ALU_PASSB, SRC_CR, 0));
    emit(enc(OP_PALU, 1, 3, 0, 2, ALU_PASSB, SRC_CR, 0));
    emit(enc(OP_PLDI, 1, 1, 0, 0, 0, 0, 4));
    emit(enc(OP_GETCR, 0, 6, 15, 0, 0, 0, 0));          // CR6 = PE used
    emit(enc(OP_RCR, 0, 2, 6, 0, 0, 0, 0));
    emit(enc(OP_ST, 0, 0, 0, 2, 0, 0, 52));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 1, 0, CMP_EQ, SRC_IMM, 4));
    emit(enc(OP_SRCH, 1, 0, 2, 0, CMP_EQ, SRC_IMM, 2));
    emit(enc(OP_SRCH, 1, 0, 3, 0, CMP_EQ, SRC_IMM, 239));
    emit(enc(OP_PLDI, 1, 1, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    for (int k = 0; k < 3; k++) emit(enc(OP_PST, 0, 0, 0, 4'(1 + k), 0, 0, 8'(40 + k)));
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
  endtask

  initial begin
    byte_t v;
    int nj;
    start = 0; imem_we = 0; dmem_we = 0; pe_mem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; pe_mem_pe = 0; pe_mem_addr = 0; pe_mem_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- Intersection / Union
    for (int j = 0; j < N; j++) begin
      int rel, f1, f2;
      rel = 0; f1 = 0; f2 = 0;
      if (j >= 7 && j <= 12) begin rel = 1; f1 = a_sid[j-7]; f2 = a_cls[j-7]; end
      if (j >= 13 && j <= 16) begin rel = 2; f1 = b_sid[j-13]; f2 = b_cls[j-13]; end
      pe_wr(j, 0, rel); pe_wr(j, 1, f1); pe_wr(j, 2, f2);
    end
    build_setops();
    run_prog();
    for (int k = 0; k < 6; k++) begin
      bit inb;
      inb = 0;
      for (int q = 0; q < 4; q++) if (a_sid[k] == b_sid[q] && a_cls[k] == b_cls[q]) inb = 1;
      pe_rd(7 + k, 3, v); chk($sformatf("intersection A[%0d]", k), v, inb);
      pe_rd(7 + k, 4, v); chk($sformatf("union A[%0d]", k), v, 1);
      pe_rd(7 + k, 5, v); chk($sformatf("difference A[%0d]", k), v, !inb);
    end
    for (int q = 0; q < 4; q++) begin
      bit ina;
      ina = 0;
      for (int k = 0; k < 6; k++) if (a_sid[k] == b_sid[q] && a_cls[k] == b_cls[q]) ina = 1;
      pe_rd(13 + q, 3, v); chk($sformatf("intersection B[%0d] untouched", q), v, 0);
      pe_rd(13 + q, 4, v); chk($sformatf("union B[%0d]", q), v, !ina);
      pe_rd(13 + q, 5, v); chk($sformatf("difference B[%0d]", q), v, 0);
    end
    for (int j = 0; j < N; j++) if (j < 7 || j > 16) begin
      pe_rd(j, 4, v); chk($sformatf("union idle PE%0d", j), v, 0);
      pe_rd(j, 5, v); chk($sformatf("difference idle PE%0d", j), v, 0);
    end

    // ---- Cartesian Product / EquiJoin
    for (int j = 0; j < N; j++) begin
      int rel, f1, f2;
      rel = 0; f1 = 0; f2 = 0;
      if (j < 3) begin rel = 3; f1 = a2_cid[j]; f2 = a2_cr[j]; end
      else if (j < 6) begin rel = 4; f1 = b2_sid[j-3]; f2 = b2_cls[j-3]; end
      pe_wr(j, 0, rel); pe_wr(j, 1, f1); pe_wr(j, 2, f2);
    end
    build_product();
    run_prog();
    dm_rd(50, v); chk("count |B|", v, 3);
    nj = 0;
    for (int k = 0; k < 9; k++) begin
      int pe, ia, ib;
      pe = RBASE + k; ia = k / 3; ib = k % 3;
      pe_rd(pe, 10, v); chk($sformatf("product %0d relation", k), v, 5);
      pe_rd(pe, 11, v); chk($sformatf("product %0d Class ID", k), v, a2_cid[ia]);
      pe_rd(pe, 12, v); chk($sformatf("product %0d Credit", k), v, a2_cr[ia]);
      pe_rd(pe, 13, v); chk($sformatf("product %0d Student ID", k), v, b2_sid[ib]);
      pe_rd(pe, 14, v); chk($sformatf("product %0d Class", k), v, b2_cls[ib]);
      pe_rd(pe, 15, v); chk($sformatf("product %0d Register", k), v, ib);
      pe_rd(pe, 16, v); chk($sformatf("join %0d", k), v, a2_cid[ia] == b2_cls[ib]);
      nj += int'(a2_cid[ia] == b2_cls[ib]);
    end
    pe_rd(RBASE + 9, 10, v); chk("PE after the product stays idle", v, 0);
    pe_rd(RBASE - 1, 10, v); chk("PE before the product stays idle", v, 0);
    dm_rd(51, v); chk("join count", v, nj);
    $display("join tuples=%0d", nj);

    // ---- Insert / Delete (relation 4 = B2 in PEs 3..5; product PEs are busy)
    build_insdel();
    run_prog();
    begin
      int idle_first;
      idle_first = 6;   // PEs 0..5 hold A2/B2, 6..19 are idle
      dm_rd(52, v); chk("insert used the first idle PE", v, idle_first);
      pe_rd(idle_first, 40, v); chk("inserted relation", v, 4);
      pe_rd(idle_first, 41, v); chk("inserted Student ID", v, 9);
      pe_rd(idle_first, 42, v); chk("inserted Class", v, 124);
      for (int j = 3; j < 6; j++) begin
        pe_rd(j, 40, v);
        chk($sformatf("delete PE%0d", j), v, (b2_sid[j-3] == 2 && b2_cls[j-3] == 239) ? 0 : 4);
      end
      pe_rd(idle_first + 1, 40, v); chk("next idle PE untouched", v, 0);
    end
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
