// tb_pe_array: a 12-PE array holding the sample student table (one record
// per PE: ID in local memory byte 1, grade in byte 0). It replays the
// responder-processing example: search for grades over 90, then STEP twice,
// and compares every PE's mask top and responder bit with the table of
// expected values. It then runs MAX and MIN (Falkoff) searches, a nested
// MIN among a searched subset with a tie, FIND and RESOLVE_FIRST on the tie,
// and reads the selected PE's record over the data bus. Every cycle outside
// a MAX/MIN step it also checks `first_id`, the encoded ID of the lowest
// responder. Expected results are
// computed here from the table itself.
module tb_pe_array;
  import asc_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl;
  logic [W*N-1:0] nw_out, nw_in;
  byte_t bus_data, host_wdata, host_rdata, first_id;
  logic any_rsp, stack_ovf, host_we;
  logic [N-1:0] rsp_vec, top_vec;
  logic [3:0] host_pe;
  logic [7:0] host_addr;
  int checks = 0, failures = 0;

  int grade [N] = '{66, 95, 87, 78, 100, 84, 64, 88, 75, 83, 83, 26};
  int sid   [N] = '{7, 5, 11, 4, 2, 1, 6, 13, 9, 10, 3, 8};

  pe_array #(.N(N), .LM_DEPTH(256), .STACK_DEPTH(16)) dut (
    .clk, .rst_n, .ctrl, .nw_out, .nw_in, .bus_data, .any_rsp, .first_id, .rsp_vec, .top_vec,
    .stack_ovf, .host_we, .host_pe, .host_addr, .host_wdata, .host_rdata
  );
  always #5 clk = ~clk;

  // Outside MAX/MIN steps the resolution unit sees the responder bits, so
  // first_id must always be the lowest set bit of rsp_vec (0 when none).
  function automatic int lowest(logic [N-1:0] v);
    for (int j = 0; j < N; j++) if (v[j]) return j;
    return 0;
  endfunction
  always @(posedge clk) if (rst_n && ctrl.op != PE_MAX_STEP) begin
    checks++;
    if (first_id != byte_t'(lowest(rsp_vec))) begin
      failures++;
      $display("FAIL first_id %0d, rsp %b", first_id, rsp_vec);
    end
  end

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

  // the control unit's MAX/MIN sequence: one load cycle, then one per bit
  task automatic maxmin(int a, bit is_min);
    act(PE_MAX_LOAD, 0, 0, a, 0, int'(is_min));
    for (int k = 0; k < W; k++) act(PE_MAX_STEP, 0, 0, a, 0, int'(is_min));
  endtask

  task automatic chkv(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic logic [N-1:0] sel(int lo, int hi, bit want_min);
    // PEs whose grade is the max (or min) among grades in [lo, hi]
    int best; logic [N-1:0] v;
    best = want_min ? 1000 : -1;
    for (int j = 0; j < N; j++)
      if (grade[j] >= lo && grade[j] <= hi)
        if (want_min ? grade[j] < best : grade[j] > best) best = grade[j];
    v = '0;
    for (int j = 0; j < N; j++) v[j] = (grade[j] == best);
    return v;
  endfunction

  initial begin
    logic [N-1:0] exp_rsp, tie;
    int first;
    ctrl = '0; nw_out = '0; host_we = 0; host_pe = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk); host_we = 1; host_pe = 4'(j); host_addr = 0; host_wdata = byte_t'(grade[j]);
      @(negedge clk); host_addr = 1; host_wdata = byte_t'(sid[j]);
    end
    @(negedge clk); host_we = 0;
    act(PE_LD, 0, 1, 0, 0, 0, 0, 0);   // P1 = grade
    act(PE_LD, 0, 2, 0, 0, 0, 0, 1);   // P2 = student ID

    // associative search: grade > 90, key in a common register
    act(PE_SRCH, 0, 0, 1, 3, CMP_GTU, SRC_CR, 0, 90);
    exp_rsp = '0;
    for (int j = 0; j < N; j++) exp_rsp[j] = grade[j] > 90;
    chkv("search rsp", rsp_vec, exp_rsp);
    chkv("search mask", top_vec, exp_rsp);
    chkv("search mask = PE1,PE4", top_vec, 12'b0000_0001_0010);
    checks++; if (!any_rsp) failures++;

    // STEP1 / STEP2 as in the sample table
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP);
    chkv("STEP1 mask", top_vec, 12'b0000_0000_0010);
    chkv("STEP1 rsp",  rsp_vec, 12'b0000_0001_0000);
    @(negedge clk); ctrl.a = 4'd2; #1;
    checks++; if (bus_data !== byte_t'(sid[1])) begin failures++; $display("FAIL bus %0d", bus_data); end
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP);
    chkv("STEP2 mask", top_vec, 12'b0000_0001_0000);
    chkv("STEP2 rsp",  rsp_vec, 12'b0);
    checks++; if (any_rsp) failures++;
    act(PE_SFR, 0, 0, 0, 0, SFR_STEP);
    chkv("STEP3 mask", top_vec, 12'b0);
    act(PE_POP);

    // MAX and MIN over all PEs
    act(PE_PUSH, 0, 0, 0, 0, 0, 1);
    maxmin(1, 0);
    chkv("MAX mask", top_vec, sel(0, 255, 0));
    chkv("MAX rsp", rsp_vec, sel(0, 255, 0));
    act(PE_POP);
    act(PE_PUSH, 0, 0, 0, 0, 0, 1);
    maxmin(1, 1);
    chkv("MIN mask", top_vec, sel(0, 255, 1));
    act(PE_POP);

    // MIN among grades over 80: a tie between two PEs
    act(PE_SRCH, 0, 0, 1, 0, CMP_GTU, SRC_IMM, 80);
    maxmin(1, 1);
    tie = sel(81, 255, 1);
    chkv("MIN subset", top_vec, tie);
    checks++; if ($countones(tie) != 2) failures++;
    first = 0;
    while (!tie[first]) first++;
    act(PE_SFR, 0, 0, 0, 0, SFR_FIND);
    chkv("FIND mask", top_vec, N'(1) << first);
    chkv("FIND rsp", rsp_vec, tie);
    @(negedge clk); ctrl.a = 4'd2; #1;
    checks++; if (bus_data !== byte_t'(sid[first])) failures++;
    act(PE_SFR, 0, 0, 0, 0, SFR_RESOLVE);
    chkv("RESOLVE mask", top_vec, N'(1) << first);
    chkv("RESOLVE rsp", rsp_vec, '0);

    act(PE_POP);

    // two-byte field, processed a byte at a time from the high byte:
    // high byte = (grade < 80), low byte = student ID
    act(PE_CMP, 0, 0, 1, 0, CMP_LTU, SRC_IMM, 80);
    act(PE_LDI, 0, 4, 0, 0, 0, 0, 0);
    act(PE_SRCHL, 0, 0, 0);
    act(PE_LDI, 1, 4, 0, 0, 0, 0, 1);
    act(PE_POP);
    act(PE_PUSH, 0, 0, 0, 0, 0, 1);
    maxmin(4, 0);
    maxmin(2, 0);
    begin
      int best, bj;
      best = -1; bj = 0;
      for (int j = 0; j < N; j++) begin
        int key;
        key = (grade[j] < 80 ? 256 : 0) + sid[j];
        if (key > best) begin best = key; bj = j; end
      end
      chkv("16-bit MAX mask", top_vec, N'(1) << bj);
      chkv("16-bit MAX rsp", rsp_vec, N'(1) << bj);
    end
    act(PE_POP);
    // re-select the RESOLVE_FIRST winner for the masked update below
    act(PE_SRCH, 0, 0, 15, 0, CMP_EQ, SRC_IMM, first);

    // masked update of the selected record only, then read back from memory
    act(PE_ST, 1, 0, 0, 1, 0, 0, 5);   // LM[5] = grade, only in the selected PE
    for (int j = 0; j < N; j++) begin
      @(negedge clk); host_pe = 4'(j); host_addr = 5; #1;
      checks++;
      if (j == first && host_rdata !== byte_t'(grade[j])) failures++;
    end
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
