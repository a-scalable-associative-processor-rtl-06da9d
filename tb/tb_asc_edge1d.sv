// tb_asc_edge1d: edge detection in 1-D mode on the full 36-PE processor.
// Each row of a 6 x 6 image is stored in the local memory of one PE (PE r
// holds row r, pixel c at address 16+c), so each image column lies across
// PEs at one address. A control-unit loop walks the interior columns; for
// each it broadcasts the weights of both Prewitt masks through a common
// register, every PE multiplies its three pixels by one weight row and adds
// them, the first weight row's sum is moved down one PE and the third row's
// up one PE over the 1-D network, and the three row sums are added. The
// absolute values of the two masks' results are added and thresholded at 0;
// border rows are cleared by a search on the PE ID. Results are compared
// with the expected edge image and a convolution computed here, and the
// run's cycle count with the count worked out from the program: a fixed
// prologue plus the same loop body once per interior column, i.e. time
// linear in the image width.
module tb_asc_edge1d;
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
  int checks = 0, failures = 0, cycles = 0;
  logic [IW-1:0] prog [$];

  asc_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && running) cycles++;

  int img [6][6] = '{'{0,0,0,0,0,0}, '{0,1,1,1,1,0}, '{0,1,1,1,1,0},
                     '{0,1,1,1,1,0}, '{0,1,1,1,1,0}, '{0,0,0,0,0,0}};
  int edge_img [6][6] = '{'{0,0,0,0,0,0}, '{0,1,1,1,1,0}, '{0,1,0,0,1,0},
                          '{0,1,0,0,1,0}, '{0,1,1,1,1,0}, '{0,0,0,0,0,0}};
  int wv [3][3] = '{'{-1,0,1}, '{-1,0,1}, '{-1,0,1}};
  int wh [3][3] = '{'{1,1,1}, '{0,0,0}, '{-1,-1,-1}};

  function automatic void emit(logic [IW-1:0] w); prog.push_back(w); endfunction
  function automatic int here(); return prog.size(); endfunction
  // cycles an instruction range takes when executed once (MOVE is 3 cycles)
  function automatic int cost(int from, int to);
    int s = 0;
    for (int i = from; i < to; i++) s += (opcode_t'(prog[i][31:26]) == OP_MOVE) ? 3 : 1;
    return s;
  endfunction

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

  int body_start, body_end, pro_cost, epi_cost;

  task automatic build();
    prog.delete();
    // prologue: interior rows (PE ID 1..4) flagged in L7, column counter
    emit(enc(OP_PCMP, 0, 1, 15, 0, CMP_GEU, SRC_IMM, 1));
    emit(enc(OP_PCMP, 0, 2, 15, 0, CMP_LEU, SRC_IMM, 4));
    emit(enc(OP_LOP, 0, 7, 1, 2, LOP_AND, 0, 0));
    emit(enc(OP_LDI, 0, 2, 0, 0, 0, 0, 1));              // R2 = column
    emit(enc(OP_LDI, 0, 3, 0, 0, 0, 0, 5));              // R3 = last column + 1
    body_start = here();
    emit(enc(OP_WCR, 0, 2, 2, 0, 0, 0, 0));
    emit(enc(OP_PALU, 0, 9, 0, 2, ALU_PASSB, SRC_CR, 0));  // P9 = column
    for (int j = 0; j < 3; j++)
      emit(enc(OP_PLD, 0, 4'(10 + j), 9, 0, 0, 0, 8'(15 + j)));  // pixels c-1, c, c+1
    for (int m = 0; m < 2; m++) begin
      emit(enc(OP_PLDI, 0, 4'(5 + m), 0, 0, 0, 0, 0));
      for (int i = 0; i < 3; i++) begin
        emit(enc(OP_PLDI, 0, 13, 0, 0, 0, 0, 0));
        for (int j = 0; j < 3; j++) begin
          emit(enc(OP_LD, 0, 1, 0, 0, 0, 0, 8'(200 + m * 9 + i * 3 + j)));
          emit(enc(OP_WCR, 0, 1, 1, 0, 0, 0, 0));
          emit(enc(OP_PALU, 0, 7, 4'(10 + j), 1, ALU_MUL, SRC_CR, 0));
          emit(enc(OP_PALU, 0, 13, 13, 7, ALU_ADD, SRC_REG, 0));
        end
        if (i == 0) emit(enc(OP_MOVE, 0, 13, 13, 0, DIR_DOWN, 2'b00, 0));
        if (i == 2) emit(enc(OP_MOVE, 0, 13, 13, 0, DIR_UP, 2'b00, 0));
        emit(enc(OP_PALU, 0, 4'(5 + m), 4'(5 + m), 13, ALU_ADD, SRC_REG, 0));
      end
      emit(enc(OP_PCMP, 0, 8, 4'(5 + m), 0, CMP_LTS, SRC_IMM, 0));
      emit(enc(OP_SRCHL, 0, 0, 8, 0, 0, 0, 0));
      emit(enc(OP_PALU, 1, 4'(5 + m), 0, 4'(5 + m), ALU_SUB, SRC_REG, 0));
      emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    end
    emit(enc(OP_PALU, 0, 5, 5, 6, ALU_ADD, SRC_REG, 0));
    emit(enc(OP_PLDI, 0, 14, 0, 0, 0, 0, 0));
    emit(enc(OP_SRCH, 0, 0, 5, 0, CMP_NE, SRC_IMM, 0));
    emit(enc(OP_SRCHL, 1, 0, 7, 0, 0, 0, 0));            // and an interior row
    emit(enc(OP_PLDI, 1, 14, 0, 0, 0, 0, 1));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_POP, 0, 0, 0, 0, 0, 0, 0));
    emit(enc(OP_PST, 0, 0, 9, 14, 0, 0, 32));            // out[c] at 32+c
    emit(enc(OP_ALU, 0, 2, 2, 0, ALU_ADD, SRC_IMM, 1));
    emit(enc_br(BR_LTU, 2, 3, PC_W'(body_start)));
    body_end = here();
    emit(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
    pro_cost = cost(0, body_start);
    epi_cost = 1;
  endtask

  initial begin
    byte_t v;
    start = 0; imem_we = 0; dmem_we = 0; pe_mem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_addr = 0; dmem_wdata = 0; pe_mem_pe = 0; pe_mem_addr = 0; pe_mem_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++)
      for (int c = 0; c < 6; c++) begin
        pe_wr(j, 16 + c, j < 6 ? img[j][c] : 0);
        pe_wr(j, 32 + c, 0);
      end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        dm_wr(200 + i * 3 + j, wv[i][j]);
        dm_wr(209 + i * 3 + j, wh[i][j]);
      end
    build();
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) begin
        int sv, sh, ref_v;
        sv = 0; sh = 0;
        if (r > 0 && r < 5 && c > 0 && c < 5)
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              sv += wv[i][j] * img[r + i - 1][c + j - 1];
              sh += wh[i][j] * img[r + i - 1][c + j - 1];
            end
        ref_v = ((sv < 0 ? -sv : sv) + (sh < 0 ? -sh : sh)) != 0;
        pe_rd(r, 32 + c, v);
        chk($sformatf("edge (%0d,%0d) vs image", r, c), v, edge_img[r][c]);
        chk($sformatf("edge (%0d,%0d) vs convolution", r, c), v, ref_v);
      end
    // 4 interior columns; the loop body costs the same every time
    chk("cycle count", cycles, pro_cost + 4 * cost(body_start, body_end) + epi_cost);
    $display("cycles=%0d body=%0d", cycles, cost(body_start, body_end));
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
