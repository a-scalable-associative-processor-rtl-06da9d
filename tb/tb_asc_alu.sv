// tb_asc_alu: checks every ALU function on random and corner operands
// against values computed here with plain integer arithmetic.
module tb_asc_alu;
  import asc_pkg::*;
  byte_t a, b, y;
  logic [2:0] fn;
  int checks = 0, failures = 0;

  asc_alu dut (.a, .b, .fn, .y);

  function automatic int ref_alu(int f, int x, int z);
    case (f)
      0: return (x + z) % 256;
      1: return (x - z + 256) % 256;
      2: return x & z;
      3: return x | z;
      4: return x ^ z;
      5: return (x * z) % 256;
      6: return 255 - x;
      default: return z;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = (i < 8) ? 8'hFF : byte_t'($urandom);
      b  = (i < 4) ? 8'hFF : byte_t'($urandom);
      fn = 3'(i % 8);
      #1;
      checks++;
      if (int'(y) != ref_alu(int'(fn), int'(a), int'(b))) begin
        failures++;
        $display("FAIL fn=%0d a=%0d b=%0d y=%0d", fn, a, b, y);
      end
    end
    // signed product example: -1 * 3 = -3
    a = 8'hFF; b = 8'd3; fn = 3'(ALU_MUL); #1;
    checks++; if (y != 8'hFD) failures++;
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
