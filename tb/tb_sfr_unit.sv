// tb_sfr_unit: exhaustive check of STEP / FIND / RESOLVE_FIRST next-state
// logic for every combination of responder bit, mask top and lower-ID
// responder signal.
module tb_sfr_unit;
  import asc_pkg::*;
  sfr_op_t op;
  logic rsp, top, lower, rsp_n, top_n;
  int checks = 0, failures = 0;

  sfr_unit dut (.*);

  initial begin
    for (int o = 0; o < 4; o++)
      for (int v = 0; v < 8; v++) begin
        bit er, et, sel;
        op = sfr_op_t'(o); rsp = v[0]; top = v[1]; lower = v[2];
        sel = rsp && !lower;
        case (o)
          0: begin et = sel; er = rsp && !sel; end     // STEP
          1: begin et = sel; er = rsp;         end     // FIND
          2: begin et = sel; er = 1'b0;        end     // RESOLVE_FIRST
          default: begin et = top; er = rsp;   end     // no operation
        endcase
        #1;
        checks++;
        if (rsp_n !== er || top_n !== et) begin
          failures++;
          $display("FAIL op=%0d rsp=%b top=%b lower=%b -> %b %b", o, rsp, top, lower, rsp_n, top_n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
