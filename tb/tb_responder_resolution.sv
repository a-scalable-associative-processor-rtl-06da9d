// tb_responder_resolution: random request vectors on a 36-PE array; each
// PE's "lower responder exists" output and the global "any responder" are
// recomputed here by scanning the vector.
module tb_responder_resolution;
  localparam int N = 36;
  logic [N-1:0] req, lower;
  logic any;
  int checks = 0, failures = 0;

  responder_resolution #(.N(N)) dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      case (t)
        0: req = '0;
        1: req = '1;
        2: req = {1'b1, {(N-1){1'b0}}};
        default: req = {$urandom, $urandom} & ((t % 3 == 0) ? {$urandom, $urandom} : '1);
      endcase
      #1;
      for (int j = 0; j < N; j++) begin
        bit e;
        e = 0;
        for (int k = 0; k < j; k++) e |= req[k];
        checks++;
        if (lower[j] !== e) failures++;
      end
      checks++;
      if (any !== (req != 0)) failures++;
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
