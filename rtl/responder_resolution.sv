// responder_resolution: the PE array's responder resolution unit.
//
// For every PE j it tells whether any PE with a lower ID is a responder
// (`lower[j]`), and it tells the control unit and the array whether any
// responder exists at all (`any`). It is purely combinational. The
// description gives the function; the insides here are the simplest circuit
// for it, a ripple OR prefix chain from PE 0 upward.
module responder_resolution #(
  parameter int N = 36
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] lower,
  output logic         any
);
  assign lower[0] = 1'b0;
  for (genvar i = 1; i < N; i++) begin : g_chain
    assign lower[i] = lower[i-1] | req[i-1];
  end
  assign any = lower[N-1] | req[N-1];
endmodule
