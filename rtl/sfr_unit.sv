// sfr_unit: the per-PE STEP / FIND / RESOLVE_FIRST logic.
//
// Combinational next-state logic for the PE's responder bit and mask-stack
// top. `lower` comes from the responder resolution unit and is '1' when some
// PE with a lower ID is a responder (lower IDs have priority).
//   - The responder with no lower responder is selected: its mask top becomes
//     '1'. STEP and RESOLVE_FIRST clear its responder bit, FIND keeps it.
//   - Every other PE gets mask top '0'. Other responders keep their responder
//     bit under STEP and FIND; RESOLVE_FIRST clears all responder bits.
// This follows the description of the three instructions and of the STEP
// walk-through of the student table, where all other PEs' mask tops are
// cleared. The outputs are applied by the PE on the next clock edge.
module sfr_unit
  import asc_pkg::*;
(
  input  sfr_op_t op,
  input  logic    rsp,
  input  logic    top,
  input  logic    lower,
  output logic    rsp_n,
  output logic    top_n
);
  logic selected;
  assign selected = rsp & ~lower;

  always_comb begin
    rsp_n = rsp;
    top_n = top;
    case (op)
      SFR_STEP: begin
        top_n = selected;
        rsp_n = rsp & ~selected;
      end
      SFR_FIND: begin
        top_n = selected;
      end
      SFR_RESOLVE: begin
        top_n = selected;
        rsp_n = 1'b0;
      end
      default: ;
    endcase
  end
endmodule
