// mic_ce: Control Element of one MIC input port.
//
// The requester pulses `start` for one cycle. The CE turns that pulse into a
// request (`req`) that it keeps raising towards the Resource Managers until one
// of them answers with `ack`; the acknowledge disables the CE again until the
// controller returns `done` (tracked only to check the requester's protocol).
// `req` follows `start` combinationally, so a request can be accepted in the
// very cycle it is issued (no added delay, as the controller is meant to work).
// The requester must keep address, data and operation type steady from `start`
// until `done`, and may not start a new operation before `done` (asserted).
module mic_ce (
  input  logic clk,
  input  logic rst_n,
  input  logic start,  // one-cycle execution request from the requester
  input  logic ack,    // the addressed Resource Manager accepted the request
  input  logic done,   // the operation finished (from the return steering)
  output logic req     // pending request towards the Resource Managers
);

  logic pending_q;  // start seen, not yet acknowledged
  logic running_q;  // acknowledged, not yet done

  assign req  = start | pending_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      running_q <= 1'b0;
    end else begin
      pending_q <= req & ~ack;
      if (ack)       running_q <= 1'b1;
      else if (done) running_q <= 1'b0;
    end
  end

  // One operation at a time per input port.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !(pending_q || running_q));
  // An acknowledge only answers a request.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);

endmodule
