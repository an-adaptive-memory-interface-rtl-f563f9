// mic_unbd: selection holder ("UNBD") of one MIC input port.
//
// Once a Resource Manager acknowledges the input, the UNBD keeps the input's
// selection `sel` raised while the operation runs, so that the output steering
// keeps feeding the input's lines to the memory port. `sel` is raised in the
// acknowledge cycle itself (combinationally) and dropped in the cycle the
// operation's `done` returns, which leaves the port free for a request that is
// accepted in that same cycle.
module mic_unbd (
  input  logic clk,
  input  logic rst_n,
  input  logic ack,    // accepted by a Resource Manager
  input  logic done,   // operation finished
  output logic sel     // the input currently owns a memory port
);

  logic held_q;

  assign sel = ack | (held_q & ~done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    held_q <= 1'b0;
    else if (ack)  held_q <= 1'b1;
    else if (done) held_q <= 1'b0;
  end

  a_no_ack_while_held: assert property (@(posedge clk) disable iff (!rst_n) ack |-> !held_q);

endmodule
