// mic_rm: Resource Manager of one MIC output (memory) port.
//
// Receives the requests that the input steering routed to this port, one bit
// per MIC input, and accepts at most one of them whenever the port is free.
// The accepted input gets a one-cycle `ack`; from then on the port is bound to
// that operation until `release_port` (the port's final done) comes back. A
// new request can be accepted in the same cycle as the release, so a busy port
// loses no cycle between operations. Among several requests the RM picks the
// first one after the input it served last (round robin); the arbitration
// order is this design's choice. Grants are combinational: a request that
// finds the port free is accepted in the cycle it appears.
module mic_rm #(
  parameter int unsigned N_IN = 16,
  localparam int unsigned IDX_W = mic_pkg::idx_w(N_IN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] req,           // req-i-j for every input i
  input  logic            release_port,  // the running operation completes this cycle
  output logic [N_IN-1:0] ack,           // one-hot acknowledge (ack-i)
  output logic            busy           // the port is bound to an operation
);

  logic             busy_q;
  logic [IDX_W-1:0] last_q;   // input served last
  logic [IDX_W-1:0] win;
  logic             free;

  assign free = ~busy_q | release_port;
  assign busy = busy_q;

  always_comb begin
    ack = '0;
    win = last_q;
    if (free) begin
      // Scan from the highest distance down so the nearest requester wins.
      for (int k = N_IN; k >= 1; k--) begin
        if (req[(int'(last_q) + k) % N_IN]) win = IDX_W'((int'(last_q) + k) % N_IN);
      end
      if (|req) ack[win] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      last_q <= IDX_W'(N_IN - 1);
    end else begin
      if (|ack) begin
        busy_q <= 1'b1;
        last_q <= win;
      end else if (release_port) begin
        busy_q <= 1'b0;
      end
    end
  end

  a_onehot_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack));
  a_ack_on_req: assert property (@(posedge clk) disable iff (!rst_n) (ack & ~req) == '0);
  a_release_when_busy: assert property (@(posedge clk) disable iff (!rst_n) release_port |-> busy_q);

endmodule
