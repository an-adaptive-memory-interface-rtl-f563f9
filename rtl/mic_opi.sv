// mic_opi: Operation Index unit of one MIC output (memory) port.
//
// Watches the selections sel-i-j of all inputs for this port and records which
// input owns the port. The stored index (sel-j-i) steers the port's done and
// result lines back to that input. The index is registered: it is captured at
// every cycle in which some input selects the port, so it is valid from the
// cycle after the acknowledge until the next operation is accepted, which
// covers every cycle in which the memory can answer (latency >= 1).
module mic_opi #(
  parameter int unsigned N_IN = 16,
  localparam int unsigned IDX_W = mic_pkg::idx_w(N_IN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  sel_col,  // sel-i-j for every input i
  output logic [IDX_W-1:0] owner     // sel-j-i: input that owns the port
);

  logic [IDX_W-1:0] enc;

  always_comb begin
    enc = '0;
    for (int i = 0; i < N_IN; i++)
      if (sel_col[i]) enc = IDX_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        owner <= '0;
    else if (|sel_col) owner <= enc;
  end

  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_col));

endmodule
