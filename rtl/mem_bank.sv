// mem_bank: one bank of the shared memory, with a fixed access latency.
//
// A word-addressed memory of DEPTH words. `start` samples we, addr and wdata;
// a store writes the word and a load reads it in that same cycle, and exactly
// LATENCY cycles later the bank raises `done` for one cycle, with the read
// word on `rdata` for a load. The bank is pipelined: a new operation may start
// in every cycle. This models the latency-per-operation memory (2, 5 or 10
// cycles) behind each controller port; the read-at-start timing and the
// pipelining are this design's choices. The array is written as plain RTL
// and maps to block RAM plus a delay line. The array has no reset, but it
// ignores writes while `rst_n` is low, so that the contents loaded before
// reset survive whatever the not-yet-reset controller drives.
module mem_bank #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned DEPTH   = 16384,
  parameter int unsigned LATENCY = 2     // cycles from start to done, >= 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,     // word offset inside the bank
  input  logic [DATA_W-1:0] wdata,
  output logic              done,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned AW = mic_pkg::idx_w(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic              vld_q  [LATENCY];
  logic [DATA_W-1:0] data_q [LATENCY];

  always_ff @(posedge clk) begin
    if (rst_n && start && we) mem[AW'(addr)] <= wdata;  // no writes during reset
    data_q[0] <= mem[AW'(addr)];
    for (int k = 1; k < LATENCY; k++) data_q[k] <= data_q[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LATENCY; k++) vld_q[k] <= 1'b0;
    end else begin
      vld_q[0] <= start;
      for (int k = 1; k < LATENCY; k++) vld_q[k] <= vld_q[k-1];
    end
  end

  assign done  = vld_q[LATENCY-1];
  assign rdata = data_q[LATENCY-1];

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) start |-> addr < ADDR_W'(DEPTH));

endmodule
