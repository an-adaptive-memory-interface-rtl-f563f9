// bfs_accel: hardware accelerator for breadth-first search over a shared,
// banked memory, built around the adaptive Memory Interface Controller.
//
// N_KER copies of the BFS kernel run side by side ("spatial multithreading"):
// the loop driver hands each one a frontier vertex per round. Each kernel owns
// two controller inputs, so the controller has 2*N_KER inputs and one output
// per memory bank. The controller routes every access to its bank at run
// time, serialises accesses that collide on a bank and performs the kernels'
// compare-and-swap and fetch-and-add operations atomically, so the kernels
// synchronise through memory only. The N_BANKS banks have LATENCY cycles per
// operation and hold the graph interleaved word by word.
//
// Interface: the host places the graph in memory (CSR row offsets and edge
// targets, dist[] all ones except the sources, parent[], the sources in
// queue[0..src_count-1] and src_count in the tail word), sets the base
// addresses and pulses `start`. `done` pulses when the search is over;
// `levels` is the deepest level reached and `visited` the number of vertices
// in the queue. Defaults: 8 kernels and 8 banks, the largest configuration
// evaluated for this controller; 16384 words per bank (enough for a
// 5000-vertex, 72887-edge graph) and 2 cycles of memory latency are this
// design's choices among the evaluated latencies of 2, 5 and 10 cycles.
module bfs_accel #(
  parameter int unsigned N_KER      = 8,
  parameter int unsigned N_BANKS    = 8,
  parameter int unsigned LATENCY    = 2,
  parameter int unsigned BANK_DEPTH = 16384,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] src_count,
  input  logic [ADDR_W-1:0] queue_base,
  input  logic [ADDR_W-1:0] off_base,
  input  logic [ADDR_W-1:0] edge_base,
  input  logic [ADDR_W-1:0] dist_base,
  input  logic [ADDR_W-1:0] parent_base,
  input  logic [ADDR_W-1:0] tail_addr,
  output logic              done,
  output logic              busy,
  output logic [DATA_W-1:0] levels,
  output logic [DATA_W-1:0] visited
);
  import mic_pkg::*;

  localparam int unsigned N_IN = 2 * N_KER;

  // loop driver <-> kernels
  logic              k_start   [N_KER];
  logic [DATA_W-1:0] k_id      [N_KER];
  logic [DATA_W-1:0] k_level   [N_KER];
  logic              k_done    [N_KER];
  logic [DATA_W-1:0] k_n_added [N_KER];

  // kernels <-> controller
  logic              in_start      [N_IN];
  mem_op_e           in_op         [N_IN];
  logic [ADDR_W-1:0] in_addr       [N_IN];
  logic [DATA_W-1:0] in_wdata      [N_IN];
  logic [DATA_W-1:0] in_cmp        [N_IN];
  logic              in_done       [N_IN];
  logic [DATA_W-1:0] in_result     [N_IN];
  logic [DATA_W-1:0] in_amo_result [N_IN];

  // controller <-> banks
  logic              mem_start [N_BANKS];
  logic              mem_we    [N_BANKS];
  logic [ADDR_W-1:0] mem_addr  [N_BANKS];
  logic [DATA_W-1:0] mem_wdata [N_BANKS];
  logic              mem_done  [N_BANKS];
  logic [DATA_W-1:0] mem_rdata [N_BANKS];

  bfs_driver #(.N_KER(N_KER), .DATA_W(DATA_W)) u_driver (
    .clk, .rst_n, .start, .src_count, .done, .busy, .levels, .visited,
    .k_start, .k_id, .k_level, .k_done, .k_n_added
  );

  for (genvar k = 0; k < N_KER; k++) begin : g_ker
    logic              m_start  [2];
    mem_op_e           m_op     [2];
    logic [ADDR_W-1:0] m_addr   [2];
    logic [DATA_W-1:0] m_wdata  [2];
    logic [DATA_W-1:0] m_cmp    [2];
    logic              m_done   [2];
    logic [DATA_W-1:0] m_result [2];
    logic [DATA_W-1:0] m_amo    [2];

    bfs_kernel #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_kernel (
      .clk, .rst_n,
      .start(k_start[k]), .id(k_id[k]), .level(k_level[k]),
      .done(k_done[k]), .n_added(k_n_added[k]),
      .queue_base, .off_base, .edge_base, .dist_base, .parent_base, .tail_addr,
      .m_start, .m_op, .m_addr, .m_wdata, .m_cmp, .m_done, .m_result, .m_amo
    );

    for (genvar p = 0; p < 2; p++) begin : g_port
      assign in_start[2*k+p] = m_start[p];
      assign in_op[2*k+p]    = m_op[p];
      assign in_addr[2*k+p]  = m_addr[p];
      assign in_wdata[2*k+p] = m_wdata[p];
      assign in_cmp[2*k+p]   = m_cmp[p];
      assign m_done[p]       = in_done[2*k+p];
      assign m_result[p]     = in_result[2*k+p];
      assign m_amo[p]        = in_amo_result[2*k+p];
    end
  end

  mic #(
    .N_IN(N_IN), .N_BANKS(N_BANKS), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .ATOMICS(1'b1)
  ) u_mic (
    .clk, .rst_n,
    .in_start, .in_op, .in_addr, .in_wdata, .in_cmp, .in_done, .in_result, .in_amo_result,
    .mem_start, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_rdata
  );

  for (genvar j = 0; j < N_BANKS; j++) begin : g_bank
    mem_bank #(
      .ADDR_W(ADDR_W), .DATA_W(DATA_W), .DEPTH(BANK_DEPTH), .LATENCY(LATENCY)
    ) u_bank (
      .clk, .rst_n,
      .start(mem_start[j]), .we(mem_we[j]), .addr(mem_addr[j]), .wdata(mem_wdata[j]),
      .done(mem_done[j]), .rdata(mem_rdata[j])
    );
  end

endmodule
