// mic: adaptive Memory Interface Controller.
//
// Connects N_IN requester ports (memory operations of the accelerator's
// kernels) to N_BANKS independent memory banks with non-overlapping addresses,
// and decides at run time which operation goes to which bank. Per input i:
//   CE_i   turns the start pulse into a request held until accepted,
//   PI_i   applies the scrambling function: bank index ind-i and in-bank offset,
//   UNBD_i keeps the input's selection while its operation runs.
// Per memory port j:
//   RM_j   accepts one of the requests routed to it (steering 1) when the port
//          is free and answers with ack-i,
//   OPI_j  records which input owns the port,
//   AMO_j  passes loads and stores to the bank and runs atomic operations.
// The steering logic is written out in this module: steering 1 routes req-i to
// RM[ind-i]; steering 2 routes sel-i to sel-i-j; steering 3 drives the bank
// port's operation, address and data lines from the selected input;
// steering 4 returns done and results to the input named by OPI_j.
//
// Operations on different banks proceed in parallel; operations that collide
// on a bank are serialised by its RM, without a cycle of arbitration delay: a
// request that finds its port free reaches the bank in the cycle of its start
// pulse. Input protocol: `in_start[i]` is a one-cycle pulse; op, address, data
// and compare value stay steady until `in_done[i]`, which is a one-cycle pulse
// with the load data on `in_result[i]` and an atomic operation's old value on
// `in_amo_result[i]`. Bank protocol: `mem_start[j]` samples we/addr/wdata, and
// the bank answers with a one-cycle `mem_done[j]` at least one cycle later.
// The structure follows the controller's description; the port protocol, the
// interleaved scrambling and the round-robin order are this design's choices.
module mic #(
  parameter int unsigned N_IN    = 16,   // input ports (two per kernel, 8 kernels)
  parameter int unsigned N_BANKS = 8,    // memory ports / banks
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter bit          ATOMICS = 1'b1  // 0: load/store-only version
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // requester side
  input  logic                    in_start      [N_IN],
  input  mic_pkg::mem_op_e        in_op         [N_IN],
  input  logic [ADDR_W-1:0]       in_addr       [N_IN],
  input  logic [DATA_W-1:0]       in_wdata      [N_IN],
  input  logic [DATA_W-1:0]       in_cmp        [N_IN],
  output logic                    in_done       [N_IN],
  output logic [DATA_W-1:0]       in_result     [N_IN],
  output logic [DATA_W-1:0]       in_amo_result [N_IN],
  // memory side
  output logic                    mem_start     [N_BANKS],
  output logic                    mem_we        [N_BANKS],
  output logic [ADDR_W-1:0]       mem_addr      [N_BANKS],
  output logic [DATA_W-1:0]       mem_wdata     [N_BANKS],
  input  logic                    mem_done      [N_BANKS],
  input  logic [DATA_W-1:0]       mem_rdata     [N_BANKS]
);
  import mic_pkg::*;

  localparam int unsigned BIDX_W = idx_w(N_BANKS);
  localparam int unsigned IIDX_W = idx_w(N_IN);

  // per input
  logic              req      [N_IN];
  logic              ack_i    [N_IN];
  logic              sel_i    [N_IN];
  logic [BIDX_W-1:0] ind      [N_IN];
  logic [ADDR_W-1:0] offset   [N_IN];
  // per port, one bit per input
  logic [N_IN-1:0]   req_ij   [N_BANKS];
  logic [N_IN-1:0]   ack_ij   [N_BANKS];
  logic [N_IN-1:0]   sel_ij   [N_BANKS];
  // per port
  logic [IIDX_W-1:0] owner    [N_BANKS];
  logic              grant    [N_BANKS];
  logic              rm_busy  [N_BANKS];
  mem_op_e           p_op     [N_BANKS];
  logic [ADDR_W-1:0] p_addr   [N_BANKS];
  logic [DATA_W-1:0] p_wdata  [N_BANKS];
  logic [DATA_W-1:0] p_cmp    [N_BANKS];
  logic              p_done   [N_BANKS];
  logic [DATA_W-1:0] p_result [N_BANKS];
  logic [DATA_W-1:0] p_amo    [N_BANKS];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    mic_ce u_ce (
      .clk, .rst_n, .start(in_start[i]), .ack(ack_i[i]), .done(in_done[i]),
      .req(req[i])
    );
    mic_pi #(.ADDR_W(ADDR_W), .N_BANKS(N_BANKS)) u_pi (
      .addr(in_addr[i]), .ind(ind[i]), .offset(offset[i])
    );
    mic_unbd u_unbd (
      .clk, .rst_n, .ack(ack_i[i]), .done(in_done[i]), .sel(sel_i[i])
    );
  end

  // steering 1 and 2: route req-i and sel-i to the port named by ind-i
  always_comb begin
    for (int j = 0; j < N_BANKS; j++) begin
      for (int i = 0; i < N_IN; i++) begin
        req_ij[j][i] = req[i]   && (ind[i] == BIDX_W'(j));
        sel_ij[j][i] = sel_i[i] && (ind[i] == BIDX_W'(j));
      end
    end
  end

  // acknowledges back to the inputs
  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      ack_i[i] = 1'b0;
      for (int j = 0; j < N_BANKS; j++) ack_i[i] |= ack_ij[j][i];
    end
  end

  // steering 3: the selected input drives the port (AND-OR multiplexer)
  always_comb begin
    for (int j = 0; j < N_BANKS; j++) begin
      p_op[j]    = OP_LOAD;
      p_addr[j]  = '0;
      p_wdata[j] = '0;
      p_cmp[j]   = '0;
      for (int i = 0; i < N_IN; i++) begin
        if (sel_ij[j][i]) begin
          p_op[j]    = in_op[i];
          p_addr[j]  = offset[i];
          p_wdata[j] = in_wdata[i];
          p_cmp[j]   = in_cmp[i];
        end
      end
    end
  end

  for (genvar j = 0; j < N_BANKS; j++) begin : g_port
    mic_rm #(.N_IN(N_IN)) u_rm (
      .clk, .rst_n, .req(req_ij[j]), .release_port(p_done[j]),
      .ack(ack_ij[j]), .busy(rm_busy[j])
    );
    assign grant[j] = |ack_ij[j];

    mic_opi #(.N_IN(N_IN)) u_opi (
      .clk, .rst_n, .sel_col(sel_ij[j]), .owner(owner[j])
    );

    mic_amo #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ATOMICS(ATOMICS)) u_amo (
      .clk, .rst_n,
      .grant(grant[j]), .op(p_op[j]), .addr(p_addr[j]), .wdata(p_wdata[j]), .cmp(p_cmp[j]),
      .port_done(p_done[j]), .port_result(p_result[j]), .port_amo_result(p_amo[j]),
      .mem_start(mem_start[j]), .mem_we(mem_we[j]), .mem_addr(mem_addr[j]),
      .mem_wdata(mem_wdata[j]), .mem_done(mem_done[j]), .mem_rdata(mem_rdata[j])
    );
  end

  // steering 4: done and results back to the owning input
  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      in_done[i]       = 1'b0;
      in_result[i]     = '0;
      in_amo_result[i] = '0;
      for (int j = 0; j < N_BANKS; j++) begin
        if (p_done[j] && owner[j] == IIDX_W'(i)) begin
          in_done[i]       = 1'b1;
          in_result[i]     = p_result[j];
          in_amo_result[i] = p_amo[j];
        end
      end
    end
  end

  // A port's done only returns while the port is bound to an operation.
  for (genvar j = 0; j < N_BANKS; j++) begin : g_chk
    a_done_when_busy: assert property (@(posedge clk) disable iff (!rst_n) p_done[j] |-> rm_busy[j]);
  end

endmodule
