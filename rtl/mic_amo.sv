// mic_amo: per-memory-port operation unit of the MIC, with the dedicated
// hardware for atomic operations.
//
// It sits between the output steering of one port and the memory bank.
// Loads and stores pass straight through: the accept cycle (`grant`) becomes
// the bank's start, and the bank's done and read data become the port's.
// An atomic operation keeps the port to itself until it completes:
//   1. at `grant` it issues a load of the addressed word and latches the
//      address and operands;
//   2. when the bank's done comes back it intercepts it, buffers the old
//      value and computes the new one (old + wdata for fetch-and-add, wdata
//      for a compare-and-swap whose compare value matched);
//   3. in the next cycle it issues the store, and the store's done becomes
//      the port's done, returning the buffered old value on `port_amo_result`.
// A compare-and-swap that does not match stores nothing and completes on the
// load's done. Atomic latency is therefore 2*L+1 cycles for a bank of latency
// L (L for a compare-and-swap that fails). With ATOMICS = 0 the unit is the load/store
// only controller. Buffering the old value before storing follows the
// controller's description; the one-cycle gap and the port's own copy of
// address and operands are this design's choices.
module mic_amo #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter bit          ATOMICS = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the output steering (mux 3)
  input  logic                grant,      // an operation is accepted on this port
  input  mic_pkg::mem_op_e    op,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W-1:0]   cmp,
  // towards the return steering (mux 4)
  output logic                port_done,        // the port's operation completed
  output logic [DATA_W-1:0]   port_result,      // load data
  output logic [DATA_W-1:0]   port_amo_result,  // old value of an atomic operation
  // memory bank port
  output logic                mem_start,
  output logic                mem_we,
  output logic [ADDR_W-1:0]   mem_addr,
  output logic [DATA_W-1:0]   mem_wdata,
  input  logic                mem_done,
  input  logic [DATA_W-1:0]   mem_rdata
);
  import mic_pkg::*;

  typedef enum logic [1:0] {S_PLAIN, S_AMO_LD, S_AMO_ST_ISSUE, S_AMO_ST} state_e;

  state_e            state_q;
  mem_op_e           op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] opnd_q, cmp_q, old_q, new_q;
  logic              is_amo;
  logic              store_needed;
  logic [DATA_W-1:0] new_val;

  assign is_amo = ATOMICS && (op == OP_FAA || op == OP_CAS);

  always_comb begin
    new_val      = (op_q == OP_FAA) ? mem_rdata + opnd_q : opnd_q;
    store_needed = (op_q == OP_FAA) || (mem_rdata == cmp_q);
  end

  always_comb begin
    // A new operation may be accepted while the previous one returns its done.
    mem_start       = grant || (state_q == S_AMO_ST_ISSUE);
    mem_we          = grant ? (op == OP_STORE) : (state_q == S_AMO_ST_ISSUE);
    mem_addr        = grant ? addr  : addr_q;
    mem_wdata       = grant ? wdata : new_q;
    port_done       = 1'b0;
    port_result     = mem_rdata;
    port_amo_result = '0;
    unique case (state_q)
      S_PLAIN:  port_done = mem_done;
      S_AMO_LD: begin
        port_done       = mem_done && !store_needed;  // failed compare-and-swap
        port_amo_result = mem_rdata;
      end
      S_AMO_ST: begin
        port_done       = mem_done;
        port_amo_result = old_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_PLAIN;
      op_q    <= OP_LOAD;
      addr_q  <= '0;
      opnd_q  <= '0;
      cmp_q   <= '0;
      old_q   <= '0;
      new_q   <= '0;
    end else if (grant) begin
      state_q <= is_amo ? S_AMO_LD : S_PLAIN;
      op_q    <= op;
      addr_q  <= addr;
      opnd_q  <= wdata;
      cmp_q   <= cmp;
    end else begin
      unique case (state_q)
        S_AMO_LD:
          if (mem_done) begin
            old_q   <= mem_rdata;
            new_q   <= new_val;
            state_q <= store_needed ? S_AMO_ST_ISSUE : S_PLAIN;
          end
        S_AMO_ST_ISSUE: state_q <= S_AMO_ST;
        S_AMO_ST:       if (mem_done) state_q <= S_PLAIN;
        default:        ;
      endcase
    end
  end

  // A new operation is only accepted while the port is not running an atomic one.
  a_grant_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> (state_q == S_PLAIN || (state_q == S_AMO_ST && mem_done) ||
               (state_q == S_AMO_LD && mem_done && !store_needed)));
  // Without atomic support only loads and stores may arrive.
  a_no_amo_op: assert property (@(posedge clk) disable iff (!rst_n)
    (grant && !ATOMICS) |-> (op == OP_LOAD || op == OP_STORE));

endmodule
