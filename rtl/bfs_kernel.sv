// bfs_kernel: one body of the breadth-first-search loop (one frontier vertex).
//
// Started with a frontier position `id`, the kernel reads the vertex u stored
// there in the queue, reads u's two CSR row offsets and walks u's out-edges.
// For each neighbour v it claims v with a compare-and-swap on dist[v]
// (unvisited -> level+1). If the claim succeeds it reserves a queue slot with
// a fetch-and-add on the queue tail, then writes v into that slot and u into
// parent[v]. Per edge this is the kernel's six memory accesses and two atomic
// operations: queue, two offsets, edge, queue slot, parent; CAS and FAA.
// The kernel owns two controller ports and uses the second one only where two
// accesses are independent (the two row offsets; the queue and parent stores),
// so it never has more than two operations in flight. All shared-memory
// synchronisation is left to the controller's atomic operations: kernels need
// no communication between them.
//
// Interface: `start` pulses with `id` and `level`; `done` pulses when all
// out-edges are handled, with `n_added` = vertices appended to the queue.
// Memory ports follow the controller's input protocol (start pulse, lines
// steady until done). Memory layout (word addresses): queue[], row offsets
// off[0..V], edge targets, dist[] (all ones = unvisited), parent[], and one
// queue-tail word; the bases are inputs. The access sequence is this design's
// reading of a queue-based BFS with one CAS and one FAA per visit.
module bfs_kernel #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  logic [DATA_W-1:0]   id,        // position in the queue
  input  logic [DATA_W-1:0]   level,     // BFS level of the frontier
  output logic                done,
  output logic [DATA_W-1:0]   n_added,
  // layout of the graph in memory
  input  logic [ADDR_W-1:0]   queue_base,
  input  logic [ADDR_W-1:0]   off_base,
  input  logic [ADDR_W-1:0]   edge_base,
  input  logic [ADDR_W-1:0]   dist_base,
  input  logic [ADDR_W-1:0]   parent_base,
  input  logic [ADDR_W-1:0]   tail_addr,
  // two controller input ports
  output logic                m_start  [2],
  output mic_pkg::mem_op_e    m_op     [2],
  output logic [ADDR_W-1:0]   m_addr   [2],
  output logic [DATA_W-1:0]   m_wdata  [2],
  output logic [DATA_W-1:0]   m_cmp    [2],
  input  logic                m_done   [2],
  input  logic [DATA_W-1:0]   m_result [2],
  input  logic [DATA_W-1:0]   m_amo    [2]
);
  import mic_pkg::*;

  localparam logic [DATA_W-1:0] UNVISITED = '1;

  typedef enum logic [2:0] {
    S_IDLE, S_QUEUE, S_OFFS, S_EDGE, S_CAS, S_FAA, S_STORE
  } state_e;

  state_e            state_q;
  logic [DATA_W-1:0] level_q, u_q, v_q, e_q, end_q, added_q;
  logic              got0_q, got1_q;   // which of two parallel operations returned

  // move on to the next out-edge (or finish): after a lost claim, or once
  // both stores of a won claim are done
  logic advance;
  always_comb
    advance = (state_q == S_CAS && m_done[0] && m_amo[0] != UNVISITED) ||
              (state_q == S_STORE && (got0_q || m_done[0]) && (got1_q || m_done[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      level_q <= '0;
      u_q     <= '0;
      v_q     <= '0;
      e_q     <= '0;
      end_q   <= '0;
      added_q <= '0;
      got0_q  <= 1'b0;
      got1_q  <= 1'b0;
      for (int p = 0; p < 2; p++) begin
        m_start[p] <= 1'b0;
        m_op[p]    <= OP_LOAD;
        m_addr[p]  <= '0;
        m_wdata[p] <= '0;
        m_cmp[p]   <= '0;
      end
    end else begin
      done       <= 1'b0;
      m_start[0] <= 1'b0;
      m_start[1] <= 1'b0;
      unique case (state_q)
        S_IDLE:
          if (start) begin
            level_q    <= level;
            added_q    <= '0;
            state_q    <= S_QUEUE;
            m_start[0] <= 1'b1;
            m_op[0]    <= OP_LOAD;
            m_addr[0]  <= queue_base + ADDR_W'(id);
          end
        S_QUEUE:
          if (m_done[0]) begin
            u_q        <= m_result[0];
            got0_q     <= 1'b0;
            got1_q     <= 1'b0;
            state_q    <= S_OFFS;
            m_start[0] <= 1'b1;
            m_op[0]    <= OP_LOAD;
            m_addr[0]  <= off_base + ADDR_W'(m_result[0]);
            m_start[1] <= 1'b1;
            m_op[1]    <= OP_LOAD;
            m_addr[1]  <= off_base + ADDR_W'(m_result[0]) + 1'b1;
          end
        S_OFFS: begin
          if (m_done[0]) begin got0_q <= 1'b1; e_q   <= m_result[0]; end
          if (m_done[1]) begin got1_q <= 1'b1; end_q <= m_result[1]; end
          if ((got0_q || m_done[0]) && (got1_q || m_done[1])) begin
            // both row offsets known: walk edges e_q .. end_q-1
            if ((got0_q ? e_q : m_result[0]) == (got1_q ? end_q : m_result[1])) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              state_q    <= S_EDGE;
              m_start[0] <= 1'b1;
              m_op[0]    <= OP_LOAD;
              m_addr[0]  <= edge_base + ADDR_W'(got0_q ? e_q : m_result[0]);
            end
          end
        end
        S_EDGE:
          if (m_done[0]) begin
            v_q        <= m_result[0];
            state_q    <= S_CAS;
            m_start[0] <= 1'b1;
            m_op[0]    <= OP_CAS;
            m_addr[0]  <= dist_base + ADDR_W'(m_result[0]);
            m_cmp[0]   <= UNVISITED;
            m_wdata[0] <= level_q + 1'b1;
          end
        S_CAS:
          if (m_done[0]) begin
            if (m_amo[0] == UNVISITED) begin
              // v claimed by this kernel: reserve a queue slot
              state_q    <= S_FAA;
              m_start[0] <= 1'b1;
              m_op[0]    <= OP_FAA;
              m_addr[0]  <= tail_addr;
              m_wdata[0] <= DATA_W'(1);
            end
          end
        S_FAA:
          if (m_done[0]) begin
            added_q    <= added_q + 1'b1;
            got0_q     <= 1'b0;
            got1_q     <= 1'b0;
            state_q    <= S_STORE;
            m_start[0] <= 1'b1;
            m_op[0]    <= OP_STORE;
            m_addr[0]  <= queue_base + ADDR_W'(m_amo[0]);
            m_wdata[0] <= v_q;
            m_start[1] <= 1'b1;
            m_op[1]    <= OP_STORE;
            m_addr[1]  <= parent_base + ADDR_W'(v_q);
            m_wdata[1] <= u_q;
          end
        S_STORE: begin
          if (m_done[0]) got0_q <= 1'b1;
          if (m_done[1]) got1_q <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
      if (advance) begin
        if (e_q + 1'b1 == end_q) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end else begin
          e_q        <= e_q + 1'b1;
          state_q    <= S_EDGE;
          m_start[0] <= 1'b1;
          m_op[0]    <= OP_LOAD;
          m_addr[0]  <= edge_base + ADDR_W'(e_q + 1'b1);
        end
      end
    end
  end

  assign n_added = added_q;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state_q == S_IDLE);

endmodule
