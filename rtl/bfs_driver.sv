// bfs_driver: the accelerator's loop controller, i.e. the application
// template's loop "for id in frontier: kernel(id)" unrolled N_KER times.
//
// The frontier of level L is the queue slice [head, tail). The driver starts
// the kernels on ids head, head+1, ... in groups of N_KER (kernel k takes the
// k-th id of the group; kernels without an id stay idle), waits until every
// started kernel is done, and adds up their `n_added`. When the slice is
// exhausted, the next frontier is [tail, tail + added) at level L+1; the search
// ends when a level adds nothing. Because every vertex enters the queue once,
// one queue array holds all levels back to back and the tail word in memory,
// advanced by the kernels' fetch-and-add, never needs resetting.
//
// Interface: `start` pulses with `src_count` (frontier size of level 0, the
// sources already placed at queue[0..] by the host); `done` pulses at the end
// with `levels` (the deepest BFS level reached) and `visited` (queue length).
// Group-wise dispatch is the behaviour of a partially unrolled loop; the
// frontier bookkeeping is this design's choice.
module bfs_driver #(
  parameter int unsigned N_KER  = 8,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] src_count,
  output logic              done,
  output logic              busy,
  output logic [DATA_W-1:0] levels,
  output logic [DATA_W-1:0] visited,
  // kernels
  output logic              k_start   [N_KER],
  output logic [DATA_W-1:0] k_id      [N_KER],
  output logic [DATA_W-1:0] k_level   [N_KER],
  input  logic              k_done    [N_KER],
  input  logic [DATA_W-1:0] k_n_added [N_KER]
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e            state_q;
  logic [DATA_W-1:0] level_q, next_q, end_q, added_q;
  logic [N_KER-1:0]  running_q;

  logic [N_KER-1:0]  done_vec;
  logic [DATA_W-1:0] done_sum;

  always_comb begin
    done_sum = '0;
    for (int k = 0; k < N_KER; k++) begin
      done_vec[k] = k_done[k];
      if (k_done[k]) done_sum += k_n_added[k];
    end
  end

  // kernels that get an id in the next group
  logic [N_KER-1:0]  run;
  always_comb
    for (int k = 0; k < N_KER; k++) run[k] = (next_q + DATA_W'(k)) < end_q;

  assign busy    = (state_q != S_IDLE);
  assign levels  = level_q;
  assign visited = end_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      level_q   <= '0;
      next_q    <= '0;
      end_q     <= '0;
      added_q   <= '0;
      running_q <= '0;
      done      <= 1'b0;
      for (int k = 0; k < N_KER; k++) begin
        k_start[k] <= 1'b0;
        k_id[k]    <= '0;
        k_level[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      for (int k = 0; k < N_KER; k++) k_start[k] <= 1'b0;
      unique case (state_q)
        S_IDLE:
          if (start) begin
            level_q <= '0;
            next_q  <= '0;
            end_q   <= src_count;
            added_q <= '0;
            state_q <= S_ISSUE;
          end
        S_ISSUE: begin
          if (next_q == end_q) begin
            // level finished
            if (added_q == '0) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              level_q <= level_q + 1'b1;
              end_q   <= end_q + added_q;
              added_q <= '0;
            end
          end else begin
            for (int k = 0; k < N_KER; k++) begin
              k_start[k] <= run[k];
              k_id[k]    <= next_q + DATA_W'(k);
              k_level[k] <= level_q;
            end
            running_q <= run;
            next_q    <= ((end_q - next_q) > DATA_W'(N_KER)) ? next_q + DATA_W'(N_KER) : end_q;
            state_q   <= S_WAIT;
          end
        end
        S_WAIT: begin
          added_q   <= added_q + done_sum;
          running_q <= running_q & ~done_vec;
          if ((running_q & ~done_vec) == '0) state_q <= S_ISSUE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_done_from_running: assert property (@(posedge clk) disable iff (!rst_n)
    (done_vec & ~running_q) == '0);

endmodule
