// tb_bfs_accel: end-to-end test of the BFS accelerator at its default size
// (8 kernels, 8 banks, 2-cycle memory).
//
// For each graph the testbench generates a random directed graph of V vertices
// and exactly E edges in CSR form, lays it out in the banks through the
// interleaving rule (word a lives in bank a mod 8 at offset a div 8), runs the
// search from vertex 0 and checks the result against a breadth-first search
// computed here: every dist[] entry, every parent (one level up and a real
// edge), the queue (each reached vertex once), the tail word, `levels` and
// `visited`. The graphs are a small one, then 5000 vertices with average out
// degree 10, 20 and 30 (22767, 47597 and 72887 edges). It also counts how
// often the controller's mechanisms occurred (bank conflicts, a port handed
// over in its release cycle, parallel banks, atomic claims won and lost) and
// fails a mechanism that never occurred.
module tb_bfs_accel;
  localparam int NB    = 8;       // banks (default of bfs_accel)
  localparam int DEPTH = 16384;   // words per bank (default)
  localparam int NK    = 8;       // kernels (default)
  localparam int NI    = 2 * NK;
  localparam int MEMW  = NB * DEPTH;
  localparam int MAXV  = 5000;
  localparam int MAXE  = 72887;
  localparam int UNV   = -1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  logic [31:0] src_count = '0;
  logic [31:0] queue_base, off_base, edge_base, dist_base, parent_base, tail_addr;
  logic        done, busy;
  logic [31:0] levels, visited;

  bfs_accel dut (
    .clk, .rst_n, .start, .src_count, .queue_base, .off_base, .edge_base,
    .dist_base, .parent_base, .tail_addr, .done, .busy, .levels, .visited
  );

  int checks = 0, failures = 0;
  int unsigned img [MEMW];
  int unsigned res [MEMW];
  event load_ev, dump_ev;

  for (genvar b = 0; b < NB; b++) begin : g_bk
    always @(load_ev) for (int k = 0; k < DEPTH; k++) dut.g_bank[b].u_bank.mem[k] = img[k*NB+b];
    always @(dump_ev) for (int k = 0; k < DEPTH; k++) res[k*NB+b] = dut.g_bank[b].u_bank.mem[k];
  end

  // ---- mechanism counters ----
  longint n_conflict = 0, n_handoff = 0, n_parallel = 0, n_cas_won = 0, n_cas_lost = 0,
          n_faa = 0, n_dual = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    int nbusy;
    nbusy = 0;
    for (int i = 0; i < NI; i++) begin
      if (dut.u_mic.req[i] && !dut.u_mic.ack_i[i]) n_conflict++;
      if (dut.u_mic.in_done[i] && dut.u_mic.in_op[i] == mic_pkg::OP_CAS)
        if (dut.u_mic.in_amo_result[i] == 32'hFFFF_FFFF) n_cas_won++; else n_cas_lost++;
      if (dut.u_mic.in_done[i] && dut.u_mic.in_op[i] == mic_pkg::OP_FAA) n_faa++;
    end
    for (int j = 0; j < NB; j++) begin
      if (dut.u_mic.p_done[j] && dut.u_mic.grant[j]) n_handoff++;
      if (dut.u_mic.rm_busy[j]) nbusy++;
    end
    if (nbusy >= 2) n_parallel++;
    for (int k = 0; k < NK; k++)
      if (dut.u_mic.sel_i[2*k] && dut.u_mic.sel_i[2*k+1]) n_dual++;
    if (busy) cycles++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int rowcnt [MAXV+1];
  int off  [MAXV+1];
  int src  [MAXE];
  int dst  [MAXE];
  int rdist[MAXV];
  int bq   [MAXV];

  task automatic run_graph(input int V, input int E, input int unsigned seed);
    int ob, eb, db, pb, qb, ta, head, tail, maxd, reached, u, v, p, ok, cnt;
    longint c0;
    int unsigned s;
    bit seen [MAXV];
    s = $urandom(seed);
    // random edge list, then CSR by source
    for (int i = 0; i <= V; i++) rowcnt[i] = 0;
    for (int e = 0; e < E; e++) begin
      src[e] = $urandom % V;
      dst[e] = $urandom % V;
      rowcnt[src[e]]++;
    end
    off[0] = 0;
    for (int i = 0; i < V; i++) off[i+1] = off[i] + rowcnt[i];
    ob = 0; eb = ob + V + 1; db = eb + E; pb = db + V; qb = pb + V; ta = qb + V;
    if (ta >= MEMW) $fatal(1, "graph does not fit");
    for (int a = 0; a < MEMW; a++) img[a] = 0;
    for (int i = 0; i <= V; i++) img[ob+i] = off[i];
    for (int i = 0; i < V; i++) rowcnt[i] = 0;
    for (int e = 0; e < E; e++) begin
      img[eb + off[src[e]] + rowcnt[src[e]]] = dst[e];
      rowcnt[src[e]]++;
    end
    for (int i = 0; i < V; i++) begin img[db+i] = UNV; img[pb+i] = UNV; end
    img[db+0] = 0; img[pb+0] = 0; img[qb+0] = 0; img[ta] = 1;
    // reference breadth-first search
    for (int i = 0; i < V; i++) rdist[i] = UNV;
    rdist[0] = 0; bq[0] = 0; head = 0; tail = 1; maxd = 0;
    while (head < tail) begin
      u = bq[head++];
      for (int e = off[u]; e < off[u+1]; e++) begin
        v = img[eb+e];
        if (rdist[v] == UNV) begin
          rdist[v] = rdist[u] + 1; bq[tail++] = v;
          if (rdist[v] > maxd) maxd = rdist[v];
        end
      end
    end
    reached = tail;
    // load and run
    -> load_ev;
    #1;
    queue_base = qb; off_base = ob; edge_base = eb; dist_base = db; parent_base = pb; tail_addr = ta;
    src_count = 1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    c0 = cycles;
    while (!done) @(posedge clk);
    $display("graph V=%0d E=%0d: %0d cycles, %0d levels, %0d vertices reached",
             V, E, cycles - c0, levels, visited);
    check(levels == maxd, $sformatf("levels %0d expected %0d", levels, maxd));
    check(visited == reached, $sformatf("visited %0d expected %0d", visited, reached));
    @(negedge clk);
    -> dump_ev;
    #1;
    check(res[ta] == reached, $sformatf("tail %0d expected %0d", res[ta], reached));
    ok = 1;
    for (int i = 0; i < V; i++) if (int'(res[db+i]) != rdist[i]) begin
      ok = 0; $display("dist[%0d]=%0d expected %0d", i, int'(res[db+i]), rdist[i]); break;
    end
    check(ok == 1, "dist[] matches the reference search");
    ok = 1;
    for (int i = 1; i < V; i++) if (rdist[i] != UNV) begin
      p = res[pb+i];
      if (p < 0 || p >= V || rdist[p] != rdist[i] - 1) ok = 0;
      else begin
        cnt = 0;
        for (int e = off[p]; e < off[p+1]; e++) if (img[eb+e] == i) cnt++;
        if (cnt == 0) ok = 0;
      end
    end else if (res[pb+i] != 32'hFFFF_FFFF) ok = 0;
    check(ok == 1, "parent[] is a valid BFS tree");
    ok = 1;
    for (int i = 0; i < V; i++) seen[i] = 0;
    for (int q = 0; q < reached; q++) begin
      v = res[qb+q];
      if (v < 0 || v >= V || seen[v] || rdist[v] == UNV) ok = 0; else seen[v] = 1;
      if (q > 0 && v >= 0 && v < V && rdist[v] < rdist[int'(res[qb+q-1])]) ok = 0;
    end
    check(ok == 1, "queue holds every reached vertex once, level by level");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_graph(40, 120, 7);
    run_graph(5000, 22767, 11);
    run_graph(5000, 47597, 13);
    run_graph(5000, 72887, 17);
    $display("mechanisms: conflict-stall cycles=%0d same-cycle handoffs=%0d parallel-bank cycles=%0d CAS won=%0d CAS lost=%0d FAA=%0d dual-port cycles=%0d",
             n_conflict, n_handoff, n_parallel, n_cas_won, n_cas_lost, n_faa, n_dual);
    check(n_conflict > 0, "bank conflicts occurred");
    check(n_handoff > 0, "a port was handed over in its release cycle");
    check(n_parallel > 0, "several banks worked in parallel");
    check(n_cas_won > 0, "compare-and-swap claims succeeded");
    check(n_cas_lost > 0, "compare-and-swap claims failed");
    check(n_faa == n_cas_won, "one fetch-and-add per won claim");
    check(n_dual > 0, "a kernel used both of its ports at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
