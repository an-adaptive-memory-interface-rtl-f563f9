// tb_bfs_speedup: the speed-up study. Three random graphs of 5000 vertices,
// with 22767, 47597 and 72887 edges (average out degree about 4.6, 9.5 and
// 14.6 per vertex), are each searched from vertex 0 by accelerators of 4 to 8
// kernels on 4 and on 8 banks, and by a single kernel on a single bank as the
// serial reference, each at memory latencies of 2, 5 and 10 cycles. All 33
// accelerators run side by side on one graph, then all are reset, reloaded
// and run on the next; each one's clock stops once it has finished, to keep
// the run short. For every graph the testbench prints the speed-up table
// (serial cycles / accelerator cycles) and checks: every run reaches the
// reference search's vertex count and depth; every accelerator is faster
// than the serial run; more kernels never make it slower by more than 5 %;
// and 8 banks are at least as fast as 4 banks (within 2 %) for the same
// kernel count.
module tb_bfs_speedup;
  localparam int V = 5000, NG = 3, EMAX = 72887;
  localparam int EDGES [NG] = '{22767, 47597, 72887};
  localparam int NL = 3, NCFG = 11;    // latencies; configurations per latency
  localparam int LAT [NL] = '{2, 5, 10};
  // configuration c: kernels and banks (c = 0 is the serial reference)
  localparam int KER [NCFG] = '{1, 4, 5, 6, 7, 8, 4, 5, 6, 7, 8};
  localparam int BNK [NCFG] = '{1, 4, 4, 4, 4, 4, 8, 8, 8, 8, 8};
  localparam int NK = (NCFG - 1) / 2; // kernel counts per bank count
  localparam int WORDS = 131072;      // memory of every configuration
  localparam int UNV = -1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  int checks = 0, failures = 0;

  localparam int OB = 0, EB = OB + V + 1;  // the later regions follow the edge list
  int E, DB, PB, QB, TA;

  int unsigned img [WORDS];
  event load_ev;
  longint cyc [NL][NCFG];
  bit     fin [NL][NCFG];
  int     lvl [NL][NCFG];
  int     vis [NL][NCFG];

  for (genvar l = 0; l < NL; l++) begin : g_l
    for (genvar c = 0; c < NCFG; c++) begin : g_c
      localparam int NB = BNK[c];
      logic        done, busy;
      logic [31:0] levels, visited;
      wire         dclk = clk & ~fin[l][c];  // a finished accelerator is no longer clocked
      bfs_accel #(
        .N_KER(KER[c]), .N_BANKS(NB), .LATENCY(LAT[l]), .BANK_DEPTH(WORDS / NB)
      ) dut (
        .clk(dclk), .rst_n, .start, .src_count(32'd1), .queue_base(QB), .off_base(32'(OB)),
        .edge_base(32'(EB)), .dist_base(DB), .parent_base(PB), .tail_addr(TA),
        .done, .busy, .levels, .visited
      );
      for (genvar b = 0; b < NB; b++) begin : g_b
        always @(load_ev) for (int k = 0; k < WORDS / NB; k++) dut.g_bank[b].u_bank.mem[k] = img[k*NB+b];
      end
      always @(posedge dclk) if (rst_n) begin  // flops hold power-up values until reset
        if (busy) cyc[l][c]++;
        if (done) begin fin[l][c] = 1; lvl[l][c] = levels; vis[l][c] = visited; end
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int rowcnt [V+1], off [V+1], src [EMAX], dst [EMAX], rdist [V], bq [V];

  initial begin
    int head, tail, u, v, maxd;
    bit all;
    string line;
    void'($urandom(11));
    for (int g = 0; g < NG; g++) begin
      E = EDGES[g]; DB = EB + E; PB = DB + V; QB = PB + V; TA = QB + V;
      for (int i = 0; i <= V; i++) rowcnt[i] = 0;
      for (int e = 0; e < E; e++) begin src[e] = $urandom % V; dst[e] = $urandom % V; rowcnt[src[e]]++; end
      off[0] = 0;
      for (int i = 0; i < V; i++) off[i+1] = off[i] + rowcnt[i];
      for (int a = 0; a < WORDS; a++) img[a] = 0;
      for (int i = 0; i <= V; i++) img[OB+i] = off[i];
      for (int i = 0; i < V; i++) rowcnt[i] = 0;
      for (int e = 0; e < E; e++) begin img[EB + off[src[e]] + rowcnt[src[e]]] = dst[e]; rowcnt[src[e]]++; end
      for (int i = 0; i < V; i++) begin img[DB+i] = UNV; img[PB+i] = UNV; end
      img[DB] = 0; img[PB] = 0; img[QB] = 0; img[TA] = 1;
      for (int i = 0; i < V; i++) rdist[i] = UNV;
      rdist[0] = 0; bq[0] = 0; head = 0; tail = 1; maxd = 0;
      while (head < tail) begin
        u = bq[head++];
        for (int e = off[u]; e < off[u+1]; e++) begin
          v = img[EB+e];
          if (rdist[v] == UNV) begin
            rdist[v] = rdist[u] + 1; bq[tail++] = v;
            if (rdist[v] > maxd) maxd = rdist[v];
          end
        end
      end
      for (int l = 0; l < NL; l++) for (int c = 0; c < NCFG; c++) begin cyc[l][c] = 0; fin[l][c] = 0; end
      #1;  // let the loaders reach their event control first
      -> load_ev;
      #1;
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      do begin
        @(negedge clk);
        all = 1;
        for (int l = 0; l < NL; l++) for (int c = 0; c < NCFG; c++) all &= fin[l][c];
      end while (!all);
      $display("\nspeed-up over 1 kernel / 1 bank, V=%0d E=%0d (%0d reached, depth %0d)", V, E, tail, maxd);
      $display("ker  M=4: 2cc   5cc   10cc | M=8: 2cc   5cc   10cc");
      for (int k = 1; k <= NK; k++) begin
        line = $sformatf("%0d       ", KER[k]);
        for (int m = 0; m < 2; m++) begin
          for (int l = 0; l < NL; l++)
            line = {line, $sformatf("%5.2f ", real'(cyc[l][0]) / real'(cyc[l][k + NK*m]))};
          line = {line, m == 0 ? "|      " : ""};
        end
        $display("%s", line);
      end
      for (int l = 0; l < NL; l++) begin
        $display("latency %0d: serial run %0d cycles", LAT[l], cyc[l][0]);
        for (int c = 0; c < NCFG; c++) begin
          chk(vis[l][c] == tail && lvl[l][c] == maxd,
              $sformatf("E=%0d L=%0d cfg %0d: visited %0d levels %0d", E, LAT[l], c, vis[l][c], lvl[l][c]));
          if (c > 0) chk(cyc[l][c] < cyc[l][0], $sformatf("E=%0d L=%0d cfg %0d not faster than serial", E, LAT[l], c));
          if (c > 1 && c != NK + 1) chk(cyc[l][c] * 100 <= cyc[l][c-1] * 105,
              $sformatf("E=%0d L=%0d: %0d kernels slower than %0d", E, LAT[l], KER[c], KER[c-1]));
          if (c > NK) chk(cyc[l][c] * 100 <= cyc[l][c-NK] * 102,
              $sformatf("E=%0d L=%0d: %0d kernels slower on 8 banks than on 4", E, LAT[l], KER[c]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
