// tb_bfs_kernel: one BFS kernel on a 2-input controller with two 2-cycle
// banks. The graph has 8 vertices; vertex 3 has out-edges to 1 (already
// visited), 4, 4 (duplicate), 6, 2 and 7; vertex 5 has none. The kernel is run
// on queue position 0 (vertex 3, level 0) and then on position 1 (vertex 5).
// Checks: n_added, dist[] and parent[] of every vertex, the queue slots and
// the tail word, that the claims of 1 and of the second 4 fail, that the
// kernel used both of its ports at once, and the exact cycle count of the
// edgeless run (queue load, then both offset loads in parallel).
module tb_bfs_kernel;
  import mic_pkg::*;
  localparam int L = 2, D = 32;
  localparam int OFF = 0, EDG = 9, DIS = 15, PAR = 23, QUE = 31, TAIL = 39;
  localparam int UNV = 32'hFFFF_FFFF;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 1'b0, done;
  logic [31:0] id = '0, level = '0, n_added;
  logic        m_start [2];
  mem_op_e     m_op    [2];
  logic [31:0] m_addr [2], m_wdata [2], m_cmp [2], m_result [2], m_amo [2];
  logic        m_done  [2];
  logic        mem_start[2], mem_we [2], mem_done [2];
  logic [31:0] mem_addr [2], mem_wdata [2], mem_rdata [2];

  bfs_kernel dut (
    .clk, .rst_n, .start, .id, .level, .done, .n_added,
    .queue_base(32'(QUE)), .off_base(32'(OFF)), .edge_base(32'(EDG)), .dist_base(32'(DIS)),
    .parent_base(32'(PAR)), .tail_addr(32'(TAIL)),
    .m_start, .m_op, .m_addr, .m_wdata, .m_cmp, .m_done, .m_result, .m_amo
  );
  mic #(.N_IN(2), .N_BANKS(2)) u_mic (
    .clk, .rst_n, .in_start(m_start), .in_op(m_op), .in_addr(m_addr), .in_wdata(m_wdata),
    .in_cmp(m_cmp), .in_done(m_done), .in_result(m_result), .in_amo_result(m_amo),
    .mem_start, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_rdata
  );
  for (genvar j = 0; j < 2; j++) begin : g_bank
    mem_bank #(.DEPTH(D), .LATENCY(L)) u (
      .clk, .rst_n, .start(mem_start[j]), .we(mem_we[j]), .addr(mem_addr[j]),
      .wdata(mem_wdata[j]), .done(mem_done[j]), .rdata(mem_rdata[j])
    );
  end

  int unsigned img [64];
  int unsigned fin [64];
  event load_ev, dump_ev;
  for (genvar j = 0; j < 2; j++) begin : g_io
    always @(load_ev) for (int k = 0; k < D; k++) g_bank[j].u.mem[k] = img[2*k+j];
    always @(dump_ev) for (int k = 0; k < D; k++) fin[2*k+j] = g_bank[j].u.mem[k];
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int dual = 0, cas_fail = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_mic.sel_i[0] && u_mic.sel_i[1]) dual++;
    if (m_done[0] && m_op[0] == OP_CAS && m_amo[0] != UNV) cas_fail++;
  end

  task automatic run(input int qid, output int cycles);
    @(negedge clk);
    start = 1'b1; id = qid; level = 0;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int edges [6] = '{1, 4, 4, 6, 2, 7};
    int offs [9]  = '{0, 0, 0, 0, 6, 6, 6, 6, 6};
    int exp_q [4] = '{4, 6, 2, 7};
    int c;
    for (int a = 0; a < 64; a++) img[a] = 0;
    for (int i = 0; i < 9; i++) img[OFF+i] = offs[i];
    for (int e = 0; e < 6; e++) img[EDG+e] = edges[e];
    for (int v = 0; v < 8; v++) begin img[DIS+v] = UNV; img[PAR+v] = UNV; end
    img[DIS+3] = 0; img[DIS+1] = 0; img[PAR+3] = 3; img[PAR+1] = 1;
    img[QUE+0] = 3; img[QUE+1] = 5; img[TAIL] = 2;
    #1;  // let the loaders reach their event control first
    -> load_ev;
    #1;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    run(0, c);
    chk(n_added == 4, $sformatf("vertex 3 added %0d, expected 4", n_added));
    run(1, c);
    chk(n_added == 0, $sformatf("vertex 5 added %0d, expected 0", n_added));
    // start sampled -> queue load issued (1) -> its latency (L) -> offsets
    // issued together (1) -> their latency (L) -> done registered (1)
    chk(c == 2 * L + 3, $sformatf("edgeless vertex took %0d cycles, expected %0d", c, 2 * L + 3));
    @(negedge clk);
    -> dump_ev;
    #1;
    for (int v = 0; v < 8; v++) begin
      int ed, ep;
      ed = (v == 3 || v == 1) ? 0 : (v == 4 || v == 6 || v == 2 || v == 7) ? 1 : UNV;
      ep = (v == 3) ? 3 : (v == 1) ? 1 : (ed == 1) ? 3 : UNV;
      chk(fin[DIS+v] == ed, $sformatf("dist[%0d]=%0d expected %0d", v, fin[DIS+v], ed));
      chk(fin[PAR+v] == ep, $sformatf("parent[%0d]=%0d expected %0d", v, fin[PAR+v], ep));
    end
    for (int q = 0; q < 4; q++)
      chk(fin[QUE+2+q] == exp_q[q], $sformatf("queue[%0d]=%0d expected %0d", 2 + q, fin[QUE+2+q], exp_q[q]));
    chk(fin[TAIL] == 6, $sformatf("tail=%0d expected 6", fin[TAIL]));
    chk(cas_fail == 2, $sformatf("%0d failed claims, expected 2", cas_fail));
    chk(dual > 0, "both kernel ports busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
