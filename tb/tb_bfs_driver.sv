// tb_bfs_driver: the loop driver with 3 kernels replaced by models that finish
// after a random 1..6 cycles and report n_added = f(id), with
// f(id) = 1 + id mod 3 for id < 60 and 0 beyond. A reference in the testbench computes the
// frontiers level by level. Checks: every queue position is started exactly
// once, at the right level, by kernel (id - group start) of a group of at most
// 3 consecutive ids; no group starts before the previous one has finished; and
// `levels` and `visited` at the end. Run twice, from 1 and from 2 sources.
module tb_bfs_driver;
  localparam int NK = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 1'b0, done, busy;
  logic [31:0] src_count = '0, levels, visited;
  logic        k_start [NK];
  logic [31:0] k_id [NK], k_level [NK];
  logic        k_done [NK];
  logic [31:0] k_n_added [NK];

  bfs_driver #(.N_KER(NK)) dut (
    .clk, .rst_n, .start, .src_count, .done, .busy, .levels, .visited,
    .k_start, .k_id, .k_level, .k_done, .k_n_added
  );

  function automatic int f(input int id);
    return (id < 60) ? 1 + id % 3 : 0;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int exp_level [1000];
  int started [1000];
  int outstanding = 0;

  // kernel models
  for (genvar k = 0; k < NK; k++) begin : g_k
    int cnt = 0;
    bit active = 0;
    int my_id;
    always @(posedge clk) begin
      k_done[k] <= 1'b0;
      if (active) begin
        if (cnt == 0) begin
          k_done[k] <= 1'b1; k_n_added[k] <= f(my_id); active <= 0; outstanding--;
        end else cnt <= cnt - 1;
      end
      if (k_start[k]) begin
        int i;
        i = k_id[k];
        chk(!active, "kernel started while running");
        chk(i < 1000 && started[i] == 0, $sformatf("id %0d started twice", i));
        chk(k_level[k] == exp_level[i], $sformatf("id %0d at level %0d, expected %0d", i, k_level[k], exp_level[i]));
        if (k > 0) chk(k_start[0] && i == k_id[0] + k, $sformatf("kernel %0d got id %0d outside its group", k, i));
        if (i < 1000) started[i]++;
        my_id <= i; active <= 1; cnt <= $urandom % 6; outstanding++;
      end
    end
  end

  always @(posedge clk) if (rst_n && k_start[0]) chk(outstanding == 0, "group started before the previous one finished");

  task automatic run(input int srcs);
    int head, tail, lvl, add, maxl;
    for (int i = 0; i < 1000; i++) begin started[i] = 0; exp_level[i] = -1; end
    head = 0; tail = srcs; lvl = 0; maxl = 0;
    while (head < tail) begin
      add = 0;
      for (int i = head; i < tail; i++) begin exp_level[i] = lvl; add += f(i); end
      maxl = lvl;
      head = tail; tail = tail + add; lvl++;
    end
    @(negedge clk);
    start = 1'b1; src_count = srcs;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    chk(levels == maxl, $sformatf("levels %0d expected %0d", levels, maxl));
    chk(visited == tail, $sformatf("visited %0d expected %0d", visited, tail));
    for (int i = 0; i < tail; i++) chk(started[i] == 1, $sformatf("id %0d started %0d times", i, started[i]));
    chk(started[tail] == 0, "started past the queue end");
  endtask

  initial begin
    for (int k = 0; k < NK; k++) begin k_done[k] = 0; k_n_added[k] = 0; end
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    run(1);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
