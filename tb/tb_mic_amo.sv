// tb_mic_amo: one controller port unit in front of a 2-cycle memory bank.
// Random loads, stores, fetch-and-adds and compare-and-swaps (half of them
// with a matching compare value) run one after another, often with the next
// operation accepted in the cycle the previous one completes. Checks load
// data, the old value returned by each atomic operation, the memory contents
// against a reference array, and the cycle count of each operation: L for a
// load or store and for a failing compare-and-swap, 2L+1 for a completed
// atomic operation (load, one cycle to compute, store). A second unit built
// with ATOMICS = 0 (the load/store-only controller) runs random loads and
// stores, each checked for data and an L-cycle latency.
module tb_mic_amo;
  import mic_pkg::*;
  localparam int L = 2;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_op [4] = '{0, 0, 0, 0};
  int n_cas_fail = 0, n_back2back = 0;

  logic        grant = 1'b0;
  mem_op_e     op = OP_LOAD;
  logic [31:0] addr = '0, wdata = '0, cmp = '0;
  logic        port_done;
  logic [31:0] port_result, port_amo_result;
  logic        mem_start, mem_we, mem_done;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  mic_amo dut (
    .clk, .rst_n, .grant, .op, .addr, .wdata, .cmp,
    .port_done, .port_result, .port_amo_result,
    .mem_start, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_rdata
  );
  mem_bank #(.DEPTH(D), .LATENCY(L)) u_mem (
    .clk, .rst_n, .start(mem_start), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .done(mem_done), .rdata(mem_rdata)
  );

  // load/store-only unit
  logic        g0 = 1'b0;
  mem_op_e     op0 = OP_LOAD;
  logic [31:0] a0 = '0, wd0 = '0;
  logic        pd0, ms0, mw0, md0;
  logic [31:0] pr0, pa0, ma0, mwd0, mr0;
  int          ls_done = 0;

  mic_amo #(.ATOMICS(1'b0)) dut0 (
    .clk, .rst_n, .grant(g0), .op(op0), .addr(a0), .wdata(wd0), .cmp(32'd0),
    .port_done(pd0), .port_result(pr0), .port_amo_result(pa0),
    .mem_start(ms0), .mem_we(mw0), .mem_addr(ma0), .mem_wdata(mwd0), .mem_done(md0), .mem_rdata(mr0)
  );
  mem_bank #(.DEPTH(D), .LATENCY(L)) u_mem0 (
    .clk, .rst_n, .start(ms0), .we(mw0), .addr(ma0), .wdata(mwd0), .done(md0), .rdata(mr0)
  );

  initial begin
    int unsigned ref0 [D];
    int unsigned expv;
    int t;
    for (int a = 0; a < D; a++) begin ref0[a] = a; u_mem0.mem[a] = a; end
    @(negedge clk); @(negedge clk);
    @(negedge clk); @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      op0 = ($urandom % 2) ? OP_STORE : OP_LOAD; a0 = $urandom % D; wd0 = $urandom;
      expv = ref0[a0];
      if (op0 == OP_STORE) ref0[a0] = wd0;
      g0 = 1'b1;
      @(negedge clk);
      g0 = 1'b0;
      t = 1;
      while (!pd0) begin @(negedge clk); t++; end
      chk(t == L, $sformatf("load/store-only unit: %0d cycles", t));
      if (op0 == OP_LOAD) chk(pr0 == expv, $sformatf("load/store-only unit: load %h expected %h", pr0, expv));
    end
    ls_done = 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int unsigned refm [D];

  initial begin
    bit          in_flight = 0;
    int          issued = 0, t0 = 0, cyc = 0, exp_lat = 0;
    int unsigned exp_val = 0;
    mem_op_e     cur = OP_LOAD;
    for (int a = 0; a < D; a++) begin refm[a] = 0; u_mem.mem[a] = 0; end
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    while (issued < 600 || in_flight) begin
      @(negedge clk);
      cyc++;
      grant = 1'b0;
      #1;
      if (in_flight && port_done) begin
        in_flight = 0;
        chk(cyc - t0 == exp_lat, $sformatf("op %s took %0d cycles, expected %0d", cur.name(), cyc - t0, exp_lat));
        if (cur == OP_LOAD) chk(port_result == exp_val, $sformatf("load %h expected %h", port_result, exp_val));
        if (cur == OP_FAA || cur == OP_CAS)
          chk(port_amo_result == exp_val, $sformatf("%s returned %h expected %h", cur.name(), port_amo_result, exp_val));
      end else if (in_flight) begin
        chk(!port_done, "spurious done");
      end
      if (!in_flight && issued < 600 && ($urandom % 3 != 0 || cyc == t0 + exp_lat)) begin
        if (cyc == t0 + exp_lat) n_back2back++;
        cur   = mem_op_e'($urandom % 4);
        addr  = $urandom % D;
        wdata = $urandom % 1000;
        cmp   = ($urandom % 2) ? refm[addr] : refm[addr] + 1;
        op    = cur;
        grant = 1'b1;
        exp_val = refm[addr];
        unique case (cur)
          OP_LOAD:  exp_lat = L;
          OP_STORE: begin exp_lat = L; refm[addr] = wdata; end
          OP_FAA:   begin exp_lat = 2*L + 1; refm[addr] = refm[addr] + wdata; end
          OP_CAS:   if (refm[addr] == cmp) begin exp_lat = 2*L + 1; refm[addr] = wdata; end
                    else begin exp_lat = L; n_cas_fail++; end
        endcase
        n_op[cur]++;
        t0 = cyc;
        in_flight = 1;
        issued++;
      end
    end
    grant = 1'b0;
    repeat (3) @(negedge clk);
    for (int a = 0; a < D; a++)
      chk(u_mem.mem[a] == refm[a], $sformatf("mem[%0d]=%h expected %h", a, u_mem.mem[a], refm[a]));
    chk(n_op[2] > 0 && n_op[3] > 0 && n_cas_fail > 0 && n_back2back > 0, "all cases exercised");
    wait (ls_done);
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
