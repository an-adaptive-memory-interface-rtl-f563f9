// tb_mic: the controller with 6 inputs and 4 banks of 3-cycle latency.
// Directed part, with cycle counts: a lone load completes L cycles after its
// start pulse; two loads to different banks started together both complete
// after L cycles (parallel ports, no arbitration delay); two loads to the same
// bank started together complete after L and 2L cycles (serialised, port
// handed over in its release cycle).
// Random part: every input runs loads and stores on its own addresses
// (checked against a per-input reference), fetch-and-adds of 1 on a shared
// counter (the returned old values must all differ and the final count must
// match) and compare-and-swap increments on a second shared word (the
// successful swaps must return distinct old values and add up to its final
// value). This exercises conflicts between inputs, atomicity and the routing
// of done and results back to the right input.
module tb_mic;
  import mic_pkg::*;
  localparam int NI = 6, NB = 4, L = 3, D = 256;
  localparam int CNT = 0, CASW = 1;   // shared words
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic        in_start [NI];
  mem_op_e     in_op    [NI];
  logic [31:0] in_addr  [NI], in_wdata [NI], in_cmp [NI];
  logic        in_done  [NI];
  logic [31:0] in_result[NI], in_amo_result [NI];
  logic        mem_start[NB], mem_we [NB], mem_done [NB];
  logic [31:0] mem_addr [NB], mem_wdata [NB], mem_rdata [NB];

  mic #(.N_IN(NI), .N_BANKS(NB)) dut (
    .clk, .rst_n, .in_start, .in_op, .in_addr, .in_wdata, .in_cmp, .in_done, .in_result,
    .in_amo_result, .mem_start, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_rdata
  );
  for (genvar j = 0; j < NB; j++) begin : g_bank
    mem_bank #(.DEPTH(D), .LATENCY(L)) u (
      .clk, .rst_n, .start(mem_start[j]), .we(mem_we[j]), .addr(mem_addr[j]),
      .wdata(mem_wdata[j]), .done(mem_done[j]), .rdata(mem_rdata[j])
    );
    initial for (int k = 0; k < D; k++) u.mem[k] = k * NB + j;   // word a holds a
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // one operation on input i; returns result, old value and cycle count
  task automatic do_op(input int i, input mem_op_e op, input int unsigned a, input int unsigned wd,
                       input int unsigned cp, output int unsigned res, output int unsigned amo,
                       output int lat);
    int t0;
    @(negedge clk);
    in_start[i] = 1'b1; in_op[i] = op; in_addr[i] = a; in_wdata[i] = wd; in_cmp[i] = cp;
    t0 = cyc;
    @(negedge clk);
    in_start[i] = 1'b0;
    while (!in_done[i]) @(negedge clk);
    res = in_result[i]; amo = in_amo_result[i]; lat = cyc - t0;
  endtask

  bit directed_done = 0;
  int finished = 0;
  int unsigned faa_seen [int];
  int unsigned cas_seen [int];
  int cas_wins = 0;

  for (genvar g = 0; g < NI; g++) begin : g_req
    int unsigned priv [16];
    initial begin
      int unsigned r, o;
      int lat;
      wait (directed_done);
      for (int k = 0; k < 16; k++) priv[k] = 100 + g + NI * k;   // initial contents = address
      repeat (g) @(negedge clk);
      for (int n = 0; n < 300; n++) begin
        int k, sel;
        k = $urandom % 16;
        sel = $urandom % 5;
        if (sel == 0) begin
          do_op(g, OP_STORE, 100 + g + NI * k, $urandom, 0, r, o, lat);
          priv[k] = in_wdata[g];
        end else if (sel == 1) begin
          do_op(g, OP_LOAD, 100 + g + NI * k, 0, 0, r, o, lat);
          chk(r == priv[k], $sformatf("input %0d load %0d: %0d expected %0d", g, 100 + g + NI * k, r, priv[k]));
        end else if (sel == 2) begin
          do_op(g, OP_FAA, CNT, 1, 0, r, o, lat);
          chk(!faa_seen.exists(o), $sformatf("fetch-and-add returned %0d twice", o));
          faa_seen[o] = 1;
        end else begin
          // read the shared word, then try to increment it with compare-and-swap
          int unsigned seen;
          do_op(g, OP_LOAD, CASW, 0, 0, seen, o, lat);
          do_op(g, OP_CAS, CASW, seen + 1, seen, r, o, lat);
          if (o == seen) begin
            chk(!cas_seen.exists(o), $sformatf("compare-and-swap won twice on %0d", o));
            cas_seen[o] = 1;
            cas_wins++;
          end
        end
      end
      finished++;
    end
  end

  initial begin
    int unsigned r0, r1, o;
    int l0, l1;
    for (int i = 0; i < NI; i++) begin
      in_start[i] = 0; in_op[i] = OP_LOAD; in_addr[i] = 0; in_wdata[i] = 0; in_cmp[i] = 0;
    end
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    // lone load
    do_op(0, OP_LOAD, 37, 0, 0, r0, o, l0);
    chk(r0 == 37 && l0 == L, $sformatf("lone load: data %0d latency %0d", r0, l0));
    // two banks in parallel
    fork
      do_op(0, OP_LOAD, 41, 0, 0, r0, o, l0);
      do_op(1, OP_LOAD, 42, 0, 0, r1, o, l1);
    join
    chk(r0 == 41 && r1 == 42, "parallel loads data");
    chk(l0 == L && l1 == L, $sformatf("parallel loads latency %0d %0d", l0, l1));
    // same bank: serialised, second one handed the port in the release cycle
    fork
      do_op(2, OP_LOAD, 44, 0, 0, r0, o, l0);
      do_op(3, OP_LOAD, 48, 0, 0, r1, o, l1);
    join
    chk(r0 == 44 && r1 == 48, "conflicting loads data");
    chk((l0 == L && l1 == 2 * L) || (l0 == 2 * L && l1 == L),
        $sformatf("conflicting loads latency %0d %0d", l0, l1));
    // the shared words start at zero
    do_op(0, OP_STORE, CNT, 0, 0, r0, o, l0);
    do_op(0, OP_STORE, CASW, 0, 0, r0, o, l0);
    directed_done = 1;
    wait (finished == NI);
    repeat (2) @(negedge clk);
    chk(g_bank[CNT % NB].u.mem[CNT / NB] == faa_seen.num(),
        $sformatf("counter %0d after %0d fetch-and-adds", g_bank[CNT % NB].u.mem[CNT / NB], faa_seen.num()));
    chk(g_bank[CASW % NB].u.mem[CASW / NB] == cas_wins,
        $sformatf("CAS word %0d after %0d wins", g_bank[CASW % NB].u.mem[CASW / NB], cas_wins));
    chk(cas_wins > 0 && faa_seen.num() > 0, "atomic operations ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
