// tb_mem_bank: random loads and stores, issued back to back or with gaps, on
// banks of latency 2 and 5. Checks that every operation's done comes exactly
// LATENCY cycles after its start, that done never comes otherwise, and that
// loads return the last value stored (reference array in the testbench).
module tb_mem_bank;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_lat
    localparam int L = (g == 0) ? 2 : 5;
    localparam int D = 64;
    logic        start = 1'b0, we = 1'b0, done;
    logic [31:0] addr = '0, wdata = '0, rdata;
    int unsigned refm [D];
    // expected completions, indexed by the clock edge after which they show
    bit          exp_done [4096];
    int unsigned exp_data [4096];
    bit          exp_load [4096];
    int cyc = 0;
    bit finished = 0;

    mem_bank #(.DEPTH(D), .LATENCY(L)) dut (.clk, .rst_n, .start, .we, .addr, .wdata, .done, .rdata);

    initial begin
      for (int a = 0; a < D; a++) refm[a] = 0;
      for (int c = 0; c < 4096; c++) begin exp_done[c] = 0; exp_load[c] = 0; end
      @(negedge clk); @(negedge clk);
      @(negedge clk);
      // clear the array through the port
      for (int a = 0; a < D; a++) begin
        start = 1; we = 1; addr = a; wdata = 0;
        exp_done[cyc + L - 1] = 1;
        @(negedge clk);
      end
      start = 0;
      for (int n = 0; n < 1500; n++) begin
        if ($urandom % 3 != 0) begin
          start = 1; we = $urandom % 2; addr = $urandom % D; wdata = $urandom;
          exp_done[cyc + L - 1] = 1;
          exp_load[cyc + L - 1] = !we;
          exp_data[cyc + L - 1] = refm[addr];
          if (we) refm[addr] = wdata;
        end else begin
          start = 0;
        end
        @(negedge clk);
      end
      start = 0;
      repeat (L + 2) @(negedge clk);
      finished = 1;
    end

    always @(posedge clk) if (rst_n) begin
      #1;
      chk(done == exp_done[cyc], $sformatf("L=%0d cycle %0d: done=%b expected %b", L, cyc, done, exp_done[cyc]));
      if (exp_load[cyc])
        chk(rdata == exp_data[cyc], $sformatf("L=%0d cycle %0d: rdata=%h expected %h", L, cyc, rdata, exp_data[cyc]));
      cyc++;
    end
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    wait (g_lat[0].finished && g_lat[1].finished);
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
