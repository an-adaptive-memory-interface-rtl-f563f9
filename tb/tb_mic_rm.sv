// tb_mic_rm: Resource Manager with four inputs driven by random requesters
// that hold their request until acknowledged, against a round-robin reference
// kept in the testbench. Each operation holds the port for a random 1..4
// cycles after its acknowledge. Checks every cycle: the acknowledge equals the
// reference (none while busy; in the release cycle or when free, the first
// requester after the last one served), that a request finding the port free
// is acknowledged in the same cycle, and that a handover in the release cycle
// happened.
module tb_mic_rm;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0;
  logic         release_port = 1'b0;
  logic [N-1:0] ack;
  logic         busy;
  int checks = 0, failures = 0, handovers = 0, rotations = 0;

  mic_rm #(.N_IN(N)) dut (.clk, .rst_n, .req, .release_port, .ack, .busy);

  bit ref_busy = 0;
  int ref_last = N - 1;
  int remain = 0;   // cycles until the running operation releases the port

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] exp_ack;
      int win;
      @(negedge clk);
      // new requests (held until acknowledged)
      for (int i = 0; i < N; i++) if (!req[i] && ($urandom % 4 == 0)) req[i] = 1'b1;
      release_port = ref_busy && (remain == 0);
      #1;
      exp_ack = '0; win = -1;
      if (!ref_busy || release_port)
        for (int k = 1; k <= N; k++)
          if (win < 0 && req[(ref_last + k) % N]) win = (ref_last + k) % N;
      if (win >= 0) exp_ack[win] = 1'b1;
      checks++;
      if (ack !== exp_ack) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: req=%b ack=%b expected %b", n, req, ack, exp_ack);
      end
      checks++;
      if (busy !== ref_busy) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: busy=%b expected %b", n, busy, ref_busy);
      end
      if (win >= 0 && release_port) handovers++;
      if (win >= 0 && win < ref_last) rotations++;
      // reference state update
      if (win >= 0) begin
        ref_busy = 1; ref_last = win; remain = $urandom % 4;
      end else if (release_port) begin
        ref_busy = 0;
      end else if (ref_busy) begin
        remain--;
      end
      @(posedge clk);
      #1;
      if (win >= 0) req[win] = 1'b0;
    end
    checks++;
    if (handovers == 0 || rotations == 0) begin
      failures++;
      $display("FAIL: handovers=%0d rotations=%0d", handovers, rotations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
