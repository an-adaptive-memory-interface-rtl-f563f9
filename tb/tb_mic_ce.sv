// tb_mic_ce: checks the Control Element cycle by cycle against a scripted
// sequence: a request accepted in its own start cycle, a request that waits
// three cycles for its acknowledge, and that `req` drops right after `ack`.
module tb_mic_ce;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, ack = 1'b0, done = 1'b0, req;
  int checks = 0, failures = 0;

  mic_ce dut (.clk, .rst_n, .start, .ack, .done, .req);

  // apply inputs for one cycle and check req in that cycle
  task automatic step(input logic s, input logic a, input logic d, input logic exp_req);
    start = s; ack = a; done = d;
    #1;
    checks++;
    if (req !== exp_req) begin
      failures++;
      $display("FAIL t=%0t start=%b ack=%b done=%b: req=%b expected %b", $time, s, a, d, req, exp_req);
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1; @(negedge clk);
    step(0, 0, 0, 0);
    // accepted in the start cycle
    step(1, 1, 0, 1);
    step(0, 0, 0, 0);
    step(0, 0, 0, 0);
    step(0, 0, 1, 0);   // done
    // waits for three cycles
    step(1, 0, 0, 1);
    step(0, 0, 0, 1);
    step(0, 0, 0, 1);
    step(0, 1, 0, 1);   // accepted
    step(0, 0, 0, 0);
    step(0, 0, 0, 0);
    step(0, 0, 1, 0);   // done
    step(0, 0, 0, 0);
    // back-to-back operation right after done
    step(1, 0, 0, 1);
    step(0, 1, 0, 1);
    step(0, 0, 1, 0);
    step(1, 1, 0, 1);
    step(0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
