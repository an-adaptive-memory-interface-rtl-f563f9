// tb_mic_unbd: the selection rises in the acknowledge cycle, stays up while
// the operation runs and falls in the cycle its done returns.
module tb_mic_unbd;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ack = 1'b0, done = 1'b0, sel;
  int checks = 0, failures = 0;

  mic_unbd dut (.clk, .rst_n, .ack, .done, .sel);

  task automatic step(input logic a, input logic d, input logic exp_sel);
    ack = a; done = d;
    #1;
    checks++;
    if (sel !== exp_sel) begin
      failures++;
      $display("FAIL t=%0t ack=%b done=%b: sel=%b expected %b", $time, a, d, sel, exp_sel);
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1; @(negedge clk);
    step(0, 0, 0);
    step(1, 0, 1);
    step(0, 0, 1);
    step(0, 0, 1);
    step(0, 1, 0);
    step(0, 0, 0);
    step(1, 0, 1);
    step(0, 1, 0);
    step(1, 0, 1);   // next operation right after done
    step(0, 0, 1);
    step(0, 1, 0);
    step(0, 0, 0);
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
