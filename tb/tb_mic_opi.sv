// tb_mic_opi: the owner index follows the selecting input one cycle later and
// is held while no input selects the port.
module tb_mic_opi;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] sel_col = '0;
  logic [3:0]   owner;
  int checks = 0, failures = 0;
  int exp_owner = 0;

  mic_opi #(.N_IN(N)) dut (.clk, .rst_n, .sel_col, .owner);

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      checks++;
      if (owner != 4'(exp_owner)) begin
        failures++;
        $display("FAIL cycle %0d: owner=%0d expected %0d", n, owner, exp_owner);
      end
      if ($urandom % 3 == 0) begin
        int i;
        i = $urandom % N;
        sel_col = N'(1) << i;
        exp_owner = i;
      end else begin
        sel_col = '0;
      end
    end
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
