// tb_mic_pi: checks the interleaving scrambling function (bank = addr mod M,
// offset = addr div M) for random and boundary addresses with 8, 4, 3 and 1
// banks.
module tb_mic_pi;
  int checks = 0, failures = 0;

  logic [31:0] addr;
  logic [2:0]  ind8;  logic [31:0] off8;
  logic [1:0]  ind4;  logic [31:0] off4;
  logic [1:0]  ind3;  logic [31:0] off3;
  logic [0:0]  ind1;  logic [31:0] off1;

  mic_pi                 u8 (.addr, .ind(ind8), .offset(off8));
  mic_pi #(.N_BANKS(4)) u4 (.addr, .ind(ind4), .offset(off4));
  mic_pi #(.N_BANKS(3)) u3 (.addr, .ind(ind3), .offset(off3));
  mic_pi #(.N_BANKS(1)) u1 (.addr, .ind(ind1), .offset(off1));

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL addr=%0d %s: %0d expected %0d", addr, what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      addr = (n < 20) ? 32'(n) : (n == 20 ? 32'hFFFF_FFFF : $urandom);
      #1;
      chk(ind8, addr % 8, "ind8");  chk(off8, addr / 8, "off8");
      chk(ind4, addr % 4, "ind4");  chk(off4, addr / 4, "off4");
      chk(ind3, addr % 3, "ind3");  chk(off3, addr / 3, "off3");
      chk(ind1, 0, "ind1");         chk(off1, addr, "off1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
