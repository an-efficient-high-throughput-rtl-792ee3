// tb_piso_reg: self-checking test of the parallel-in serial-out register.
// Loads random 15-bit words and checks that they leave MSB first, one bit per
// shift, that idle cycles hold the output and that load wins over shift.
module tb_piso_reg;
  logic clk = 0, rst = 1, load = 0, shift = 0, sout;
  logic [14:0] pin = '0;
  int checks = 0, failures = 0;

  piso_reg #(.W(15)) dut (.clk, .rst, .load, .shift, .pin, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [14:0] w;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      w = 15'($urandom);
      pin = w; load = 1; shift = (n % 2 == 1);   // load must win over shift
      @(negedge clk);
      load = 0; shift = 0;
      for (int i = 14; i >= 0; i--) begin
        check(sout, w[i], "bit");
        if (n % 5 == 0) begin     // idle cycle: output holds
          @(negedge clk);
          check(sout, w[i], "hold");
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      check(sout, 1'b0, "empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
