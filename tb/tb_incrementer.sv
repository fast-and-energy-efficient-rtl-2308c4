// Self-checking testbench for incrementer: every 5-bit value with inc 0
// and 1, then random 9-bit values, compared with (x + inc) mod 2^WIDTH.
module tb_incrementer;
  logic [4:0] x5, y5;
  logic [8:0] x9, y9;
  logic       inc5, inc9;
  int checks = 0, failures = 0;

  incrementer #(.WIDTH(5)) dut5 (.x(x5), .inc(inc5), .y(y5));
  incrementer #(.WIDTH(9)) dut9 (.x(x9), .inc(inc9), .y(y9));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x5, inc5} = 6'(v);
      #1;
      checks++;
      if (y5 != 5'(int'(x5) + int'(inc5))) begin
        failures++;
        $display("FAIL w5 x=%h inc=%b -> y=%h", x5, inc5, y5);
      end
    end
    for (int n = 0; n < 1000; n++) begin
      x9 = 9'($urandom); inc9 = 1'($urandom);
      if (n % 8 == 0) x9 = 9'h1ff;
      #1;
      checks++;
      if (y9 != 9'(int'(x9) + int'(inc9))) begin
        failures++;
        $display("FAIL w9 x=%h inc=%b -> y=%h", x9, inc9, y9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
