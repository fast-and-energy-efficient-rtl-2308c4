// Self-checking testbench for rca_block. A 4-bit block is tested over every
// operand and carry combination, a 7-bit block with random operands. Sum
// and carry-out are compared with the integer sum, the propagate output
// with "a + b is all ones", computed without looking at the block.
module tb_rca_block;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4, p4;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7, p7;
  int checks = 0, failures = 0;

  rca_block #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4), .p(p4));
  rca_block #(.WIDTH(7)) dut7 (.a(a7), .b(b7), .ci(ci7), .s(s7), .co(co7), .p(p7));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a4, b4, ci4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4)) ||
          p4 != ((int'(a4) + int'(b4)) == 15)) begin
        failures++;
        $display("FAIL w4 a=%h b=%h ci=%b -> co=%b s=%h p=%b", a4, b4, ci4, co4, s4, p4);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a7 = 7'($urandom); b7 = 7'($urandom); ci7 = 1'($urandom);
      if (n % 4 == 0) b7 = ~a7;  // make the propagate case frequent
      #1;
      checks++;
      if ({co7, s7} != 8'(int'(a7) + int'(b7) + int'(ci7)) ||
          p7 != ((int'(a7) + int'(b7)) == 127)) begin
        failures++;
        $display("FAIL w7 a=%h b=%h ci=%b -> co=%b s=%h p=%b", a7, b7, ci7, co7, s7, p7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
