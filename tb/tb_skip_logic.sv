// Self-checking testbench for skip_logic. For every value of the block
// carry g, block propagate p and carry-in ci, the AOI form (true inputs)
// must give the inverted carry ~(g | p & ci) and the OAI form, fed the
// inverted signals, must give the true carry g | p & ci.
module tb_skip_logic;
  logic g, p, ci, co_aoi, co_oai;
  int checks = 0, failures = 0;

  skip_logic #(.USE_OAI(1'b0)) dut_aoi (.g(g),  .p(p),  .ci(ci),  .co(co_aoi));
  skip_logic #(.USE_OAI(1'b1)) dut_oai (.g(~g), .p(~p), .ci(~ci), .co(co_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic carry;
    for (int v = 0; v < 8; v++) begin
      {g, p, ci} = 3'(v);
      #1;
      // Carry out of a block: generated, or propagated from carry-in.
      carry = (v == 3'b100 || v == 3'b101 || v == 3'b110 || v == 3'b111 || v == 3'b011);
      checks += 2;
      if (co_aoi != ~carry) begin
        failures++;
        $display("FAIL AOI g=%b p=%b ci=%b -> %b", g, p, ci, co_aoi);
      end
      if (co_oai != carry) begin
        failures++;
        $display("FAIL OAI g=%b p=%b ci=%b -> %b", g, p, ci, co_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
