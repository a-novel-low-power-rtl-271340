// tb_pal_encoder: checks the match-line encoder with every single match line
// and with none, for the four-record table and for an eight-record one.
module tb_pal_encoder;
  logic [3:0] m4;  logic [1:0] c4; logic h4;
  logic [7:0] m8;  logic [2:0] c8; logic h8;
  int checks = 0, failures = 0;

  pal_encoder #(.N(4)) dut4 (.match(m4), .code(c4), .hit(h4));
  pal_encoder #(.N(8)) dut8 (.match(m8), .code(c8), .hit(h8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m4 = '0; m8 = '0; #1;
    checks++;
    if (h4 !== 0 || c4 !== 0 || h8 !== 0 || c8 !== 0) begin
      failures++; $display("FAIL no-match h4=%b c4=%0d h8=%b c8=%0d", h4, c4, h8, c8);
    end
    for (int i = 0; i < 4; i++) begin
      m4 = 4'(1 << i); #1;
      checks++;
      if (h4 !== 1 || int'(c4) != i) begin
        failures++; $display("FAIL N=4 line %0d code=%0d hit=%b", i, c4, h4);
      end
    end
    for (int i = 0; i < 8; i++) begin
      m8 = 8'(1 << i); #1;
      checks++;
      if (h8 !== 1 || int'(c8) != i) begin
        failures++; $display("FAIL N=8 line %0d code=%0d hit=%b", i, c8, h8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
