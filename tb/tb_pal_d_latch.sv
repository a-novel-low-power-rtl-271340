// tb_pal_d_latch: checks the PAL D latch as a level-sensitive latch.
// Random enable/data patterns are applied; while the enable is high q must
// follow d, while it is low q must keep the value it had when the enable fell.
// qn must always be the complement of q.
module tb_pal_d_latch;
  logic clk, d, q, qn;
  int checks = 0, failures = 0;
  logic expect_q;

  pal_d_latch dut (.clk(clk), .d(d), .q(q), .qn(qn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e);
    checks++;
    if (q !== e || qn !== ~e) begin
      failures++;
      $display("FAIL t=%0t clk=%b d=%b q=%b qn=%b expected %b", $time, clk, d, q, qn, e);
    end
  endtask

  initial begin
    // Open the latch to load a known value.
    clk = 1; d = 0; #1;
    expect_q = 0;
    check(expect_q);
    for (int i = 0; i < 400; i++) begin
      logic nclk, nd;
      nclk = 1'($urandom);
      nd   = 1'($urandom);
      // Change the enable first, then the data, as two separate events.
      clk = nclk; #1;
      if (clk) expect_q = d;
      check(expect_q);
      d = nd; #1;
      if (clk) expect_q = d;
      check(expect_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
