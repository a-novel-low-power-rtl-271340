// tb_cam_read_mux: checks the read-by-position multiplexer tree at the
// default four records (one pal_mux4 level) and at nine records (two levels,
// positions 9..15 padded with zero), with random record contents.
module tb_cam_read_mux;
  logic [3:0] r4 [4];
  logic [1:0] a4;
  logic [3:0] d4;
  logic [3:0] r9 [9];
  logic [3:0] a9;
  logic [3:0] d9;
  int checks = 0, failures = 0;

  cam_read_mux #(.N(4), .W(4)) dut4 (.rec(r4), .addr(a4), .data(d4));
  cam_read_mux #(.N(9), .W(4)) dut9 (.rec(r9), .addr(a9), .data(d9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      foreach (r4[i]) r4[i] = 4'($urandom);
      foreach (r9[i]) r9[i] = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        a4 = 2'(i); #1;
        checks++;
        if (d4 !== r4[i]) begin failures++; $display("FAIL N=4 addr %0d got %h exp %h", i, d4, r4[i]); end
      end
      for (int i = 0; i < 16; i++) begin
        a9 = 4'(i); #1;
        checks++;
        if (d9 !== ((i < 9) ? r9[i] : 4'd0)) begin
          failures++; $display("FAIL N=9 addr %0d got %h", i, d9);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
