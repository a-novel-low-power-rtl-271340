// tb_shift_ctrl: exhaustive check of the move-to-front shift decision for a
// four-record and a seven-record table. For every input pattern the reference
// is: records 0..k shift, where k is the first matching record, or all of
// them when none matches; nothing shifts when no tuple is being processed.
module tb_shift_ctrl;
  logic       iv4, iv7;
  logic [3:0] m4, e4;
  logic [6:0] m7, e7;
  int checks = 0, failures = 0;

  shift_ctrl #(.N(4)) dut4 (.in_valid(iv4), .match(m4), .shift_en(e4));
  shift_ctrl #(.N(7)) dut7 (.in_valid(iv7), .match(m7), .shift_en(e7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] ref_en(int n, logic iv, logic [6:0] m);
    int k;
    logic [6:0] r;
    k = n - 1;
    for (int i = n - 1; i >= 0; i--) if (m[i]) k = i;
    r = '0;
    if (iv) for (int i = 0; i <= k; i++) r[i] = 1'b1;
    return r;
  endfunction

  initial begin
    for (int iv = 0; iv < 2; iv++) begin
      for (int m = 0; m < 16; m++) begin
        iv4 = 1'(iv); m4 = 4'(m); #1;
        checks++;
        if (e4 !== ref_en(4, iv4, {3'b0, m4})[3:0]) begin
          failures++; $display("FAIL N=4 iv=%0d m=%b en=%b", iv, m4, e4);
        end
      end
      for (int m = 0; m < 128; m++) begin
        iv7 = 1'(iv); m7 = 7'(m); #1;
        checks++;
        if (e7 !== ref_en(7, iv7, m7)) begin
          failures++; $display("FAIL N=7 iv=%0d m=%b en=%b", iv, m7, e7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
