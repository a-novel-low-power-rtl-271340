// tb_pal_mux4: checks the four-to-one mux with random inputs on every select.
module tb_pal_mux4;
  logic [3:0] i0, i1, i2, i3, o;
  logic [1:0] s;
  logic [3:0] e;
  int checks = 0, failures = 0;

  pal_mux4 #(.W(4)) dut (.in0(i0), .in1(i1), .in2(i2), .in3(i3), .s(s), .out(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      i0 = 4'($urandom); i1 = 4'($urandom); i2 = 4'($urandom); i3 = 4'($urandom);
      s = 2'(k);
      #1;
      case (s)
        2'd0: e = i0;
        2'd1: e = i1;
        2'd2: e = i2;
        default: e = i3;
      endcase
      checks++;
      if (o !== e) begin failures++; $display("FAIL s=%0d out=%h exp=%h", s, o, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
