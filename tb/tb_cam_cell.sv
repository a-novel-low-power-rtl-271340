// tb_cam_cell: checks one CAM bit: the stored bit changes only at a rising
// clock edge and only when load is high, and mismatch equals stored ^ search.
// A flip-flop clocked on the same edge must capture the value from before
// the edge, as it would from another flip-flop.
module tb_cam_cell;
  logic clk = 0, load, d_in, sd, q, mismatch;
  logic model;
  int checks = 0, failures = 0;

  // A flip-flop sampling the cell on the same edge must see the old value.
  logic q_sampled, model_prev;
  always_ff @(posedge clk) q_sampled <= q;

  cam_cell dut (.clk(clk), .load(load), .d_in(d_in), .sd(sd), .q(q), .mismatch(mismatch));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Load a known value first.
    @(negedge clk); load = 1; d_in = 1; sd = 0;
    @(posedge clk); model = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model || mismatch !== (model ^ sd)) begin
        failures++;
        $display("FAIL cycle %0d q=%b mismatch=%b model=%b sd=%b", i, q, mismatch, model, sd);
      end
      load = 1'($urandom);
      d_in = 1'($urandom);
      sd   = 1'($urandom);
      #1;
      // Mid-cycle the stored bit must not move yet.
      checks++;
      if (q !== model || mismatch !== (model ^ sd)) begin
        failures++;
        $display("FAIL before edge cycle %0d q=%b model=%b", i, q, model);
      end
      model_prev = model;
      @(posedge clk);
      if (load) model = d_in;
      #1;
      checks++;
      if (q_sampled !== model_prev) begin
        failures++; $display("FAIL cycle %0d same-edge sample %b expected %b", i, q_sampled, model_prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
