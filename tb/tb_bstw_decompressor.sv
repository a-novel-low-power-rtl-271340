// tb_bstw_decompressor: feeds the receiver a compressed stream produced by a
// move-to-front encoder written in the testbench, and checks that every
// recovered tuple equals the original, one cycle after its symbol is taken.
// The stream mixes codes for every position, literals with and without
// eviction, idle cycles and one reset.
module tb_bstw_decompressor;
  localparam int N = 4, W = 4, CW = 2;
  logic clk = 0, rst;
  logic in_valid, in_hit, out_valid;
  logic [CW-1:0] in_code;
  logic [W-1:0] in_literal, out_data;
  int checks = 0, failures = 0;

  logic [W-1:0] lst [N];
  int cnt;
  logic exp_valid;
  logic [W-1:0] exp_data;
  int n_hit [N];
  int n_lit = 0, n_evict = 0;

  bstw_decompressor #(.N(N), .W(W)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_hit(in_hit),
    .in_code(in_code), .in_literal(in_literal),
    .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encoder side of the reference: produce the symbol for tuple t.
  task automatic encode(input logic [W-1:0] t, output logic h, output logic [CW-1:0] c);
    int k;
    k = -1;
    for (int i = 0; i < cnt; i++) if (lst[i] == t && k < 0) k = i;
    if (k >= 0) begin
      h = 1; c = CW'(k); n_hit[k]++;
      for (int j = k; j > 0; j--) lst[j] = lst[j-1];
    end else begin
      h = 0; c = '0; n_lit++;
      if (cnt == N) n_evict++;
      for (int j = N - 1; j > 0; j--) lst[j] = lst[j-1];
      if (cnt < N) cnt++;
    end
    lst[0] = t;
  endtask

  initial begin
    foreach (n_hit[i]) n_hit[i] = 0;
    rst = 1; in_valid = 0; in_hit = 0; in_code = 0; in_literal = 0;
    cnt = 0; exp_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      checks++;
      if (out_valid !== exp_valid || (exp_valid && out_data !== exp_data)) begin
        failures++;
        $display("FAIL cyc %0d valid=%b data=%h exp valid=%b data=%h",
                 cyc, out_valid, out_data, exp_valid, exp_data);
      end
      if (cyc == 800) begin
        rst = 1; in_valid = 0;
      end else begin
        logic [W-1:0] t;
        rst = 0;
        in_valid = ($urandom_range(0, 7) != 0);
        t = ($urandom_range(0, 4) == 0) ? W'($urandom) : W'($urandom_range(0, 5));
        if (in_valid) begin
          encode(t, in_hit, in_code);
          // A literal carries the tuple; a code word's literal field is junk.
          in_literal = in_hit ? W'($urandom) : t;
        end else begin
          in_hit = 1'($urandom); in_code = CW'($urandom); in_literal = W'($urandom);
        end
        exp_data = t;
      end
      @(posedge clk);
      exp_valid = in_valid && !rst;
      if (rst) cnt = 0;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (n_hit[i] == 0) begin failures++; $display("FAIL no code for position %0d", i); end
    end
    checks++;
    if (n_evict == 0 || n_lit == n_evict) begin failures++; $display("FAIL literal cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
