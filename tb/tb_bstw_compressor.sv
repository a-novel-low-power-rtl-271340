// tb_bstw_compressor: runs a random tuple stream through the compressor and
// compares every output with a move-to-front list kept in the testbench.
// The stream draws from a small alphabet so hits at every position and
// misses with and without eviction all occur; idle cycles and a reset in the
// middle are included. The read port is compared with the reference list
// every cycle, and out_valid must come exactly one cycle after in_valid.
module tb_bstw_compressor;
  localparam int N = 4, W = 4, CW = 2;
  logic clk = 0, rst;
  logic in_valid, out_valid, out_hit, rd_valid;
  logic [W-1:0] in_data, out_literal, rd_data;
  logic [CW-1:0] out_code, rd_addr;
  int checks = 0, failures = 0;

  // Reference list.
  logic [W-1:0] lst [N];
  int cnt, cnt_before;
  logic [W-1:0] lst_before [N];
  // Expected outputs for the cycle after an accepted tuple.
  logic exp_valid, exp_hit;
  logic [CW-1:0] exp_code;
  logic [W-1:0] exp_lit;
  int n_hit [N];
  int n_miss_fill = 0, n_miss_evict = 0, n_idle = 0, n_reset = 0;

  bstw_compressor #(.N(N), .W(W)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_hit(out_hit), .out_code(out_code),
    .out_literal(out_literal), .rd_addr(rd_addr), .rd_data(rd_data),
    .rd_valid(rd_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One move-to-front step of the reference; returns hit and code.
  task automatic ref_step(input logic [W-1:0] t, output logic h, output logic [CW-1:0] c);
    int k;
    k = -1;
    for (int i = 0; i < cnt; i++) if (lst[i] == t && k < 0) k = i;
    if (k >= 0) begin
      h = 1; c = CW'(k);
      for (int j = k; j > 0; j--) lst[j] = lst[j-1];
      n_hit[k]++;
    end else begin
      h = 0; c = '0;
      if (cnt == N) n_miss_evict++; else n_miss_fill++;
      for (int j = N - 1; j > 0; j--) lst[j] = lst[j-1];
      if (cnt < N) cnt++;
    end
    lst[0] = t;
  endtask

  initial begin
    foreach (n_hit[i]) n_hit[i] = 0;
    in_valid = 0; in_data = 0; rd_addr = 0; rst = 1;
    cnt = 0; exp_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // Reference for the tuple accepted at the last edge; keep the list as
      // it was before, which is what the read port shows during this cycle.
      lst_before = lst;
      cnt_before = cnt;
      if (exp_valid) ref_step(exp_lit, exp_hit, exp_code);
      checks++;
      if (out_valid !== exp_valid) begin
        failures++; $display("FAIL cyc %0d out_valid=%b exp=%b", cyc, out_valid, exp_valid);
      end else if (exp_valid) begin
        if (out_hit !== exp_hit || (exp_hit ? out_code !== exp_code : out_literal !== exp_lit)) begin
          failures++;
          $display("FAIL cyc %0d hit=%b code=%0d lit=%h exp hit=%b code=%0d lit=%h",
                   cyc, out_hit, out_code, out_literal, exp_hit, exp_code, exp_lit);
        end
        if (!exp_hit && out_code !== '0) begin
          failures++; $display("FAIL cyc %0d miss code %0d", cyc, out_code);
        end
      end
      rd_addr = CW'($urandom);
      #1;
      checks++;
      if (rd_valid !== (int'(rd_addr) < cnt_before) ||
          (rd_valid && rd_data !== lst_before[rd_addr])) begin
        failures++; $display("FAIL cyc %0d read addr %0d data=%h v=%b exp=%h",
                             cyc, rd_addr, rd_data, rd_valid, lst_before[rd_addr]);
      end
      // Stimulus for the next edge.
      if (cyc == 700) begin
        rst = 1; in_valid = 0; n_reset++;
      end else begin
        rst = 0;
        in_valid = ($urandom_range(0, 7) != 0);
        if (!in_valid) n_idle++;
        // Mostly a six-symbol alphabet, sometimes anything.
        in_data = ($urandom_range(0, 4) == 0) ? W'($urandom) : W'($urandom_range(0, 5));
      end
      @(posedge clk);
      if (rst) begin cnt = 0; exp_valid = 0; end
      else begin exp_valid = in_valid; exp_lit = in_data; end
      // The tuple must have been latched: disturb the input after the edge.
      #1 in_data = ~in_data;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (n_hit[i] == 0) begin failures++; $display("FAIL no hit at position %0d", i); end
    end
    checks++;
    if (n_miss_fill == 0 || n_miss_evict == 0 || n_idle == 0 || n_reset == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("hits per position %0d %0d %0d %0d, fill misses %0d, evicting misses %0d",
             n_hit[0], n_hit[1], n_hit[2], n_hit[3], n_miss_fill, n_miss_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
