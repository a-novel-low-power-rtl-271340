// tb_bstw_codec_top: end-to-end test of the codec at its default size (four
// records of four-bit tuples). The transmitter's symbols are looped back into
// the receiver (the literal field is scrambled whenever a code is sent, as a
// channel that carries only the code would leave it); every tuple must come
// out of the receiver unchanged exactly two cycles after it went in, and
// every hit/code decision of the transmitter is compared with a
// move-to-front list kept in the testbench.
//
// The stream has two phases: a phase with strong locality (tuples drawn from
// a set of four, so nearly everything hits) and a phase drawn from a wider
// set (many misses that evict the oldest record), with idle cycles and a
// reset in between. Each mechanism of the design is counted: a hit at each
// list position (position 0 leaves the order unchanged, deeper ones move the
// record to the front), misses while the table fills, misses that evict,
// idle cycles, the reset and read-port reads. A mechanism that never
// happened counts as a failure. The payload sent (code bits for a hit, tuple
// bits for a miss, the hit flag not counted) is compared with the tuple bits
// that went in.
module tb_bstw_codec_top;
  localparam int N = bstw_pkg::N_ENTRIES;
  localparam int W = bstw_pkg::TUPLE_W;
  localparam int CW = (N > 1) ? $clog2(N) : 1;
  localparam int LAT = 2;

  logic clk = 0, rst;
  logic tx_in_valid, tx_out_valid, tx_out_hit, tx_rd_valid, rx_out_valid;
  logic [W-1:0] tx_in_data, tx_out_literal, tx_rd_data, rx_out_data;
  logic [CW-1:0] tx_out_code, tx_rd_addr;
  int checks = 0, failures = 0;

  // Reference list of the transmitter.
  logic [W-1:0] lst [N];
  int cnt;
  // Tuples in flight to the receiver output, by cycle.
  logic [W-1:0] sent_q [$];
  int sent_cyc [$];
  int cyc;
  int n_hit [N];
  int n_miss_fill = 0, n_miss_evict = 0, n_idle = 0, n_reset = 0, n_read = 0;
  longint bits_in = 0, bits_out = 0, bits_in_p1 = 0, bits_out_p1 = 0;

  // The channel carries only the code on a hit: the literal field the
  // receiver sees then is deliberately wrong.
  logic [W-1:0] chan_literal;
  assign chan_literal = tx_out_hit ? ~tx_out_literal : tx_out_literal;

  bstw_codec_top dut (
    .clk(clk), .rst(rst),
    .tx_in_valid(tx_in_valid), .tx_in_data(tx_in_data),
    .tx_out_valid(tx_out_valid), .tx_out_hit(tx_out_hit),
    .tx_out_code(tx_out_code), .tx_out_literal(tx_out_literal),
    .tx_rd_addr(tx_rd_addr), .tx_rd_data(tx_rd_data), .tx_rd_valid(tx_rd_valid),
    .rx_in_valid(tx_out_valid), .rx_in_hit(tx_out_hit),
    .rx_in_code(tx_out_code), .rx_in_literal(chan_literal),
    .rx_out_valid(rx_out_valid), .rx_out_data(rx_out_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_step(input logic [W-1:0] t, output logic h, output logic [CW-1:0] c);
    int k;
    k = -1;
    for (int i = 0; i < cnt; i++) if (lst[i] == t && k < 0) k = i;
    if (k >= 0) begin
      h = 1; c = CW'(k); n_hit[k]++;
      for (int j = k; j > 0; j--) lst[j] = lst[j-1];
    end else begin
      h = 0; c = '0;
      if (cnt == N) n_miss_evict++; else n_miss_fill++;
      for (int j = N - 1; j > 0; j--) lst[j] = lst[j-1];
      if (cnt < N) cnt++;
    end
    lst[0] = t;
  endtask

  // Tuple accepted at the last edge, seen at the transmitter output now.
  logic pend_v;
  logic [W-1:0] pend_t;

  initial begin
    foreach (n_hit[i]) n_hit[i] = 0;
    rst = 1; tx_in_valid = 0; tx_in_data = 0; tx_rd_addr = 0;
    cnt = 0; pend_v = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (cyc = 0; cyc < 6000; cyc++) begin
      logic h;
      logic [CW-1:0] c;
      logic [W-1:0] rd_exp;
      logic rd_exp_v;
      // Read port shows the list before this cycle's update.
      tx_rd_addr = CW'($urandom);
      #1;
      rd_exp_v = int'(tx_rd_addr) < cnt;
      rd_exp = lst[tx_rd_addr];
      checks++;
      if (tx_rd_valid !== rd_exp_v || (rd_exp_v && tx_rd_data !== rd_exp)) begin
        failures++; $display("FAIL cyc %0d read port", cyc);
      end
      if (rd_exp_v) n_read++;
      // Transmitter decision.
      checks++;
      if (tx_out_valid !== pend_v) begin
        failures++; $display("FAIL cyc %0d tx_out_valid=%b exp %b", cyc, tx_out_valid, pend_v);
      end else if (pend_v) begin
        ref_step(pend_t, h, c);
        if (tx_out_hit !== h || (h && tx_out_code !== c) || (!h && tx_out_literal !== pend_t)) begin
          failures++;
          $display("FAIL cyc %0d tx hit=%b code=%0d lit=%h exp hit=%b code=%0d lit=%h",
                   cyc, tx_out_hit, tx_out_code, tx_out_literal, h, c, pend_t);
        end
        bits_in += W;
        bits_out += h ? CW : W;
        if (cyc < 3000) begin bits_in_p1 += W; bits_out_p1 += h ? CW : W; end
      end
      // Receiver output.
      if (rx_out_valid) begin
        checks++;
        if (sent_q.size() == 0) begin
          failures++; $display("FAIL cyc %0d unexpected receiver output", cyc);
        end else begin
          logic [W-1:0] t;
          int c0;
          t = sent_q.pop_front();
          c0 = sent_cyc.pop_front();
          if (rx_out_data !== t || cyc - c0 != LAT) begin
            failures++;
            $display("FAIL cyc %0d rx data=%h exp %h latency %0d", cyc, rx_out_data, t, cyc - c0);
          end
        end
      end
      // Next input.
      if (cyc == 3000) begin
        rst = 1; tx_in_valid = 0; n_reset++;
        sent_q.delete(); sent_cyc.delete();
      end else begin
        rst = 0;
        tx_in_valid = ($urandom_range(0, 9) != 0);
        if (!tx_in_valid) n_idle++;
        if (cyc < 3000)
          tx_in_data = ($urandom_range(0, 31) == 0) ? W'($urandom) : W'($urandom_range(3, 6));
        else
          tx_in_data = W'($urandom_range(0, 7));
      end
      @(posedge clk);
      if (rst) begin
        cnt = 0; pend_v = 0;
      end else begin
        pend_v = tx_in_valid; pend_t = tx_in_data;
        if (tx_in_valid) begin sent_q.push_back(tx_in_data); sent_cyc.push_back(cyc); end
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (n_hit[i] == 0) begin failures++; $display("FAIL no hit at position %0d", i); end
    end
    checks++;
    if (n_miss_fill == 0) begin failures++; $display("FAIL no miss while filling"); end
    checks++;
    if (n_miss_evict == 0) begin failures++; $display("FAIL no evicting miss"); end
    checks++;
    if (n_idle == 0 || n_reset == 0 || n_read == 0) begin failures++; $display("FAIL idle/reset/read"); end
    checks++;
    if (bits_out_p1 * 10 > bits_in_p1 * 6) begin
      failures++; $display("FAIL local phase payload %0d of %0d bits", bits_out_p1, bits_in_p1);
    end
    $display("hits per position: %0d %0d %0d %0d", n_hit[0], n_hit[1], n_hit[2], n_hit[3]);
    $display("misses filling %0d, evicting %0d, idle %0d, reset %0d, reads %0d",
             n_miss_fill, n_miss_evict, n_idle, n_reset, n_read);
    $display("payload: local phase %0d of %0d bits, whole run %0d of %0d bits",
             bits_out_p1, bits_in_p1, bits_out, bits_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
