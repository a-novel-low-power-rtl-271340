// tb_cam_word: checks a table record: load on shift_en at the clock edge,
// valid cleared by reset (data bits are left to shift_en), and the match line high only when the record is
// valid and every bit equals the search word. Searches are biased towards
// the stored value so that matches happen often.
module tb_cam_word;
  localparam int W = 4;
  logic clk = 0, rst, shift_en, v_in, v, match;
  logic [W-1:0] d_in, search, q;
  logic [W-1:0] m_q;
  logic m_v;
  int checks = 0, failures = 0, n_match = 0;

  cam_word #(.W(W)) dut (.clk(clk), .rst(rst), .shift_en(shift_en), .d_in(d_in),
    .v_in(v_in), .search(search), .q(q), .v(v), .match(match));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 1; shift_en = 0; v_in = 1; d_in = '0; search = '0;
    @(posedge clk); m_v = 0;
    @(negedge clk); rst = 0;
    // Empty record must not match even if the data happens to equal search.
    search = q; #1;
    checks++;
    if (match !== 1'b0 || v !== 1'b0) begin
      failures++; $display("FAIL empty record v=%b match=%b", v, match);
    end
    m_q = q;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rst      = ($urandom_range(0, 49) == 0);
      shift_en = 1'($urandom);
      v_in     = ($urandom_range(0, 3) != 0);
      d_in     = W'($urandom);
      search   = ($urandom_range(0, 1) == 0) ? m_q : W'($urandom);
      #1;
      checks++;
      if (q !== m_q || v !== m_v || match !== (m_v && (m_q == search))) begin
        failures++;
        $display("FAIL %0d q=%h v=%b match=%b model q=%h v=%b search=%h", i, q, v, match, m_q, m_v, search);
      end
      if (match) n_match++;
      @(posedge clk);
      // Data follows shift_en; reset wins for the valid bit only.
      if (shift_en) begin m_q = d_in; m_v = v_in; end
      if (rst) m_v = 0;
    end
    checks++;
    if (n_match < 50) begin failures++; $display("FAIL too few matches %0d", n_match); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
