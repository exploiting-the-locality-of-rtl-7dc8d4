// tb_wze_enc_pref: self-checking test of one encoder working-zone slot.
// Random addresses near and far from the stored Pref, with random load
// enables; hit, offset and same_offset are compared every cycle with a model
// that keeps Pref and prev_off as integers and tests the signed distance
// against -N/2 .. N/2-1 (modulo 2^N, so the top and bottom of the address
// space are neighbours).
module tb_wze_enc_pref;
  localparam int N = 16;
  localparam int W = $clog2(N);
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_same = 0, n_wrap = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] current;
  logic pref_we, off_we, hit, same_offset;
  logic [W-1:0] offset;

  wze_enc_pref #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int m_pref, m_off, d, p;
    bit exp_hit;
    m_pref = 0; m_off = 0;
    current = '0; pref_we = 0; off_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      p = $urandom_range(99);
      if (p < 10)      current = N'($urandom);
      else if (p < 30) current = N'(m_pref + m_off);
      else             current = N'(m_pref + $urandom_range(2 * N) - N);
      pref_we = ($urandom_range(3) != 0);
      off_we  = ($urandom_range(1) != 0);
      #1;
      d = (int'(current) - m_pref + (1 << N)) % (1 << N);
      if (d >= (1 << (N - 1))) d -= (1 << N);
      exp_hit = (d >= -(N / 2)) && (d <= N / 2 - 1);
      check(hit == exp_hit, $sformatf("hit: cur=%h pref=%h got %0d", current, m_pref, hit));
      if (exp_hit) begin
        check($signed(offset) == d, $sformatf("offset got %0d exp %0d", $signed(offset), d));
        check(same_offset == (d == m_off), "same_offset");
        n_hit++;
        if (same_offset) n_same++;
        if (int'(current) + (N / 2) < m_pref || m_pref + (N / 2) < int'(current)) n_wrap++;
      end else n_miss++;
      @(posedge clk);
      if (off_we)  m_off  = (int'(offset) >= N / 2) ? int'(offset) - N : int'(offset);
      if (pref_we) m_pref = int'(current);
      // steer Pref near the ends of the address space now and then
      if (it % 1000 == 500) begin
        @(negedge clk);
        current = N'((1 << N) - 2); pref_we = 1; off_we = 0;
        @(posedge clk); m_pref = (1 << N) - 2;
        @(negedge clk);
        current = N'(3); pref_we = 0; #1;
        check(hit && $signed(offset) == 5, "wrap-around hit");
        n_wrap++;
      end
    end
    check(n_hit > 100 && n_miss > 100 && n_same > 100 && n_wrap > 0, "case coverage");
    $display("hits=%0d misses=%0d same=%0d wrap=%0d", n_hit, n_miss, n_same, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
