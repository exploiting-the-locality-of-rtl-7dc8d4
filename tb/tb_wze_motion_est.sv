// tb_wze_motion_est: the full-search motion-estimation workload on the
// encoded address bus at its default size (16-bit addresses, two Prefs).
//
// Frames of 128 x 128 one-byte pixels, 8 x 8 blocks and an 8 x 8 search area:
// the current frame CF sits at address 0, the reference frame RF right after
// it (16384) and the motion vectors MV (two bytes per block) after that
// (32768). For every block and candidate position the sum of absolute
// differences reads one CF pixel and one RF pixel per pixel pair; an improved
// match writes the two MV bytes. Pixel coordinates that fall outside the
// frame are clamped to its edge. About 2.1 million references are issued,
// one per clock; every one must be decoded back to the same address one clock
// later. The switching activity of the 16 plain address wires and of the 18
// encoded wires is accumulated and reported per reference; the encoded bus
// must need fewer than 0.7 of the plain transitions and the plain stream must
// show between 4 and 5.6 transitions per reference (a published run of this
// workload reports 4.8 plain and 2.5 encoded).
module tb_wze_motion_est;
  localparam int N = 16;
  localparam int P = 128, L = 128, X = 8, Y = 8, M = 8, NS = 8;
  localparam int CF_BASE = 0, RF_BASE = P * L, MV_BASE = 2 * P * L;
  int checks = 0, failures = 0;
  longint refs = 0, tr_plain = 0, tr_wze = 0, n_miss = 0, n_same = 0, n_new = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  logic [N-1:0] req_addr;
  logic bus_valid, bus_pref_miss, mem_addr_valid, protocol_err;
  logic [N-1:0] bus_word, mem_addr;
  logic [0:0] bus_ident;

  wze_top dut (.*);

  // external memory: 64K bytes
  logic [7:0] mem [1 << N];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit pend = 0;
  int exp_addr = 0, prev_plain = 0;
  logic [N+1:0] prev_bus = '0;

  // Check the previous reference at the decoder, then issue address a.
  task automatic issue(input int a);
    @(negedge clk);
    if (pend) begin
      check(mem_addr_valid && mem_addr == N'(exp_addr),
            $sformatf("ref %0d decoded %h exp %h", refs, mem_addr, exp_addr));
      tr_wze += $countones({bus_pref_miss, bus_ident, bus_word} ^ prev_bus);
      if (bus_pref_miss) n_miss++;
      else if (bus_word == prev_bus[N-1:0]) n_same++;
      else n_new++;
      prev_bus = {bus_pref_miss, bus_ident, bus_word};
    end
    req_valid = 1; req_addr = N'(a);
    pend = 1; exp_addr = a;
    tr_plain += $countones(N'(a) ^ N'(prev_plain));
    prev_plain = a;
    refs++;
  endtask

  function automatic int clamp(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  initial begin
    int optimal, partial, nv, rv, ra, lfsr;
    req_valid = 0; req_addr = '0;
    lfsr = 1;
    for (int a = 0; a < (1 << N); a++) begin
      lfsr = (lfsr * 1103515245 + 12345) & 32'h7fffffff;
      mem[a] = 8'(lfsr >> 16);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < P / X; g++)
      for (int h = 0; h < L / Y; h++) begin
        optimal = 32'h7fffffff;
        for (int i = -(M / 2); i <= (M - 1) / 2; i++)
          for (int j = -(NS / 2); j <= (NS - 1) / 2; j++) begin
            partial = 0;
            for (int k = 0; k < X; k++)
              for (int l = 0; l < Y; l++) begin
                issue(CF_BASE + (X * g + k) * L + (Y * h + l));
                nv = int'(mem[CF_BASE + (X * g + k) * L + (Y * h + l)]);
                ra = RF_BASE + clamp(X * g + i + k, P - 1) * L + clamp(Y * h + j + l, L - 1);
                issue(ra);
                rv = int'(mem[ra]);
                partial += (nv > rv) ? nv - rv : rv - nv;
              end
            if (partial < optimal) begin
              optimal = partial;
              issue(MV_BASE + 2 * (g * (L / Y) + h));
              mem[MV_BASE + 2 * (g * (L / Y) + h)] = 8'(i);
              issue(MV_BASE + 2 * (g * (L / Y) + h) + 1);
              mem[MV_BASE + 2 * (g * (L / Y) + h) + 1] = 8'(j);
            end
          end
      end
    @(negedge clk);
    req_valid = 0;
    check(mem_addr_valid && mem_addr == N'(exp_addr), "last reference");
    tr_wze += $countones({bus_pref_miss, bus_ident, bus_word} ^ prev_bus);
    $display("references=%0d  Pref misses=%0d  repeated offsets=%0d  new offsets=%0d",
             refs, n_miss, n_same, n_new);
    $display("transitions: plain %0d (%0.2f/ref), encoded %0d (%0.2f/ref), ratio %0.2f",
             tr_plain, real'(tr_plain) / real'(refs), tr_wze, real'(tr_wze) / real'(refs),
             real'(tr_wze) / real'(tr_plain));
    check(real'(tr_plain) / real'(refs) > 4.0 && real'(tr_plain) / real'(refs) < 5.6,
          "plain activity near the published 4.8 transitions/reference");
    check(real'(tr_wze) < 0.7 * real'(tr_plain), "encoded bus saves at least 30%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
