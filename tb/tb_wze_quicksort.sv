// tb_wze_quicksort: the quicksort workload on the encoded address bus at its
// default size (16-bit addresses, two Prefs).
//
// A vector of 65536 one-byte elements fills the whole address space and is
// filled with pseudo-random values. It is sorted in place with the
// partition-exchange scheme: the pivot is the last element of the range, an
// index i scans up while elements are below the pivot, an index j scans down
// while they are above it (not past the range's start), out-of-place pairs
// are swapped (two writes), and at the end the element at i and the pivot are
// exchanged (two writes). The two sub-ranges are then sorted in turn, kept on
// an explicit stack. Every read and write is one reference on the bus, one per
// clock, and every one must be decoded back to the same address one clock
// later. The vector must end up sorted. The plain and encoded switching
// activity is reported; the encoded bus must need fewer than 0.6 of the
// plain transitions, and the plain stream must show between 3.5 and 4.7
// transitions per reference (a published run of this workload reports 1.9
// million references, 4.1 plain and 1.4 encoded transitions per reference).
module tb_wze_quicksort;
  localparam int N = 16;
  localparam int SIZE = 1 << N;
  int checks = 0, failures = 0;
  longint refs = 0, tr_plain = 0, tr_wze = 0, n_miss = 0, n_same = 0, n_new = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  logic [N-1:0] req_addr;
  logic bus_valid, bus_pref_miss, mem_addr_valid, protocol_err;
  logic [N-1:0] bus_word, mem_addr;
  logic [0:0] bus_ident;

  wze_top dut (.*);

  logic [7:0] vec [SIZE];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit pend = 0;
  int exp_addr = 0, prev_plain = 0;
  logic [N+1:0] prev_bus = '0;

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

  task automatic rd(input int a, output int v);
    issue(a);
    v = int'(vec[a]);
  endtask

  task automatic wr(input int a, input int v);
    issue(a);
    vec[a] = 8'(v);
  endtask

  int stk_l [256], stk_r [256];

  initial begin
    int sp, l, r, i, j, pivot, ti, tj, lfsr, maxsp;
    bit sorted;
    req_valid = 0; req_addr = '0;
    lfsr = 7;
    for (int a = 0; a < SIZE; a++) begin
      lfsr = (lfsr * 1103515245 + 12345) & 32'h7fffffff;
      vec[a] = 8'(lfsr >> 16);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    sp = 0; maxsp = 0;
    stk_l[0] = 0; stk_r[0] = SIZE - 1; sp = 1;
    while (sp > 0) begin
      sp--;
      l = stk_l[sp]; r = stk_r[sp];
      if (r > l) begin
        rd(r, pivot);
        i = l - 1;
        j = r;
        forever begin
          do begin i++; rd(i, ti); end while (ti < pivot);
          tj = pivot;
          do begin j--; rd(j, tj); end while (tj > pivot && j > l);
          if (i >= j) break;
          wr(i, tj);
          wr(j, ti);
        end
        wr(i, pivot);
        wr(r, ti);
        // sort the left part first: push the right part below it
        stk_l[sp] = i + 1; stk_r[sp] = r; sp++;
        stk_l[sp] = l;     stk_r[sp] = i - 1; sp++;
        if (sp > maxsp) maxsp = sp;
        if (sp > 250) begin
          check(0, "partition stack overflow");
          sp = 0;
        end
      end
    end
    @(negedge clk);
    req_valid = 0;
    check(mem_addr_valid && mem_addr == N'(exp_addr), "last reference");
    tr_wze += $countones({bus_pref_miss, bus_ident, bus_word} ^ prev_bus);
    sorted = 1;
    for (int a = 1; a < SIZE; a++) if (vec[a] < vec[a - 1]) sorted = 0;
    check(sorted, "vector sorted");
    $display("references=%0d  Pref misses=%0d  repeated offsets=%0d  new offsets=%0d  max stack=%0d",
             refs, n_miss, n_same, n_new, maxsp);
    $display("transitions: plain %0d (%0.2f/ref), encoded %0d (%0.2f/ref), ratio %0.2f",
             tr_plain, real'(tr_plain) / real'(refs), tr_wze, real'(tr_wze) / real'(refs),
             real'(tr_wze) / real'(tr_plain));
    check(real'(tr_plain) / real'(refs) > 3.5 && real'(tr_plain) / real'(refs) < 4.7,
          "plain activity near the published 4.1 transitions/reference");
    check(real'(tr_wze) < 0.6 * real'(tr_plain), "encoded bus saves at least 40%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
