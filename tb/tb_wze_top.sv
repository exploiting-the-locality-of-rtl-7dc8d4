// tb_wze_top: end-to-end test of the encoded address bus at its default size
// (16-bit addresses, two Prefs, 18 bus wires).
//
// A stream of addresses with locality (three wandering zones, so that two
// Prefs must be replaced now and then) passes through encoder, bus and
// decoder. Every address must come out of the decoder exactly one clock after
// it went in, and the bus fields must match the reference model. The word
// field's activity is checked per reference: 0 wires for a repeated offset, 1
// wire for a new offset. Each mechanism is counted and must occur: Pref miss
// with full address, hit with repeated offset, hit with new offset (negative
// and positive), LRU replacement of each Pref, a change of ident, a reference
// that hits both Prefs, wrap-around at the ends of the address space and idle
// cycles. The bus activity is reported against the unencoded address bus.
module tb_wze_top;
  import wze_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  int n_miss = 0, n_same = 0, n_neg = 0, n_pos = 0, n_idle = 0, n_ident = 0, n_both = 0, n_wrap = 0;
  int repl [2] = '{0, 0};
  longint tr_plain = 0, tr_wze = 0, refs = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  logic [N-1:0] req_addr;
  logic bus_valid, bus_pref_miss, mem_addr_valid, protocol_err;
  logic [N-1:0] bus_word, mem_addr;
  logic [0:0] bus_ident;

  wze_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wze_ref_enc rm;
    wze_stream  st;
    int ew, ei, em, exp_addr, a, prev_plain, ntr;
    bit pend, exp_same, exp_hit;
    logic [N+1:0] prev_bus;
    rm = new(N, 2); st = new(N, 3);
    req_valid = 0; req_addr = '0; pend = 0; prev_plain = 0;
    ew = 0; ei = 0; em = 0; exp_addr = 0; exp_same = 0; exp_hit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_bus = '0;
    // the first reference hits both Prefs, which reset to address 0
    for (int it = 0; it < 40000; it++) begin
      @(negedge clk);
      if (pend) begin
        check(mem_addr_valid && mem_addr == N'(exp_addr),
              $sformatf("it=%0d decoded %h exp %h", it, mem_addr, exp_addr));
        check(bus_word == N'(ew) && bus_ident == 1'(ei) && bus_pref_miss == 1'(em),
              $sformatf("it=%0d bus fields", it));
        if (exp_hit) begin
          ntr = $countones(bus_word ^ prev_bus[N-1:0]);
          check(ntr == (exp_same ? 0 : 1), $sformatf("it=%0d word activity %0d", it, ntr));
        end
        tr_wze += $countones({bus_pref_miss, bus_ident, bus_word} ^ prev_bus);
        prev_bus = {bus_pref_miss, bus_ident, bus_word};
      end else begin
        check(!mem_addr_valid, "no output without a request");
      end
      req_valid = (it < 10) || ($urandom_range(9) != 0);
      pend = req_valid;
      if (req_valid) begin
        if (it == 3000)      a = (1 << N) - 3;   // near the top of the address space
        else if (it == 3001) a = 2;              // wraps to just above 0
        else                 a = (it < 2) ? it : st.next();
        req_addr = N'(a);
        exp_addr = a;
        begin
          int d0, d1;
          d0 = rm.wrap_signed(a - rm.pref[0]); d1 = rm.wrap_signed(a - rm.pref[1]);
          if (d0 >= -(N/2) && d0 < N/2 && d1 >= -(N/2) && d1 < N/2) n_both++;
          // a hit whose plain (unwrapped) distance is not small crosses 0
          if (d0 >= -(N/2) && d0 < N/2 && (a - rm.pref[0] > N || rm.pref[0] - a > N)) n_wrap++;
        end
        rm.encode(a, ew, ei, em);
        exp_hit = rm.last_hit; exp_same = rm.last_same;
        if (!rm.last_hit) begin n_miss++; repl[rm.last_zone]++; end
        else if (rm.last_same) n_same++;
        else if (rm.last_off < 0) n_neg++;
        else n_pos++;
        if (rm.last_hit && ei != int'(prev_bus[N])) n_ident++;
        refs++;
        tr_plain += $countones(N'(a) ^ N'(prev_plain));
        prev_plain = a;
      end else n_idle++;
    end
    check(n_miss > 0,  "mechanism: Pref miss");
    check(n_same > 0,  "mechanism: repeated offset");
    check(n_neg > 0,   "mechanism: new negative offset");
    check(n_pos > 0,   "mechanism: new positive offset");
    check(repl[0] > 0 && repl[1] > 0, "mechanism: LRU replacement of each Pref");
    check(n_ident > 0, "mechanism: ident change");
    check(n_both > 0,  "mechanism: hit in both Prefs");
    check(n_wrap > 0,  "mechanism: wrap-around");
    check(n_idle > 0,  "mechanism: idle cycle");
    $display("refs=%0d miss=%0d same=%0d new(-)=%0d new(+)=%0d repl=%0d/%0d ident-change=%0d both=%0d wrap=%0d idle=%0d",
             refs, n_miss, n_same, n_neg, n_pos, repl[0], repl[1], n_ident, n_both, n_wrap, n_idle);
    $display("transitions/reference: plain %0.2f, encoded %0.2f",
             real'(tr_plain) / real'(refs), real'(tr_wze) / real'(refs));
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
