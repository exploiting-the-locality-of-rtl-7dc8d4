// tb_wze_encoder: self-checking test of the working-zone encoder.
// One request stream with locality (a few wandering zones, repeated and
// changing strides, far jumps, idle cycles) drives two encoders: the default
// one (N = 16, B = 2) and one with four Prefs. Each request's bus fields are
// predicted by the reference model and compared one clock later, which also
// checks the one-cycle latency; a third encoder puts the one-hot offset on
// only the low k = 8 word wires (offsets -4 .. 3); during idle cycles the bus must hold still.
// The test counts hits with a repeated offset, hits with a new offset, misses
// and LRU replacements of every zone, and fails if any never occurred.
module tb_wze_encoder;
  import wze_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  int n_same = 0, n_new = 0, n_miss = 0, n_idle = 0, n_neg = 0, n_pos = 0;
  int repl2 [2] = '{0, 0};
  int repl4 [4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic req_valid;
  logic [N-1:0] req_addr;
  logic bv2, pm2, bv4, pm4, bvk, pmk;
  logic [N-1:0] w2, w4, wk;
  logic [0:0] idk;
  logic [0:0] id2;
  logic [1:0] id4;

  wze_encoder dut2 (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_addr(req_addr),
                    .bus_valid(bv2), .bus_word(w2), .bus_ident(id2), .bus_pref_miss(pm2));
  wze_encoder #(.B(4)) dut4 (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_addr(req_addr),
                    .bus_valid(bv4), .bus_word(w4), .bus_ident(id4), .bus_pref_miss(pm4));

  wze_encoder #(.OFF_W(3)) dutk (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_addr(req_addr),
                    .bus_valid(bvk), .bus_word(wk), .bus_ident(idk), .bus_pref_miss(pmk));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wze_ref_enc ref2, ref4, refk;
    int ewk, eik, emk, n_k_hit;
    wze_stream  st;
    int ew2, ei2, em2, ew4, ei4, em4;
    bit was_valid;
    ref2 = new(N, 2); ref4 = new(N, 4); refk = new(N, 2, 8); st = new(N, 3);
    req_valid = 0; req_addr = '0;
    ew2 = 0; ei2 = 0; em2 = 0; ew4 = 0; ei4 = 0; em4 = 0; ewk = 0; eik = 0; emk = 0; n_k_hit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 30000; it++) begin
      @(negedge clk);
      was_valid = req_valid;
      if (it > 0) begin
        check(bv2 == was_valid && bv4 == was_valid, "bus_valid one cycle after the request");
        check(w2 == N'(ew2) && id2 == 1'(ei2) && pm2 == 1'(em2),
              $sformatf("B=2 it=%0d got w=%h id=%0d pm=%0d exp w=%h id=%0d pm=%0d",
                        it, w2, id2, pm2, ew2, ei2, em2));
        check(w4 == N'(ew4) && id4 == 2'(ei4) && pm4 == 1'(em4),
              $sformatf("B=4 it=%0d got w=%h id=%0d pm=%0d exp w=%h id=%0d pm=%0d",
                        it, w4, id4, pm4, ew4, ei4, em4));
        check(wk == N'(ewk) && idk == 1'(eik) && pmk == 1'(emk),
              $sformatf("k=8 it=%0d got w=%h id=%0d pm=%0d exp w=%h id=%0d pm=%0d",
                        it, wk, idk, pmk, ewk, eik, emk));
      end
      req_valid = ($urandom_range(9) != 0);
      if (req_valid) begin
        req_addr = N'(st.next());
        ref2.encode(int'(req_addr), ew2, ei2, em2);
        if (!ref2.last_hit) begin n_miss++; repl2[ref2.last_zone]++; end
        else if (ref2.last_same) n_same++;
        else begin
          n_new++;
          if (ref2.last_off < 0) n_neg++; else n_pos++;
        end
        ref4.encode(int'(req_addr), ew4, ei4, em4);
        if (!ref4.last_hit) repl4[ref4.last_zone]++;
        refk.encode(int'(req_addr), ewk, eik, emk);
        if (refk.last_hit && !refk.last_same) n_k_hit++;
      end else n_idle++;
    end
    foreach (repl2[j]) check(repl2[j] > 0, $sformatf("B=2 zone %0d never replaced", j));
    foreach (repl4[j]) check(repl4[j] > 0, $sformatf("B=4 zone %0d never replaced", j));
    check(n_same > 0 && n_new > 0 && n_miss > 0 && n_idle > 0 && n_neg > 0 && n_pos > 0 && n_k_hit > 0, "case coverage");
    $display("same-offset hits=%0d new-offset hits=%0d (neg %0d, pos %0d) misses=%0d idle=%0d",
             n_same, n_new, n_neg, n_pos, n_miss, n_idle);
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
