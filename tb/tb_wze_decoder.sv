// tb_wze_decoder: self-checking test of the working-zone decoder.
// The reference model encodes a stream of addresses with locality; its bus
// fields drive the decoder (default N = 16, B = 2, and a four-Pref copy), and
// the decoded address must equal the original in the same cycle. A third
// decoder takes the one-hot offset on only the low k = 8 word wires. Idle cycles
// must leave the decoder state alone. At the end a hit whose word differs in
// two wires is injected and protocol_err must rise.
module tb_wze_decoder;
  import wze_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  int n_same = 0, n_new = 0, n_miss = 0;

  logic clk = 0, rst_n = 0;
  logic bv;
  logic [N-1:0] w2, w4, a2, a4;
  logic [0:0] id2;
  logic [1:0] id4;
  logic pm2, pm4, av2, av4, err2, err4;
  logic [N-1:0] wk, ak;
  logic [0:0] idk;
  logic pmk, avk, errk;

  wze_decoder dut2 (.clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus_word(w2), .bus_ident(id2),
                    .bus_pref_miss(pm2), .addr_valid(av2), .addr(a2), .protocol_err(err2));
  wze_decoder #(.B(4)) dut4 (.clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus_word(w4), .bus_ident(id4),
                    .bus_pref_miss(pm4), .addr_valid(av4), .addr(a4), .protocol_err(err4));

  wze_decoder #(.OFF_W(3)) dutk (.clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus_word(wk), .bus_ident(idk),
                    .bus_pref_miss(pmk), .addr_valid(avk), .addr(ak), .protocol_err(errk));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wze_ref_enc ref2, ref4, refk;
    wze_stream  st;
    int a, ew, ei, em;
    ref2 = new(N, 2); ref4 = new(N, 4); refk = new(N, 2, 8); st = new(N, 3);
    bv = 0; w2 = '0; w4 = '0; id2 = '0; id4 = '0; pm2 = 0; pm4 = 0; wk = '0; idk = '0; pmk = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 30000; it++) begin
      @(negedge clk);
      bv = ($urandom_range(9) != 0);
      if (bv) begin
        a = st.next();
        ref2.encode(a, ew, ei, em);
        w2 = N'(ew); id2 = 1'(ei); pm2 = 1'(em);
        if (em != 0) n_miss++; else if (ref2.last_same) n_same++; else n_new++;
        ref4.encode(a, ew, ei, em);
        w4 = N'(ew); id4 = 2'(ei); pm4 = 1'(em);
        refk.encode(a, ew, ei, em);
        wk = N'(ew); idk = 1'(ei); pmk = 1'(em);
        #1;
        check(avk && ak == N'(a), $sformatf("k=8 it=%0d got %h exp %h", it, ak, a));
        check(av2 && a2 == N'(a), $sformatf("B=2 it=%0d got %h exp %h", it, a2, a));
        check(av4 && a4 == N'(a), $sformatf("B=4 it=%0d got %h exp %h", it, a4, a));
        check(!err2 && !err4 && !errk, "no protocol error on a valid stream");
      end else begin
        #1;
        check(!av2 && !av4, "addr_valid low when idle");
      end
    end
    // Inject a hit whose word differs from the previous one in two wires.
    @(negedge clk);
    bv = 1; pm2 = 0; w2 = w2 ^ N'(3);
    #1;
    check(err2, "protocol_err on a two-wire change");
    // ...and, for k = 8, a hit that changes a wire above the low eight
    bv = 1; pmk = 0; wk = wk ^ N'(16'h0100);
    #1;
    check(errk, "protocol_err on a change above the k one-hot wires");
    @(negedge clk);
    bv = 0;
    check(n_same > 0 && n_new > 0 && n_miss > 0, "case coverage");
    $display("same-offset=%0d new-offset=%0d misses=%0d", n_same, n_new, n_miss);
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
