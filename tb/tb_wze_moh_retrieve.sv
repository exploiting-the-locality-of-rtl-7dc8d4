// tb_wze_moh_retrieve: self-checking test of the modified one-hot retrieval.
// Replays a worked decoding example on an 8-bit word (13 -> 1B gives offset
// 3, 1B -> 1B gives "same offset", 1B -> 1A gives offset 0), then checks
// every offset against random previous words, the repeat case and words with
// several flipped bits (onehot_ok must drop). A 16-bit copy that uses only
// the low k = 8 wires for the offset must also flag a change above them.
module tb_wze_moh_retrieve;
  localparam int N = 16;
  localparam int W = $clog2(N);
  int checks = 0, failures = 0;

  logic [N-1:0] word16, prev16;
  logic         same16, ok16;
  logic [W-1:0] off16;
  logic [7:0]   word8, prev8;
  logic         same8, ok8;
  logic [2:0]   off8;

  wze_moh_retrieve #(.N(N)) dut (.word(word16), .prev_word(prev16), .same(same16),
                                 .offset(off16), .onehot_ok(ok16));
  logic [N-1:0] wordk;
  logic         samek, okk;
  logic [2:0]   offk;
  wze_moh_retrieve #(.N(N), .OFF_W(3)) dutk (.word(wordk), .prev_word(prev16), .same(samek),
                                             .offset(offk), .onehot_ok(okk));
  wze_moh_retrieve #(.N(8)) dut8 (.word(word8), .prev_word(prev8), .same(same8),
                                  .offset(off8), .onehot_ok(ok8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    prev8 = 8'h13; word8 = 8'h1B; #1;
    check(!same8 && ok8 && off8 == 3'd3, "example: offset 3");
    prev8 = 8'h1B; word8 = 8'h1B; #1;
    check(same8 && ok8, "example: same offset");
    prev8 = 8'h1B; word8 = 8'h1A; #1;
    check(!same8 && ok8 && off8 == 3'd0, "example: offset 0");

    wordk = '0;
    for (int rep = 0; rep < 200; rep++) begin
      prev16 = N'($urandom);
      word16 = prev16; #1;
      check(same16 && ok16, "repeat word");
      for (int p = 0; p < N; p++) begin
        int exp_v;
        exp_v = (p < N/2) ? p : p - N;
        word16 = prev16 ^ (N'(1) << p); #1;
        check(!same16 && ok16 && $signed(off16) == exp_v,
              $sformatf("bit %0d: same=%0d ok=%0d off=%0d exp %0d", p, same16, ok16, $signed(off16), exp_v));
      end
      for (int p = 0; p < N; p++) begin
        wordk = prev16 ^ (N'(1) << p); #1;
        if (p < 8) check(okk && !samek && $signed(offk) == ((p < 4) ? p : p - 8), $sformatf("k=8 bit %0d", p));
        else       check(!okk, $sformatf("k=8 bit %0d must be flagged", p));
      end
      begin
        int p1, p2;
        p1 = $urandom_range(N - 1);
        p2 = (p1 + 1 + $urandom_range(N - 2)) % N;
        word16 = prev16 ^ (N'(1) << p1) ^ (N'(1) << p2); #1;
        check(!same16 && !ok16, "two bits flipped must be flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
