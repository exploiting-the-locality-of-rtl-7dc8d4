// tb_wze_moh_encode: self-checking test of the modified one-hot encoder.
// Reproduces a worked example (offsets 1, 3, 2, 2, 0 encoded one after the
// other from an all-zero bus, on an 8-bit word: 02 0A 0E 0A 0B), then sweeps
// every offset against random previous words and checks that exactly the
// expected single wire flips.
module tb_wze_moh_encode;
  localparam int N = 16;
  localparam int W = $clog2(N);
  int checks = 0, failures = 0;

  logic [W-1:0]   off16;
  logic [N-1:0]   prev16, word16;
  logic [2:0]     off8;
  logic [7:0]     prev8, word8;

  wze_moh_encode #(.N(N)) dut (.offset(off16), .prev_word(prev16), .word(word16));
  wze_moh_encode #(.N(8)) dut8 (.offset(off8), .prev_word(prev8), .word(word8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    automatic int seq [5] = '{1, 3, 2, 2, 0};
    automatic logic [7:0] exp8 [5] = '{8'h02, 8'h0A, 8'h0E, 8'h0A, 8'h0B};
    prev8 = '0;
    foreach (seq[i]) begin
      off8 = 3'(seq[i]);
      #1;
      check(word8 == exp8[i], $sformatf("example step %0d: got %h exp %h", i, word8, exp8[i]));
      prev8 = word8;
    end
    for (int rep = 0; rep < 200; rep++) begin
      prev16 = N'($urandom);
      for (int v = -N/2; v < N/2; v++) begin
        logic [N-1:0] exp;
        exp = prev16;
        exp[(v + N) % N] = ~exp[(v + N) % N];
        off16 = W'(v);
        #1;
        check(word16 == exp, $sformatf("v=%0d prev=%h got %h exp %h", v, prev16, word16, exp));
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
