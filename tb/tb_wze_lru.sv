// tb_wze_lru: self-checking test of the LRU replacement state.
// Random touches (and idle cycles) for 2 and 4 zones; the victim is compared
// every cycle with a model that records the time of each zone's last use
// (zone i initially last used at time -i) and picks the oldest.
module tb_wze_lru;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic touch2, touch4;
  logic [0:0] idx2, vic2;
  logic [1:0] idx4, vic4;

  wze_lru #(.NUM(2)) dut2 (.clk(clk), .rst_n(rst_n), .touch(touch2), .touch_idx(idx2), .victim(vic2));
  wze_lru #(.NUM(4)) dut4 (.clk(clk), .rst_n(rst_n), .touch(touch4), .touch_idx(idx4), .victim(vic4));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int oldest(int lu[], int num);
    int r = 0;
    for (int j = 1; j < num; j++) if (lu[j] < lu[r]) r = j;
    return r;
  endfunction

  initial begin
    int lu2[], lu4[];
    lu2 = new[2]; lu4 = new[4];
    foreach (lu2[j]) lu2[j] = -j;
    foreach (lu4[j]) lu4[j] = -j;
    touch2 = 0; touch4 = 0; idx2 = '0; idx4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 1; t < 5000; t++) begin
      @(negedge clk);
      check(vic2 == 1'(oldest(lu2, 2)), $sformatf("victim2 got %0d", vic2));
      check(vic4 == 2'(oldest(lu4, 4)), $sformatf("victim4 got %0d exp %0d", vic4, oldest(lu4, 4)));
      touch2 = ($urandom_range(4) != 0);
      touch4 = ($urandom_range(4) != 0);
      // touch the victim about a third of the time, as on a miss
      idx2 = ($urandom_range(2) == 0) ? vic2 : 1'($urandom);
      idx4 = ($urandom_range(2) == 0) ? vic4 : 2'($urandom);
      @(posedge clk);
      if (touch2) lu2[idx2] = t;
      if (touch4) lu4[idx4] = t;
    end
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
