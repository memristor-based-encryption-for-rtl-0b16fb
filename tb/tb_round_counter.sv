// tb_round_counter: round selector sequencing and latency.
// Starts several runs and checks, cycle by cycle, that the counter walks
// 0..39 with one row per cycle, that round 1 is flagged as first, that done
// pulses exactly 40 cycles after start, that start is ignored while busy,
// and that a new run can start in the cycle right after done.
module tb_round_counter;
  localparam int R = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] cnt;
  logic active, first, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  round_counter dut (.clk, .rst_n, .start, .cnt, .active, .first, .busy, .done);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d @%0t", what, got, exp, $time);
    end
  endtask

  // One run: start high for one cycle (or held for 'hold' cycles), then
  // follow the counter until done.
  task automatic run(int hold);
    int cycles;
    @(negedge clk);
    start = 1;
    #1;
    chk("first on start", first, 1);
    chk("active on start", active, 1);
    chk("row 0 on start", cnt, 0);
    for (int r = 1; r < R; r++) begin
      @(negedge clk);
      if (r >= hold) start = 0;
      #1;
      chk("busy", busy, 1);
      chk("first only in round 1", first, 0);
      chk($sformatf("row in round %0d", r + 1), cnt, r);
      chk("done low", done, 0);
    end
    cycles = R - 1;
    @(negedge clk);
    start = 0;
    cycles++;
    chk("done after ROUNDS cycles", done, 1);
    chk("latency in cycles", cycles, R);
    chk("idle after run", busy, 0);
    chk("counter cleared", cnt, 0);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", busy, 0);
    chk("no wordline when idle", active, 0);
    run(1);
    run(5);       // start held high: later starts are ignored while busy
    // start again right in the done cycle (back-to-back)
    start = 1; #1;
    chk("back-to-back start accepted", first, 1);
    start = 0;
    run(1);
    repeat (3) @(negedge clk);
    chk("done is a single pulse", done, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
