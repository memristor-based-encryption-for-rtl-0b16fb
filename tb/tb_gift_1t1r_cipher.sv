// tb_gift_1t1r_cipher: end-to-end test of the cipher at its default size
// (GIFT-128, 32 slices, 40 rounds).
//
// For each session the testbench programs the S-box rows and the 40 pre-
// permuted round rows (gift_pkg::rk_row, the offline step), then encrypts
// blocks and compares the ciphertext with the textbook reference model
// (gift_ref_pkg) and, for the first two sessions, with the published GIFT-128
// test vectors. It checks that done arrives exactly 40 cycles after start,
// that start is ignored while busy, that blocks can run back to back and
// that a new session key replaces the old one. Counts of each mechanism
// (programming writes, plaintext reads, fed-back rounds, AND/NOR sense
// firings, round-constant XORs, ignored starts, re-keying) must be non-zero.
module tb_gift_1t1r_cipher;
  import gift_pkg::*;
  import gift_ref_pkg::*;
  localparam int NB = 128;
  localparam int NS = NB / 4;
  localparam int R  = 40;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;  // 10 MHz

  logic            sb_we, rk_we, start, busy, done;
  logic [3:0]      sb_waddr, sb_wdata;
  logic [5:0]      rk_waddr, round_idx;
  logic [3*NS-1:0] rk_wdata;
  logic [NB-1:0]   pt, ct;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_prog_sb = 0, n_prog_rk = 0, n_first = 0, n_feedback = 0;
  int n_and = 0, n_nor = 0, n_rc_xor = 0, n_ignored = 0, n_rekey = 0;

  gift_1t1r_cipher dut (
    .clk, .rst_n, .sb_we, .sb_waddr, .sb_wdata, .rk_we, .rk_waddr, .rk_wdata,
    .start, .pt, .busy, .done, .ct, .round_idx
  );

  always @(posedge clk) begin
    if (sb_we) n_prog_sb++;
    if (rk_we) n_prog_rk++;
    if (dut.first) n_first++;
    if (dut.busy)  n_feedback++;
    if (dut.g_slice[0].u_slice.g_col[1].sa_and) n_and++;
    if (dut.g_slice[0].u_slice.g_col[2].sa_nor) n_nor++;
    if (dut.active && dut.g_slice[3].u_slice.bot[3]) n_rc_xor++;
    if (start && busy) n_ignored++;
  end

  task automatic chk(string what, logic [NB-1:0] got, logic [NB-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic program_key(logic [127:0] key);
    logic [3*MAX_SLICES-1:0] row;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      sb_we = 1; sb_waddr = 4'(v); sb_wdata = sbox(4'(v));
    end
    @(negedge clk);
    sb_we = 0;
    for (int r = 0; r < R; r++) begin
      row = rk_row(key, r, NB);
      rk_we = 1; rk_waddr = 6'(r); rk_wdata = row[3*NS-1:0];
      @(negedge clk);
    end
    rk_we = 0;
  endtask

  // Encrypt one block; checks latency and result.
  task automatic encrypt(logic [NB-1:0] p, logic [127:0] key, logic poke_start);
    int cyc;
    logic [NB-1:0] exp;
    exp = NB'(ref_encrypt(128'(p), key, NB));
    start = 1; pt = p;
    @(negedge clk);
    start = poke_start;   // optionally keep start high: must be ignored
    pt = ~p;              // plaintext only needs to be valid in the start cycle
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc == 3) start = 0;
    end
    start = 0;
    checks++;
    if (cyc != R) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, R);
    end
    chk("ciphertext vs reference", ct, exp);
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key;
    sb_we = 0; rk_we = 0; start = 0; sb_waddr = '0; sb_wdata = '0;
    rk_waddr = '0; rk_wdata = '0; pt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // session 1: all-zero key, published test vector
    program_key('0);
    encrypt('0, '0, 1'b0);
    chk("GIFT-128 test vector 1", ct, 128'hcd0bd738388ad3f668b15a36ceb6ff92);
    // ciphertext holds after done
    repeat (4) @(negedge clk);
    chk("ciphertext held", ct, 128'hcd0bd738388ad3f668b15a36ceb6ff92);

    // session 2: new key, published test vector, start held high
    key = 128'hfedcba9876543210fedcba9876543210;
    program_key(key);
    n_rekey++;
    encrypt(128'hfedcba9876543210fedcba9876543210, key, 1'b1);
    chk("GIFT-128 test vector 2", ct, 128'h8422241a6dbf5a9346af468409ee0152);

    // sessions 3..6: random keys, back-to-back random blocks
    for (int s = 0; s < 4; s++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      program_key(key);
      n_rekey++;
      for (int b = 0; b < 4; b++)
        encrypt({$urandom, $urandom, $urandom, $urandom}, key, 1'(b == 1));
    end

    $display("mechanisms: sbox_writes=%0d rk_writes=%0d plaintext_reads=%0d fed_back_rounds=%0d",
             n_prog_sb, n_prog_rk, n_first, n_feedback);
    $display("mechanisms: and_sa=%0d nor_sa=%0d rc_xor=%0d ignored_starts=%0d rekeys=%0d",
             n_and, n_nor, n_rc_xor, n_ignored, n_rekey);
    begin
      int m [9];
      m = '{n_prog_sb, n_prog_rk, n_first, n_feedback, n_and, n_nor, n_rc_xor, n_ignored, n_rekey};
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
