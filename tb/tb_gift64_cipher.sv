// tb_gift64_cipher: end-to-end test of the cipher configured as GIFT-64
// (BLOCK_BITS=64: 16 slices, 28 rounds, key bits on the two LSBs of each
// nibble). Same procedure as the GIFT-128 test: program S-box and pre-
// permuted round rows, encrypt, compare with the reference model and the
// published GIFT-64 test vectors, checks the permutation against the
// printed GIFT-64 table, checks the 28-cycle latency and count the
// mechanisms (the round-constant check watches slice 3, which holds one).
module tb_gift64_cipher;
  import gift_pkg::*;
  import gift_ref_pkg::*;
  localparam int NB = 64;
  localparam int NS = NB / 4;
  localparam int R  = 28;

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

  gift_1t1r_cipher #(.BLOCK_BITS(64)) dut (
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

    // permutation used by the wiring and the key arrangement, against the
    // printed GIFT-64 table P64(i)
    begin
      int p64 [64] = '{
         0, 17, 34, 51, 48,  1, 18, 35, 32, 49,  2, 19, 16, 33, 50,  3,
         4, 21, 38, 55, 52,  5, 22, 39, 36, 53,  6, 23, 20, 37, 54,  7,
         8, 25, 42, 59, 56,  9, 26, 43, 40, 57, 10, 27, 24, 41, 58, 11,
        12, 29, 46, 63, 60, 13, 30, 47, 44, 61, 14, 31, 28, 45, 62, 15};
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (int'(perm_pos(i, 64)) != p64[i]) begin
          failures++;
          $display("FAIL P64(%0d) = %0d, table %0d", i, perm_pos(i, 64), p64[i]);
        end
      end
    end

    // session 1: all-zero key, published test vector
    program_key('0);
    encrypt('0, '0, 1'b0);
    chk("GIFT-64 test vector 1", ct, 64'hf62bc3ef34f775ac);
    // ciphertext holds after done
    repeat (4) @(negedge clk);
    chk("ciphertext held", ct, 64'hf62bc3ef34f775ac);

    // session 2: new key, published test vector, start held high
    key = 128'hfedcba9876543210fedcba9876543210;
    program_key(key);
    n_rekey++;
    encrypt(64'hfedcba9876543210, key, 1'b1);
    chk("GIFT-64 test vector 2", ct, 64'hc1b71f66160ff587);

    // sessions 3..6: random keys, back-to-back random blocks
    for (int s = 0; s < 4; s++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      program_key(key);
      n_rekey++;
      for (int b = 0; b < 4; b++)
        encrypt({$urandom, $urandom}, key, 1'(b == 1));
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
