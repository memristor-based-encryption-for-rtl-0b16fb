// tb_gift_slice: one slice performing rounds from its crossbars.
// The S-box crossbar is programmed with the GIFT S-box and the RC/RK
// crossbar with random key bits. First the two rounds of the document's
// single-slice example are replayed ('1010' with key bits 0 -> '1011';
// '0001' with key bits 1 -> '1100'), then random rounds are compared with
// S(x) XOR key bits, in a slice without (default) and with a round-constant
// column. Each result must appear one clock after the read.
module tb_gift_slice;
  import gift_ref_pkg::*;
  localparam int R = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          rd_en;
  logic [3:0]    nib_in;
  logic [R-1:0]  rk_wl;
  logic          sb_we, rk_we;
  logic [3:0]    sb_waddr, sb_wdata;
  logic [5:0]    rk_waddr;
  logic [2:0]    rk_wdata;
  logic [3:0]    out_a, out_b;
  logic [2:0]    keys [R];
  int checks = 0, failures = 0;

  gift_slice dut_a (.clk, .rst_n, .rd_en, .nib_in, .rk_wl, .sb_we, .sb_waddr, .sb_wdata,
                    .rk_we, .rk_waddr, .rk_wdata, .nib_out(out_a));
  gift_slice #(.HAS_RC(1'b1)) dut_b (.clk, .rst_n, .rd_en, .nib_in, .rk_wl, .sb_we, .sb_waddr,
                    .sb_wdata, .rk_we, .rk_waddr, .rk_wdata, .nib_out(out_b));

  task automatic chk(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  task automatic round(logic [3:0] x, int r);
    @(negedge clk);
    nib_in = x; rk_wl = '0; rk_wl[r] = 1'b1; rd_en = 1;
    @(negedge clk);
    rd_en = 0; rk_wl = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; nib_in = '0; rk_wl = '0; sb_we = 0; rk_we = 0;
    sb_waddr = '0; sb_wdata = '0; rk_waddr = '0; rk_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program the S-box crossbar
    for (int v = 0; v < 16; v++) begin
      sb_we = 1; sb_waddr = 4'(v); sb_wdata = ref_sbox(4'(v));
      @(negedge clk);
    end
    sb_we = 0;
    // rounds 0 and 1 follow the example: key bits 00 then 11; rest random
    keys[0] = 3'b000;
    keys[1] = 3'b011;
    for (int r = 2; r < R; r++) keys[r] = 3'($urandom);
    for (int r = 0; r < R; r++) begin
      rk_we = 1; rk_waddr = 6'(r); rk_wdata = keys[r];
      @(negedge clk);
    end
    rk_we = 0;

    // the example rounds
    round(4'b1010, 0);
    chk("example round 1", out_a, 4'b1011);
    round(4'b0001, 1);
    chk("example round 2", out_a, 4'b1100);

    // output register holds while no read happens
    repeat (3) @(negedge clk);
    chk("output held", out_a, 4'b1100);

    // feedback of the own output (chain) and random inputs
    for (int n = 0; n < 200; n++) begin
      int r;
      logic [3:0] x, s;
      r = n % R;
      x = (n % 3 == 0) ? out_a : 4'($urandom);
      s = ref_sbox(x);
      round(x, r);
      chk($sformatf("slice round %0d x=%h", r, x), out_a, s ^ {1'b0, keys[r][1:0], 1'b0});
      chk($sformatf("rc slice round %0d x=%h", r, x), out_b,
          s ^ {keys[r][2], keys[r][1:0], 1'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
