// tb_xbar_1t1r: program a crossbar with random data and read it back.
// Uses the S-box geometry (16x4) and the RC/RK geometry (40x3). Every row
// is read through its one-hot wordline and compared with a shadow copy;
// reads without the read pulse or without a wordline must return 0, and
// rewriting one row must not disturb the others.
module tb_xbar_1t1r;
  logic clk = 0;
  always #5 clk = ~clk;

  // 16 x 4 (S-box unit, default parameters)
  logic        s_we, s_rd;
  logic [3:0]  s_wa, s_wd, s_on;
  logic [15:0] s_wl;
  // 40 x 3 (RC/RK unit)
  logic        k_we, k_rd;
  logic [5:0]  k_wa;
  logic [2:0]  k_wd, k_on;
  logic [39:0] k_wl;

  logic [3:0] s_shadow [16];
  logic [2:0] k_shadow [40];
  int checks = 0, failures = 0;

  xbar_1t1r dut_s (.clk, .we(s_we), .waddr(s_wa), .wdata(s_wd), .wl(s_wl), .rd_en(s_rd), .col_on(s_on));
  xbar_1t1r #(.ROWS(40), .COLS(3)) dut_k (.clk, .we(k_we), .waddr(k_wa), .wdata(k_wd),
                                          .wl(k_wl), .rd_en(k_rd), .col_on(k_on));

  task automatic chk(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < 16; r++) begin
      s_wl = 16'd1 << r; s_rd = 1; #1;
      chk($sformatf("sbox row %0d", r), {1'b0, s_on[3:0]} , {1'b0, s_shadow[r]});
      s_rd = 0; #1;
      chk("sbox no read pulse", s_on, 4'h0);
    end
    for (int r = 0; r < 40; r++) begin
      k_wl = 40'd1 << r; k_rd = 1; #1;
      chk($sformatf("rk row %0d", r), {1'b0, k_on}, {1'b0, k_shadow[r]});
    end
    k_wl = '0; #1;
    chk("rk no wordline", {1'b0, k_on}, 4'h0);
    k_rd = 0; s_wl = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_we = 0; k_we = 0; s_rd = 0; k_rd = 0; s_wl = '0; k_wl = '0;
    s_wa = '0; s_wd = '0; k_wa = '0; k_wd = '0;
    @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      s_shadow[r] = 4'($urandom);
      s_we = 1; s_wa = 4'(r); s_wd = s_shadow[r];
      @(negedge clk);
    end
    s_we = 0;
    for (int r = 0; r < 40; r++) begin
      k_shadow[r] = 3'($urandom);
      k_we = 1; k_wa = 6'(r); k_wd = k_shadow[r];
      @(negedge clk);
    end
    k_we = 0;
    read_all();
    // reprogram one row of each (a new session)
    s_shadow[7] = ~s_shadow[7]; s_we = 1; s_wa = 4'd7; s_wd = s_shadow[7];
    k_shadow[33] = ~k_shadow[33]; k_we = 1; k_wa = 6'd33; k_wd = k_shadow[33];
    @(negedge clk);
    s_we = 0; k_we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
